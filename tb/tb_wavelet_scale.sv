// tb_wavelet_scale: drives one wavelet branch (q = 3, with centring delays
// 1 and 2) with random, extreme and impulse samples, with idle cycles in
// between, and compares the low-pass, biphasic and monophasic outputs of
// every sample with a convolution by impulse responses built from the
// branch equations in the reference package.
module tb_wavelet_scale;
  import tb_ref_pkg::*;

  localparam int unsigned IN_W = 8;
  localparam int Q = 3, DB = 1, DM = 2;

  logic clk = 0, rst_n = 0, en = 0;
  logic signed [IN_W-1:0] lp_in = '0;
  logic signed [IN_W+2:0] lp_out;
  logic signed [IN_W+3:0] bi_out;
  logic signed [IN_W+4:0] mono_out;
  int checks = 0, failures = 0;
  longint hist [HIST];
  poly_t h_lp, h_bi, h_mono;

  wavelet_scale #(.IN_W(IN_W), .Q(Q), .DB(DB), .DM(DM)) dut (
    .clk, .rst_n, .en, .lp_in, .lp_out, .bi_out, .mono_out
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, longint got, longint want, int n);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("sample %0d %s = %0d, want %0d", n, what, got, want);
    end
  endtask

  initial begin
    h_lp   = binom3(Q - 1);
    h_bi   = pmul(h_lp, diff(Q));
    h_mono = shift(pmul(h_bi, diff(Q)), DM);
    h_bi   = shift(h_bi, DB);
    foreach (hist[i]) hist[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      longint v;
      @(negedge clk);
      case ((n / 50) % 4)
        0: v = longint'($signed($urandom_range(0, 255))) - 128;
        1: v = (n % 2) ? 127 : -128;
        2: v = (n % 50 == 0) ? 100 : 0;      // impulse: response visible
        default: v = longint'($signed($urandom_range(0, 16))) - 8;
      endcase
      for (int k = HIST - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = v;
      lp_in = IN_W'(v);
      en = 1;
      #1;
      expect_eq("lp_out", lp_out, conv(h_lp, hist), n);
      expect_eq("bi_out", bi_out, conv(h_bi, hist), n);
      expect_eq("mono_out", mono_out, conv(h_mono, hist), n);
      @(negedge clk);
      en = 0;
      lp_in = IN_W'($urandom);              // ignored while en is low
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
