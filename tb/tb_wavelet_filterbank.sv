// tb_wavelet_filterbank: feeds the three-scale filterbank random, extreme,
// impulse and low-noise samples and checks all six outputs of every sample
// against the reference impulse responses (binomial cascade, differences,
// centring delays). Also checks that y_valid follows x_valid by one cycle
// and that the outputs hold between samples.
module tb_wavelet_filterbank;
  import detector_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned IN_W = 8;
  localparam int unsigned YW = y_width(IN_W);

  logic clk = 0, rst_n = 0, x_valid = 0;
  logic signed [IN_W-1:0] x = '0;
  logic y_valid;
  logic signed [YW-1:0] y [N_Y];
  int checks = 0, failures = 0;
  longint hist [HIST];
  poly_t h [NY];
  longint want [NY];

  wavelet_filterbank #(.IN_W(IN_W)) dut (.clk, .rst_n, .x_valid, .x, .y_valid, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NY; i++) h[i] = response(i);
    foreach (hist[i]) hist[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      longint v;
      @(negedge clk);
      case ((n / 60) % 4)
        0: v = longint'($signed($urandom_range(0, 255))) - 128;
        1: v = ((n / 13) % 2) ? 127 : -128;
        2: v = (n % 60 == 0) ? 64 : 0;
        default: v = longint'($signed($urandom_range(0, 6))) - 3;
      endcase
      for (int k = HIST - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = v;
      for (int i = 0; i < NY; i++) want[i] = conv(h[i], hist);
      x = IN_W'(v);
      x_valid = 1;
      @(negedge clk);
      x_valid = 0;
      x = IN_W'($urandom);
      checks++;
      if (!y_valid) begin failures++; $display("sample %0d: y_valid missing", n); end
      for (int i = 0; i < NY; i++) begin
        checks++;
        if (longint'(y[i]) != want[i]) begin
          failures++;
          if (failures < 20) $display("sample %0d y[%0d] = %0d, want %0d", n, i, y[i], want[i]);
        end
      end
      // idle cycles: valid low, outputs held
      for (int g = $urandom_range(1, 5); g > 0; g--) begin
        @(negedge clk);
        checks++;
        if (y_valid) begin failures++; $display("sample %0d: stray y_valid", n); end
        for (int i = 0; i < NY; i++) begin
          checks++;
          if (longint'(y[i]) != want[i]) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
