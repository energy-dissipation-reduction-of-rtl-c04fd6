// tb_glrt_folded: feeds the folded GLRT (FOLD = 6, 3, 2 and 1) with random and
// extreme filterbank vectors, at the full rate of one vector per FOLD cycles
// and with idle gaps, and checks each T against y^T C y with the rounded
// matrix of the reference package, and that it appears FOLD + 1 cycles after
// its y_valid.
module tb_glrt_folded;
  import detector_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned IN_W = 8;
  localparam int unsigned YW = y_width(IN_W);
  localparam int NF = 4;
  localparam int FOLDS [NF] = '{6, 3, 2, 1};

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int done_count = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar f = 0; f < NF; f++) begin : g_f
    localparam int F = FOLDS[f];
    logic y_valid = 0;
    logic signed [YW-1:0] y [N_Y];
    logic t_valid;
    logic signed [t_width(IN_W)-1:0] t;
    longint exp_t [$];
    longint exp_c [$];
    int full_rate = 0, gapped = 0, results = 0;

    glrt_folded #(.IN_W(IN_W), .FOLD(F)) dut (.clk, .rst_n, .y_valid, .y, .t_valid, .t);

    // scoreboard
    always @(posedge clk) begin
      if (rst_n && t_valid) begin
        checks++;
        results++;
        if (exp_t.size() == 0) begin
          failures++; $display("F=%0d: unexpected t_valid", F);
        end else begin
          longint wt, wc;
          wt = exp_t.pop_front();
          wc = exp_c.pop_front();
          if (longint'(t) != wt || cycle != wc) begin
            failures++;
            if (failures < 20) $display("F=%0d: t = %0d at cycle %0d, want %0d at %0d", F, t, cycle, wt, wc);
          end
        end
      end
    end

    initial begin
      yvec_t yv;
      foreach (y[i]) y[i] = '0;
      @(posedge rst_n);
      for (int n = 0; n < 500; n++) begin
        int gap;
        @(negedge clk);
        for (int i = 0; i < NY; i++) begin
          case (n % 4)
            0: yv[i] = (i % 2) ? (longint'(1) << (YW - 1)) - 1 : -(longint'(1) << (YW - 1));
            1: yv[i] = -(longint'(1) << (YW - 1));
            default: yv[i] = longint'($signed($urandom)) % (longint'(1) << (YW - 1));
          endcase
          y[i] = YW'(yv[i]);
        end
        y_valid = 1;
        exp_t.push_back(glrt(yv));
        exp_c.push_back(cycle + F + 1);   // cycle counter samples old value at the edge
        @(negedge clk);
        y_valid = 0;
        foreach (y[i]) y[i] = YW'($urandom);
        gap = (n % 3 == 0) ? $urandom_range(1, 4) : 0;
        if (gap == 0) full_rate++; else gapped++;
        repeat (F - 1 + gap) @(negedge clk);
      end
      repeat (F + 3) @(negedge clk);
      checks += 3;
      if (results != 500) begin failures++; $display("F=%0d: %0d results", F, results); end
      if (full_rate == 0 || gapped == 0) failures++;
      if (exp_t.size() != 0) failures++;
      done_count++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (done_count == NF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
