// tb_folding_unit: drives the folding unit (FOLD = 6, 3, 2 and 1) directly with
// random held products and y, steps it through passes as the controller
// would, and checks T = sum_i y_i * (p_i0 + p_i1 + p_i2), that t_valid comes
// one cycle after the last step and only then, and that t holds afterwards.
module tb_folding_unit;
  import detector_pkg::*;

  localparam int unsigned IN_W = 8;
  localparam int unsigned YW = y_width(IN_W);
  localparam int unsigned SW = s_width(IN_W);
  localparam int NF = 4;
  localparam int FOLDS [NF] = '{6, 3, 2, 1};

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int done_count = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar f = 0; f < NF; f++) begin : g_f
    localparam int F = FOLDS[f];
    localparam int SBW = (F > 1) ? $clog2(F) : 1;
    logic signed [SW-1:0] p [N_Y][N_TAPS];
    logic signed [YW-1:0] y_hold [N_Y];
    logic active = 0, first = 0, last = 0;
    logic [SBW-1:0] step = '0;
    logic t_valid;
    logic signed [t_width(IN_W)-1:0] t;

    folding_unit #(.IN_W(IN_W), .FOLD(F)) dut (
      .clk, .rst_n, .p, .y_hold, .active, .step, .first, .last, .t_valid, .t
    );

    initial begin
      longint want, s, yy, pv;
      foreach (y_hold[i]) y_hold[i] = '0;
      foreach (p[i, k]) p[i][k] = '0;
      @(posedge rst_n);
      for (int n = 0; n < 400; n++) begin
        @(negedge clk);
        want = 0;
        for (int i = 0; i < 6; i++) begin
          s = 0;
          yy = (n % 3 == 0) ? ((n % 2) ? (longint'(1) << (YW - 1)) - 1 : -(longint'(1) << (YW - 1)))
                            : longint'($signed($urandom)) % (longint'(1) << (YW - 1));
          y_hold[i] = YW'(yy);
          for (int k = 0; k < 3; k++) begin
            pv = (n % 3 == 0) ? ((n % 2) ? 5 * yy : -4 * yy)
                                      : longint'($signed($urandom)) % (longint'(1) << (SW - 4));   // within the range CM can produce
            p[i][k] = SW'(pv);
            s += pv;
          end
          want += yy * s;
        end
        for (int k = 0; k < F; k++) begin
          active = 1; step = SBW'(k); first = (k == 0); last = (k == F - 1);
          @(negedge clk);
          checks++;
          if (t_valid != (k == F - 1)) begin failures++; $display("F=%0d: t_valid wrong at step %0d", F, k); end
        end
        active = 0; first = 0; last = 0; step = '0;
        checks++;
        if (longint'(t) != want) begin
          failures++;
          if (failures < 20) $display("F=%0d pass %0d: t = %0d, want %0d", F, n, t, want);
        end
        // scramble inputs while idle: t holds
        foreach (y_hold[i]) y_hold[i] = YW'($urandom);
        repeat ($urandom_range(1, 3)) @(negedge clk);
        checks++;
        if (longint'(t) != want || t_valid) begin failures++; $display("F=%0d: t not held", F); end
      end
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
