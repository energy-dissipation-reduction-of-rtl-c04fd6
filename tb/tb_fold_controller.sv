// tb_fold_controller: runs the controller for FOLD = 6, 3, 2 and 1 with random
// legal start pulses (idle gaps and back-to-back passes) and checks, cycle by
// cycle, that each start is followed by exactly FOLD steps numbered 0..FOLD-1
// with first on step 0 and last on step FOLD-1, and nothing in between.
module tb_fold_controller;

  localparam int NF = 4;
  localparam int FOLDS [NF] = '{6, 3, 2, 1};

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int back_to_back [NF];

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
    logic start = 0;
    logic active, first, last;
    logic [SBW-1:0] step;
    int remaining = 0;   // steps still to come in the current pass
    int exp_step = 0;

    fold_controller #(.FOLD(F)) dut (.clk, .rst_n, .start, .active, .step, .first, .last);

    initial begin
      back_to_back[f] = 0;
      @(posedge rst_n);
      for (int c = 0; c < 5000; c++) begin
        @(negedge clk);
        // compare with the expected pass position
        checks++;
        if (active != (remaining > 0)) begin
          failures++; $display("F=%0d cycle %0d: active=%0d", F, c, active);
        end
        if (remaining > 0) begin
          checks++;
          if (int'(step) != exp_step || first != (exp_step == 0) || last != (exp_step == F - 1)) begin
            failures++;
            $display("F=%0d cycle %0d: step=%0d first=%0d last=%0d, want step %0d", F, c,
                     step, first, last, exp_step);
          end
        end else begin
          checks++;
          if (first || last) begin failures++; $display("F=%0d: first/last while idle", F); end
        end
        // legal start: idle or in the last step
        start = ((remaining == 0) || (remaining == 1)) && ($urandom_range(0, 2) == 0);
        if (start && remaining == 1) back_to_back[f]++;
        @(posedge clk);
        #1;
        if (start) begin remaining = F; exp_step = 0; end
        else if (remaining > 0) begin remaining--; exp_step++; end
        if (remaining == 0) exp_step = 0;
        start = 0;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (5010) @(posedge clk);
    for (int f = 0; f < NF; f++) begin
      checks++;
      if (back_to_back[f] == 0) begin failures++; $display("F=%0d: no back-to-back pass", FOLDS[f]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
