// tb_detector_configs: runs the whole detector in its other folding
// configurations, folded by 3 (two multipliers, clock 3x the sample rate)
// and unfolded (six multipliers, clock at the sample rate), on the same
// synthetic electrogram as the default test, each at its full sample rate.
// Every T is checked against the reference model and for its FOLD + 2 cycle
// latency, and the R peaks must stand out of the rest of the signal.
module tb_detector_configs;
  import detector_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned IN_W = 8;
  localparam int unsigned TW = t_width(IN_W);
  localparam int NF = 2;
  localparam int FOLDS [NF] = '{3, 1};
  localparam int NBEATS = 4;
  localparam int NSAMP = BEAT_FIRST + NBEATS * BEAT_RR;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int done_count = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (NSAMP * 8 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar f = 0; f < NF; f++) begin : g_f
    localparam int F = FOLDS[f];
    logic x_valid = 0;
    logic signed [IN_W-1:0] x = '0;
    logic t_valid;
    logic signed [TW-1:0] t;
    longint exp_t [$];
    longint exp_c [$];
    int results = 0;
    longint peak_on = 0, peak_off = 0;

    cardiac_event_detector #(.IN_W(IN_W), .FOLD(F)) dut (.clk, .rst_n, .x_valid, .x, .t_valid, .t);

    always @(posedge clk) begin
      if (rst_n && t_valid) begin
        longint wt, wc;
        bit near;
        checks++;
        wt = exp_t.pop_front();
        wc = exp_c.pop_front();
        if (longint'(t) != wt || cycle != wc) begin
          failures++;
          if (failures < 20) $display("F=%0d result %0d: t = %0d at %0d, want %0d at %0d",
                                      F, results, t, cycle, wt, wc);
        end
        near = 0;
        for (int k = 0; k < NBEATS; k++)
          if (results >= beat_pos(k) - 37 && results <= beat_pos(k) + 63) near = 1;
        if (near) begin if (longint'(t) > peak_on) peak_on = longint'(t); end
        else if (longint'(t) > peak_off) peak_off = longint'(t);
        results++;
      end
    end

    initial begin
      longint hist [HIST];
      poly_t h [NY];
      yvec_t yv;
      for (int i = 0; i < NY; i++) h[i] = response(i);
      foreach (hist[i]) hist[i] = 0;
      @(posedge rst_n);
      for (int n = 0; n < NSAMP; n++) begin
        int v;
        @(negedge clk);
        v = ecg_sample(n);
        for (int k = HIST - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = longint'(v);
        for (int i = 0; i < NY; i++) yv[i] = conv(h[i], hist);
        exp_t.push_back(glrt(yv));
        exp_c.push_back(cycle + F + 2);
        x = IN_W'(v);
        x_valid = 1;
        @(negedge clk);
        x_valid = 0;
        repeat (F - 1) @(negedge clk);
      end
      repeat (F + 4) @(negedge clk);
      $display("F=%0d: %0d results, largest T near beats %0d, elsewhere %0d", F, results, peak_on, peak_off);
      checks += 2;
      if (results != NSAMP) failures++;
      if (peak_on < 100 * peak_off) failures++;
      done_count++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done_count == NF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
