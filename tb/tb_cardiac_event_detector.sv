// tb_cardiac_event_detector: end-to-end test of the detector at its default
// parameters (8-bit input, GLRT folded by 6).
//
// A synthetic electrogram of 12 beats (about 9 s at 1 kHz) is fed sample by
// sample, mostly at the full rate of one sample per FOLD cycles and
// sometimes with idle gaps. Every T(n) is compared with the reference model
// (impulse-response filterbank + quadratic form), and its arrival FOLD + 2
// cycles after the sample is checked. The test counts the mechanisms of the
// design and fails if one never happened: each of the FOLD fold steps,
// full-rate and gapped sample arrival, and the event decision itself. For
// the decision, T is compared with a threshold (half the smallest R-peak T);
// as in the usual scoring, a crossing within 50 ms of a beat is a true
// detection and any other crossing a false alarm. All beats must be
// detected with no false alarm.
module tb_cardiac_event_detector;
  import detector_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned IN_W = 8;
  localparam int unsigned FOLD = 6;
  localparam int unsigned TW = t_width(IN_W);
  localparam int NBEATS = 12;
  localparam int NSAMP = BEAT_FIRST + NBEATS * BEAT_RR;

  logic clk = 0, rst_n = 0, x_valid = 0;
  logic signed [IN_W-1:0] x = '0;
  logic t_valid;
  logic signed [TW-1:0] t;
  int checks = 0, failures = 0;
  longint cycle = 0;
  longint exp_t [$];
  longint exp_c [$];
  longint t_of_sample [NSAMP];
  int results = 0;
  int full_rate = 0, gapped = 0;
  int step_seen [FOLD];

  cardiac_event_detector dut (.clk, .rst_n, .x_valid, .x, .t_valid, .t);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (NSAMP * (FOLD + 3) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // fold step coverage
  always @(posedge clk)
    if (rst_n && dut.u_glrt.active) step_seen[dut.u_glrt.step]++;

  // scoreboard
  always @(posedge clk) begin
    if (rst_n && t_valid) begin
      checks++;
      if (exp_t.size() == 0) begin
        failures++; $display("unexpected t_valid at cycle %0d", cycle);
      end else begin
        longint wt, wc;
        wt = exp_t.pop_front();
        wc = exp_c.pop_front();
        if (longint'(t) != wt || cycle != wc) begin
          failures++;
          if (failures < 20)
            $display("result %0d: t = %0d at cycle %0d, want %0d at %0d", results, t, cycle, wt, wc);
        end
        t_of_sample[results] = longint'(t);
      end
      results++;
    end
  end

  initial begin
    longint hist [HIST];
    poly_t h [NY];
    yvec_t yv;
    longint thr, min_peak, maxnoise;
    int detected, false_alarms;
    for (int i = 0; i < NY; i++) h[i] = response(i);
    foreach (hist[i]) hist[i] = 0;
    foreach (step_seen[i]) step_seen[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NSAMP; n++) begin
      int v, gap;
      @(negedge clk);
      v = ecg_sample(n);
      for (int k = HIST - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = longint'(v);
      for (int i = 0; i < NY; i++) yv[i] = conv(h[i], hist);
      exp_t.push_back(glrt(yv));
      exp_c.push_back(cycle + FOLD + 2);
      x = IN_W'(v);
      x_valid = 1;
      @(negedge clk);
      x_valid = 0;
      x = IN_W'($urandom);
      gap = (n % 7 == 3) ? $urandom_range(1, 5) : 0;
      if (gap == 0) full_rate++; else gapped++;
      repeat (FOLD - 1 + gap) @(negedge clk);
    end
    repeat (FOLD + 4) @(negedge clk);

    checks++;
    if (results != NSAMP) begin failures++; $display("%0d results for %0d samples", results, NSAMP); end

    // event decision. T is centred on the R peak with the filterbank delay
    // of 13 samples, which the annotation window allows for.
    min_peak = -1;
    for (int k = 0; k < NBEATS; k++) begin
      longint pk;
      pk = 0;
      for (int n = beat_pos(k) + 13 - 50; n <= beat_pos(k) + 13 + 50; n++)
        if (n >= 0 && n < NSAMP && t_of_sample[n] > pk) pk = t_of_sample[n];
      if (min_peak < 0 || pk < min_peak) min_peak = pk;
    end
    thr = min_peak / 2;
    detected = 0; false_alarms = 0; maxnoise = 0;
    for (int k = 0; k < NBEATS; k++) begin
      bit hit;
      hit = 0;
      for (int n = beat_pos(k) + 13 - 50; n <= beat_pos(k) + 13 + 50; n++)
        if (n < NSAMP && t_of_sample[n] > thr) hit = 1;
      if (hit) detected++;
    end
    for (int n = 1; n < NSAMP; n++) begin
      bit near;
      near = 0;
      for (int k = 0; k < NBEATS; k++)
        if (n >= beat_pos(k) + 13 - 50 && n <= beat_pos(k) + 13 + 50) near = 1;
      if (!near) begin
        if (t_of_sample[n] > maxnoise) maxnoise = t_of_sample[n];
        if (t_of_sample[n] > thr && t_of_sample[n-1] <= thr) false_alarms++;
      end
    end
    $display("beats %0d detected %0d false alarms %0d (threshold %0d, largest T off-beat %0d)",
             NBEATS, detected, false_alarms, thr, maxnoise);
    checks += 2;
    if (detected != NBEATS) failures++;
    if (false_alarms != 0) failures++;

    $display("samples: %0d at full rate, %0d after a gap", full_rate, gapped);
    checks += 2;
    if (full_rate == 0) begin failures++; $display("no full-rate sample"); end
    if (gapped == 0) begin failures++; $display("no gapped sample"); end
    for (int s = 0; s < int'(FOLD); s++) begin
      $display("fold step %0d used %0d times", s, step_seen[s]);
      checks++;
      if (step_seen[s] != NSAMP) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
