// folding_unit: the time-multiplexed part of the GLRT.
//
// T(n) = y^T C y = sum over columns i of y_i * s_i, with s_i = sum_t p[i][t]
// the column sums of the held products from the column multiplier. The unit
// has LANES = 6 / FOLD lanes, each with two adders for s_i and one generic
// multiplier for y_i * s_i. In step k of a pass, lane m handles column
// i = k * LANES + m, picked out of the held operands by multiplexers under
// the controller's step number. The lane results are added and accumulated
// over the FOLD steps; at the last step the sum is written to t and t_valid
// pulses for one cycle. FOLD = 6 (one multiplier) and FOLD = 3 (two) are the
// folded versions of the design, FOLD = 1 is the parallel one. The column
// order of the steps and the single accumulator are this design's choices.
//
// Timing: t/t_valid appear the cycle after the last step and t holds until
// the next result.
module folding_unit
  import detector_pkg::*;
#(
  parameter int unsigned IN_W = 8,
  parameter int unsigned FOLD = 6,
  localparam int unsigned YW    = y_width(IN_W),
  localparam int unsigned SW    = s_width(IN_W),
  localparam int unsigned TW    = t_width(IN_W),
  localparam int unsigned LANES = N_Y / FOLD,
  localparam int unsigned SBW   = (FOLD > 1) ? $clog2(FOLD) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [SW-1:0] p      [N_Y][N_TAPS],
  input  logic signed [YW-1:0] y_hold [N_Y],
  input  logic                 active,
  input  logic [SBW-1:0]       step,
  input  logic                 first,
  input  logic                 last,
  output logic                 t_valid,
  output logic signed [TW-1:0] t
);

  initial begin
    assert (N_Y % FOLD == 0) else $fatal(1, "FOLD must divide %0d", N_Y);
  end

  logic signed [TW-1:0] acc;
  logic signed [TW-1:0] step_sum;
  logic signed [TW-1:0] acc_next;

  always_comb begin
    logic signed [SW-1:0] s;
    logic signed [YW-1:0] yi;
    int unsigned col;
    step_sum = '0;
    for (int unsigned m = 0; m < LANES; m++) begin
      col = int'(step) * LANES + m;
      s   = '0;
      yi  = '0;
      // multiplexers: route column col's operands to lane m
      for (int unsigned i = 0; i < N_Y; i++) begin
        if (i == col) begin
          s  = p[i][0] + p[i][1] + p[i][2];
          yi = y_hold[i];
        end
      end
      step_sum += TW'(yi) * TW'(s);
    end
    // with FOLD = 1 every step is the first, and the accumulator adder drops out
    acc_next = (FOLD == 1 || first) ? step_sum : acc + step_sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      t       <= '0;
      t_valid <= 1'b0;
    end else begin
      t_valid <= active && last;
      if (active) acc <= acc_next;
      if (active && last) t <= acc_next;
    end
  end

endmodule
