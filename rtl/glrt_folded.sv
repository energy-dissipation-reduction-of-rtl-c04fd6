// glrt_folded: folded generalized likelihood ratio test.
//
// Computes the decision signal T(n) = y^T (H^T H)^-1 y from the six
// filterbank outputs, with the matrix entries rounded to integers. The
// column multiplier forms all constant products at once when y_valid
// arrives, and holds them; the controller then runs the folding unit for
// FOLD cycles, which shares 6 / FOLD generic multipliers among the six
// columns and accumulates the result. FOLD defaults to 6, the most folded
// version; 3 and 1 (parallel) are also supported.
//
// Timing: y_valid in cycle c -> t_valid in cycle c + FOLD + 1. A new y_valid
// may come every FOLD cycles, so the GLRT clock must be FOLD times the
// sample rate.
module glrt_folded
  import detector_pkg::*;
#(
  parameter int unsigned IN_W = 8,
  parameter int unsigned FOLD = 6,
  localparam int unsigned YW  = y_width(IN_W),
  localparam int unsigned TW  = t_width(IN_W)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 y_valid,
  input  logic signed [YW-1:0] y [N_Y],
  output logic                 t_valid,
  output logic signed [TW-1:0] t
);

  localparam int unsigned SW  = s_width(IN_W);
  localparam int unsigned SBW = (FOLD > 1) ? $clog2(FOLD) : 1;

  logic signed [SW-1:0] p      [N_Y][N_TAPS];
  logic signed [YW-1:0] y_hold [N_Y];
  logic                 active, first, last;
  logic [SBW-1:0]       step;

  column_multiplier #(.IN_W(IN_W)) u_cm (
    .clk, .rst_n, .load(y_valid), .y, .p, .y_hold
  );

  fold_controller #(.FOLD(FOLD)) u_ctrl (
    .clk, .rst_n, .start(y_valid), .active, .step, .first, .last
  );

  folding_unit #(.IN_W(IN_W), .FOLD(FOLD)) u_fold (
    .clk, .rst_n, .p, .y_hold, .active, .step, .first, .last, .t_valid, .t
  );

endmodule
