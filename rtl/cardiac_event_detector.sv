// cardiac_event_detector: wavelet-based R-wave (QRS) detector for a
// pacemaker, with a folded GLRT.
//
// The digitised electrogram x(n) enters a three-scale wavelet filterbank
// (q = 2, 3, 4) giving three biphasic and three monophasic band-pass
// outputs. A generalized likelihood ratio test combines them into the
// decision signal T(n) = y^T (H^T H)^-1 y, which is large where the signal
// looks like a cardiac event. The filterbank is parallel; the GLRT is folded
// by FOLD (default 6), so it reuses one multiplier over six cycles and the
// clock must run FOLD times faster than the sample rate (6 kHz for 1 kHz
// samples). Comparing T(n) with a threshold is left to the user of T.
//
// Interface: present one sample x with x_valid high for one cycle, at most
// once every FOLD cycles. T for that sample appears with t_valid high
// FOLD + 2 cycles later and holds until the next result. Reset is
// asynchronous and active low and clears every filter history to zero
// (this design's choice).
module cardiac_event_detector
  import detector_pkg::*;
#(
  parameter int unsigned IN_W = 8,
  parameter int unsigned FOLD = 6,
  localparam int unsigned TW  = t_width(IN_W)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   x_valid,
  input  logic signed [IN_W-1:0] x,
  output logic                   t_valid,
  output logic signed [TW-1:0]   t
);

  localparam int unsigned YW = y_width(IN_W);

  logic                 y_valid;
  logic signed [YW-1:0] y [N_Y];

  wavelet_filterbank #(.IN_W(IN_W)) u_filterbank (
    .clk, .rst_n, .x_valid, .x, .y_valid, .y
  );

  glrt_folded #(.IN_W(IN_W), .FOLD(FOLD)) u_glrt (
    .clk, .rst_n, .y_valid, .y, .t_valid, .t
  );

endmodule
