// column_multiplier (CM): the constant-coefficient part of the GLRT.
//
// Column i of the integer matrix (H^T H)^-1 has three non-zero entries, in
// the rows of the 3x3 block that holds i. When load is high the block forms,
// all at once, the 18 products p[i][t] = c(tap_row(i,t), i) * y[tap_row(i,t)]
// and registers them together with y. The coefficients are small integers, so
// each product is a few shifts and adds (no multiplier). The registers hold
// their value until the next load, i.e. for the several cycles the folding
// unit needs to work through all columns. Keeping this block unfolded
// follows the design; registering its outputs at load is this design's
// choice of where the hold registers sit.
//
// Timing: products and held y appear the cycle after load.
module column_multiplier
  import detector_pkg::*;
#(
  parameter int unsigned IN_W = 8,
  localparam int unsigned YW  = y_width(IN_W),
  localparam int unsigned SW  = s_width(IN_W)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic signed [YW-1:0] y      [N_Y],
  output logic signed [SW-1:0] p      [N_Y][N_TAPS],
  output logic signed [YW-1:0] y_hold [N_Y]
);

  // Multiply by a small integer constant with shifts and adds.
  function automatic logic signed [SW-1:0] shift_add(logic signed [YW-1:0] v, int c);
    logic signed [SW-1:0] acc;
    int unsigned mag;
    acc = '0;
    mag = (c < 0) ? -c : c;
    for (int b = 0; b < 4; b++)
      if (mag[b]) acc += SW'(v) <<< b;
    return (c < 0) ? -acc : acc;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N_Y); i++) begin
        y_hold[i] <= '0;
        for (int t = 0; t < int'(N_TAPS); t++) p[i][t] <= '0;
      end
    end else if (load) begin
      for (int i = 0; i < int'(N_Y); i++) begin
        y_hold[i] <= y[i];
        for (int t = 0; t < int'(N_TAPS); t++)
          p[i][t] <= shift_add(y[tap_row(i, t)], C_INT[tap_row(i, t)][i]);
      end
    end
  end

endmodule
