// wavelet_filterbank: three-scale undecimated wavelet filterbank (Mallat's
// algorithm) in front of the GLRT.
//
// Three wavelet_scale branches with q = 2, 3, 4 are cascaded: each branch's
// binomial low-pass output is the next branch's input, so the low-pass
// responses multiply and the scale grows from branch to branch. Every branch
// yields a biphasic and a monophasic band-pass output; centring delays from
// detector_pkg::centre_delay line all six up on the longest response (the
// monophasic output of q = 4). Output order: y[0..2] biphasic q = 2, 3, 4,
// y[3..5] monophasic q = 2, 3, 4, all sign-extended to YW bits.
//
// Timing: one input sample x is taken in each cycle with x_valid high. The
// six outputs for that sample are registered and appear one cycle later with
// y_valid high; they then hold until the next sample. The filterbank is not
// folded (the design keeps it parallel); it runs on the GLRT clock with
// x_valid acting as the sample-rate clock enable, this design's stand-in for
// the slower filterbank clock.
module wavelet_filterbank
  import detector_pkg::*;
#(
  parameter int unsigned IN_W = 8,
  localparam int unsigned YW  = y_width(IN_W)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   x_valid,
  input  logic signed [IN_W-1:0] x,
  output logic                   y_valid,
  output logic signed [YW-1:0]   y [N_Y]
);

  localparam int unsigned W0 = IN_W;
  localparam int unsigned W1 = IN_W + 3;
  localparam int unsigned W2 = IN_W + 6;

  logic signed [W1-1:0]   lp0;
  logic signed [W2-1:0]   lp1;
  logic signed [W2+2:0]   lp2;
  logic signed [W0+3:0]   b0;
  logic signed [W1+3:0]   b1;
  logic signed [W2+3:0]   b2;
  logic signed [W0+4:0]   m0;
  logic signed [W1+4:0]   m1;
  logic signed [W2+4:0]   m2;

  wavelet_scale #(.IN_W(W0), .Q(scale_q(0)),
                  .DB(centre_delay(0, 1'b0)), .DM(centre_delay(0, 1'b1))) u_scale0 (
    .clk, .rst_n, .en(x_valid), .lp_in(x), .lp_out(lp0), .bi_out(b0), .mono_out(m0)
  );
  wavelet_scale #(.IN_W(W1), .Q(scale_q(1)),
                  .DB(centre_delay(1, 1'b0)), .DM(centre_delay(1, 1'b1))) u_scale1 (
    .clk, .rst_n, .en(x_valid), .lp_in(lp0), .lp_out(lp1), .bi_out(b1), .mono_out(m1)
  );
  wavelet_scale #(.IN_W(W2), .Q(scale_q(2)),
                  .DB(centre_delay(2, 1'b0)), .DM(centre_delay(2, 1'b1))) u_scale2 (
    .clk, .rst_n, .en(x_valid), .lp_in(lp1), .lp_out(lp2), .bi_out(b2), .mono_out(m2)
  );

  // The last low-pass output has no consumer; a further scale would take it.
  logic unused_lp;
  assign unused_lp = ^lp2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      for (int i = 0; i < int'(N_Y); i++) y[i] <= '0;
    end else begin
      y_valid <= x_valid;
      if (x_valid) begin
        y[0] <= YW'(b0);
        y[1] <= YW'(b1);
        y[2] <= YW'(b2);
        y[3] <= YW'(m0);
        y[4] <= YW'(m1);
        y[5] <= YW'(m2);
      end
    end
  end

endmodule
