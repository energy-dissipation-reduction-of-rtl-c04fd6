// wavelet_scale: one scale (branch) of the undecimated Mallat wavelet
// filterbank.
//
// For scale factor Q the branch applies, per sample,
//   low-pass   F(z)  = 1 + 3 z^-d + 3 z^-2d + z^-3d,  d = Q - 1
//                      (third-order binomial, dilated to the scale)
//   biphasic   G_b(z) = -1 + z^-Q           applied to the low-pass output
//   monophasic G_b(z) applied once more      to the biphasic output
// The low-pass output also feeds the next branch of the cascade. The two
// band-pass outputs then pass through extra delays (DB, DM samples) that
// centre every output of the filterbank on the longest one. The low-pass
// pairs its symmetric taps and forms the factor 3 as shift-add (2b + b), so a
// branch uses six adders: four for F, one for each G_b. Filter equations, the G_b difference and
// the centring delays follow the design; building the monophasic output by a
// second G_b and the exact centring rule are this implementation's reading.
//
// Interface: lp_in is accepted on every cycle with en high (one sample);
// lp_out, bi_out and mono_out are combinational in the current sample and
// the stored history, and are meant to be sampled in the same cycle. Widths
// grow at full precision: lp_out has 3 more bits than lp_in, bi_out 4 more,
// mono_out 5 more.
module wavelet_scale #(
  parameter int unsigned IN_W = 8,   // width of lp_in
  parameter int unsigned Q    = 2,   // scale factor
  parameter int unsigned DB   = 0,   // centring delay of the biphasic output
  parameter int unsigned DM   = 0    // centring delay of the monophasic output
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic signed [IN_W-1:0] lp_in,
  output logic signed [IN_W+2:0] lp_out,
  output logic signed [IN_W+3:0] bi_out,
  output logic signed [IN_W+4:0] mono_out
);

  localparam int unsigned D   = Q - 1;
  localparam int unsigned LW  = IN_W + 3;
  localparam int unsigned BW  = IN_W + 4;
  localparam int unsigned MW  = IN_W + 5;

  // Low-pass F(z)
  logic signed [IN_W-1:0] x_taps [3*D+1];
  sample_delay #(.W(IN_W), .DEPTH(3*D)) u_lp_line (
    .clk, .rst_n, .en, .din(lp_in), .taps(x_taps)
  );

  // Symmetric taps are paired first: F = (x0 + x3d) + 3 (xd + x2d), with the
  // factor 3 as 2b + b, which takes four adders per branch.
  logic signed [LW-1:0] outer, inner;
  always_comb begin
    outer  = LW'(x_taps[0]) + LW'(x_taps[3*D]);
    inner  = LW'(x_taps[D]) + LW'(x_taps[2*D]);
    lp_out = outer + (inner <<< 1) + inner;
  end

  // Biphasic G_b(z) = -1 + z^-Q on the low-pass output
  logic signed [LW-1:0] lp_taps [Q+1];
  sample_delay #(.W(LW), .DEPTH(Q)) u_bi_line (
    .clk, .rst_n, .en, .din(lp_out), .taps(lp_taps)
  );
  logic signed [BW-1:0] bi_raw;
  assign bi_raw = BW'(lp_taps[Q]) - BW'(lp_taps[0]);

  // Monophasic: G_b(z) applied again
  logic signed [BW-1:0] bi_taps [Q+1];
  sample_delay #(.W(BW), .DEPTH(Q)) u_mono_line (
    .clk, .rst_n, .en, .din(bi_raw), .taps(bi_taps)
  );
  logic signed [MW-1:0] mono_raw;
  assign mono_raw = MW'(bi_taps[Q]) - MW'(bi_taps[0]);

  // Centring delays
  logic signed [BW-1:0] bi_c [DB+1];
  logic signed [MW-1:0] mono_c [DM+1];
  sample_delay #(.W(BW), .DEPTH(DB)) u_bi_centre (
    .clk, .rst_n, .en, .din(bi_raw), .taps(bi_c)
  );
  sample_delay #(.W(MW), .DEPTH(DM)) u_mono_centre (
    .clk, .rst_n, .en, .din(mono_raw), .taps(mono_c)
  );

  assign bi_out   = bi_c[DB];
  assign mono_out = mono_c[DM];

endmodule
