// sample_delay: tapped delay line that advances once per sample.
//
// taps[0] is the input itself and taps[k] the input k samples ago, where a
// sample is a clock cycle with en high. DEPTH = 0 gives a plain wire. The
// registers clear on reset, so the line starts as if fed zeros. Used for the
// z^-k terms of the filterbank and for its centring delays.
module sample_delay #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] taps [DEPTH+1]
);

  assign taps[0] = din;

  if (DEPTH > 0) begin : g_regs
    logic signed [W-1:0] regs [DEPTH];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int k = 0; k < int'(DEPTH); k++) regs[k] <= '0;
      end else if (en) begin
        regs[0] <= din;
        for (int k = 1; k < int'(DEPTH); k++) regs[k] <= regs[k-1];
      end
    end
    for (genvar k = 1; k <= DEPTH; k++) begin : g_tap
      assign taps[k] = regs[k-1];
    end
  end

endmodule
