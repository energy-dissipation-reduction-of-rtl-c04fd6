// fold_controller: sequencer of the folded GLRT.
//
// A start pulse (a new set of filterbank outputs being loaded into the
// column multiplier) launches a pass of FOLD cycles. In each cycle of the
// pass the controller gives the folding unit the step number, which selects
// the columns its multiplexers route to the shared multipliers, and flags the
// first and the last step, which clear and close the accumulation. A start
// that arrives in the last step of a pass begins the next pass right after
// it, so one sample is processed every FOLD cycles; this is the throughput
// the design obtains by clocking the GLRT FOLD times faster than the sample
// rate. A start earlier than that is a protocol error and is asserted
// against. The two-state FSM and step counter are this design's own; the
// document only says that a controller drives the multiplexers.
//
// Timing: start in cycle c -> steps 0..FOLD-1 in cycles c+1..c+FOLD.
module fold_controller #(
  parameter int unsigned FOLD = 6,
  localparam int unsigned SBW = (FOLD > 1) ? $clog2(FOLD) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           active,
  output logic [SBW-1:0] step,
  output logic           first,
  output logic           last
);

  typedef enum logic {IDLE, RUN} state_t;
  state_t state;

  assign active = (state == RUN);
  assign first  = active && (step == '0);
  assign last   = active && (step == SBW'(FOLD - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      step  <= '0;
    end else begin
      if (start) begin
        state <= RUN;
        step  <= '0;
      end else if (last) begin
        state <= IDLE;
        step  <= '0;
      end else if (active) begin
        step <= step + 1'b1;
      end
    end
  end

  // A new sample may only be loaded when no pass is running or in its last step.
  a_start_rate: assert property (@(posedge clk) disable iff (!rst_n)
                                 start |-> (!active || last))
    else $error("fold_controller: sample arrived faster than one per %0d cycles", FOLD);

endmodule
