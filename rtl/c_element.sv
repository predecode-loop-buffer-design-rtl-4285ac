// Muller C-element with reset.
//
// The state-holding element of the asynchronous pipeline: the output goes to
// 1 when both inputs are 1, to 0 when both are 0, and keeps its value while
// the inputs differ. The reset is active low and gates both inputs, as in
// the gate-level form with reset: while rst_n is 0 the output is 0.
//
// It is written as a level-sensitive latch enabled while a equals b; the
// latch the tools report is this element's intended storage, not a coding
// slip. There is no clock: z follows the inputs after the gate delay.
module c_element (
  input  logic a,
  input  logic b,
  input  logic rst_n,
  output logic z
);
  always_latch begin
    if (!rst_n)      z = 1'b0;
    else if (a == b) z = a;
  end
endmodule
