// c_element: N-input Muller C-element, the state-holding gate of every
// completion tree and of the control boxes.
//
// The output rises once all inputs are high, falls once all are low and keeps
// its value while the inputs disagree (in silicon a staticizer holds it). It is
// written as a level-sensitive latch, so there is no clock and no timing: the
// output follows the inputs in zero time. rst_n (active low, asynchronous)
// forces the output to RST_VAL; the reset is this design's own addition, since
// a QDI circuit needs a defined start state.
// Synthesis sees the held output as a latch, which is what it is.
module c_element #(
  parameter int   N       = 2,
  parameter logic RST_VAL = 1'b0
) (
  input  logic         rst_n,
  input  logic [N-1:0] in,
  output logic         out
);

  always_latch begin
    if (!rst_n)       out = RST_VAL;
    else if (&in)     out = 1'b1;
    else if (~|in)    out = 1'b0;
  end

endmodule
