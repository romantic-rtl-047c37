// pchb_buffer: one-place precharge half-buffer (PCHB) for a 1-of-N channel,
// the stage *[L?x; R!x] with the reshuffling
//   *[[R^e]; [L^k -> R^k+]; L^e-; [~R^e]; R^k-; [~L^v]; L^e+]
//
// Channels are four-phase with an active-high enable (the inverted
// acknowledge): the sender raises one rail while the receiver's enable is high,
// the receiver lowers its enable, the sender returns to all-rails-low, the
// receiver raises its enable again. Production rules:
//   R^k set   by  en & R^e & L^k       R^k clear by ~en & ~R^e
//   (all rails in one block: while the set guard holds, R = L)
//   en = L^e = ~C(L^v, R^v)            with L^v = OR(L), R^v = OR(R)
// Output rails are state-holding (latches standing for keeper circuits).
// No clock; rst_n (active low, this design's own addition) clears the output
// rails and raises L^e. The design uses it on every input and output channel
// of the ROM, the environment the ROM's performance figures assume.
// The output rails are latches, and Verilator reports the loop through the
// C-element and the rails as circular logic; both are inherent in a
// handshake circuit that holds its own state, and stand.
module pchb_buffer #(
  parameter int N = 2
) (
  input  logic         rst_n,
  input  logic [N-1:0] l_d,
  output logic         l_e,
  output logic [N-1:0] r_d,
  input  logic         r_e
);

  logic l_v, r_v, lr_c;

  assign l_v = |l_d;
  assign r_v = |r_d;

  c_element #(.N(2), .RST_VAL(1'b0)) u_c (.rst_n(rst_n), .in({l_v, r_v}), .out(lr_c));
  assign l_e = ~lr_c;

  // Each output rail is a state-holding node; l_d is 1-of-N, so copying it
  // while the set guard holds raises exactly the matching rail.
  always_latch begin
    if (!rst_n)                    r_d = '0;
    else if (!l_e && !r_e)         r_d = '0;
    else if (l_e && r_e && |l_d)   r_d = l_d;
  end

endmodule
