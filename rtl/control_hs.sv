// control_hs: control box of the high-speed ROM ("feet" option). The ROM is
// split into two precharge half-buffers, DECODE and ROM, linked by the Decode
// channel whose acknowledge is x^e:
//   DECODE: *[[In^v & Decode^v]; In^e-; [~x^e]; decodep_-;
//             [~In^v & ~Decode^v]; In^e+; [x^e]; decodep_+]
//   ROM:    *[[Decode^v & Out^v]; x^e-; [~Out^e]; romp_-;
//             [~Decode^v & ~Out^v]; x^e+; [Out^e]; romp_+]
// which needs just four two-input C-elements:
//   In^e     = ~C(In^v, Decode^v)      x^e   = ~C(Decode^v, Out^v)
//   decodep_ =  C(In^e, x^e)           romp_ =  C(x^e, Out^e)
// The split adds one place of slack: In^e can return high, and the next input
// arrive, while the ROM half still holds the previous output. Because
// romp_ may fall while a word line is still high, the ROM array needs its
// foot (bigromp).
// Inputs: the completion signals In^v, Decode^v, Out^v and the combined output
// enable Out^e. Outputs: In^e (shared enable of all input channels), x^e,
// decodep_, romp_ (both active-low precharge). rst_n (active low, this
// design's addition) holds decodep_ and romp_ low, so both planes precharge,
// and both enables high. No clock.
// The feedback between the C-elements is reported as circular logic by lint;
// the loops are the handshake itself and stand.
module control_hs (
  input  logic rst_n,
  input  logic in_v,
  input  logic dec_v,
  input  logic out_v,
  input  logic out_e,
  output logic in_e,
  output logic x_e,
  output logic decodep_,
  output logic romp_
);

  logic c_in, c_x;

  c_element #(.N(2), .RST_VAL(1'b0)) u_cin (.rst_n(rst_n), .in({in_v, dec_v}), .out(c_in));
  c_element #(.N(2), .RST_VAL(1'b0)) u_cx  (.rst_n(rst_n), .in({dec_v, out_v}), .out(c_x));

  assign in_e = ~c_in;
  assign x_e  = ~c_x;

  c_element #(.N(2), .RST_VAL(1'b0)) u_cdp (.rst_n(rst_n), .in({in_e, x_e}),  .out(decodep_));
  c_element #(.N(2), .RST_VAL(1'b0)) u_crp (.rst_n(rst_n), .in({x_e, out_e}), .out(romp_));

endmodule
