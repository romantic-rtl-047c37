// control_le: control box of the low-energy ROM ("nofeet" option). One
// sequential process drives the input enable and both precharge signals:
//   *[[In^v & Decode^v & Out^v & ~Out^e]; In^e-; [~In^v]; decodep_-;
//     [~Decode^v]; romp_-; [~Out^v & Out^e]; decodep_+; romp_+; In^e+]
// Because romp_ falls only after every word line is low, and decodep_ rises
// only while the inputs are held neutral, the ROM array needs no foot.
//
// The three outputs are state-holding; each gets a set and a clear guard
// (production rules). The code (In^e, decodep_, romp_) = (0,1,1) occurs twice in
// the cycle; the guards tell the two apart by Out^v, which is still high the
// first time and already low the second:
//   In^e-     : decodep_ & romp_ & In^v & Decode^v & Out^v & ~Out^e
//   decodep_- : ~In^e & ~In^v & Out^v & romp_
//   romp_-    : ~decodep_ & ~Decode^v
//   decodep_+ : ~romp_ & ~Out^v & Out^e
//   romp_+    : decodep_
//   In^e+     : decodep_ & romp_ & ~Out^v & ~Decode^v
// The state encoding and guards are this design's own derivation of the
// sequence above. rst_n (active low, this design's addition) puts the box in
// the state after romp_- (all three low), from which it brings decodep_,
// romp_ and In^e up in order once reset is released. No clock.
// The three nodes are latches that read each other, which Verilator reports as
// circular logic; that is how the sequencer holds its state, and it stands.
module control_le (
  input  logic rst_n,
  input  logic in_v,
  input  logic dec_v,
  input  logic out_v,
  input  logic out_e,
  output logic in_e,
  output logic decodep_,
  output logic romp_
);

  always_latch begin
    if (!rst_n)                                               in_e = 1'b0;
    else if (decodep_ && romp_ && in_v && dec_v && out_v && !out_e) in_e = 1'b0;
    else if (decodep_ && romp_ && !out_v && !dec_v)           in_e = 1'b1;
  end

  always_latch begin
    if (!rst_n)                                     decodep_ = 1'b0;
    else if (!in_e && !in_v && out_v && romp_)      decodep_ = 1'b0;
    else if (!romp_ && !out_v && out_e)             decodep_ = 1'b1;
  end

  always_latch begin
    if (!rst_n)                       romp_ = 1'b0;
    else if (!decodep_ && !dec_v)     romp_ = 1'b0;
    else if (decodep_)                romp_ = 1'b1;
  end

endmodule
