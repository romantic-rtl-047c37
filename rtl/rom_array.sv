// rom_array: the precharged ROM plane. Each output channel j has one bit line
// per rail v; the bit line is pulled down by a transistor at every row whose
// table entry for channel j is v, and an inverter turns the bit line into the
// output rail. The block also builds Out^v.
//
// Operation: romp_ low precharges every bit line (all output rails low); with
// romp_ high, the one word line that is high pulls its bit lines down and the
// selected rails rise. Every node holds its value otherwise (staticizers in
// the circuit, latches here).
//
// FEET = 1 (high-speed ROM): the pulldowns go to a single virtual ground
// bigromp = ~romp_ that acts as the foot, so a word line that is still high
// during precharge does no harm, and ~bigromp is one more input of the Out^v
// C-tree so that the rise of bigromp is acknowledged.
// FEET = 0 (low-energy ROM): the pulldowns go to ground; the control box must
// keep every word line low while romp_ is low, which the assertion below
// checks, and Out^v is the C-tree of the channel validities only.
//
// Out^v = C( OR(rails of channel 0), ..., OR(rails of channel N_OUT-1)
//            [, ~bigromp] ), with OR fan-in or_fanin(MP,MN) and C fan-in
// c_fanin(MP,MN). rst_n (this design's addition) clears the rails. No clock.
// The output rails appear as latches after synthesis (the keepers).
module rom_array
  import romantic_pkg::*;
#(
  parameter bit FEET  = 1'b1,
  parameter int N_OUT = EX_N_OUT,
  parameter int ROWS  = EX_ROWS,
  parameter int MAXW  = MAX_RAILS,
  parameter logic [0:N_OUT-1][3:0] OUT_W = EX_OUT_W,
  parameter logic [0:ROWS-1][0:N_OUT-1][3:0] OUT_VAL = EX_OUT_VAL,
  parameter int MP = SERIES_P,
  parameter int MN = SERIES_N
) (
  input  logic                       rst_n,
  input  logic                       romp_,
  input  logic [ROWS-1:0]            dec,
  output logic [N_OUT-1:0][MAXW-1:0] out_d,
  output logic                       bigromp,
  output logic                       out_v
);

  localparam int VTERMS = FEET ? N_OUT + 1 : N_OUT;

  logic [N_OUT-1:0][MAXW-1:0] pull;
  logic [VTERMS-1:0]          v_terms;

  assign bigromp = ~romp_;

  // pull[j][v]: some selected row stores value v in channel j
  always_comb begin
    pull = '0;
    for (int r = 0; r < ROWS; r++)
      for (int j = 0; j < N_OUT; j++)
        for (int v = 0; v < MAXW; v++)
          if (int'(OUT_VAL[r][j]) == v && v < int'(OUT_W[j]) && dec[r])
            pull[j][v] = 1'b1;
  end

  for (genvar j = 0; j < N_OUT; j++) begin : g_ch
    for (genvar v = 0; v < MAXW; v++) begin : g_rail
      always_latch begin
        if (!rst_n || bigromp)  out_d[j][v] = 1'b0;   // precharge
        else if (pull[j][v]) out_d[j][v] = 1'b1;  // evaluate
      end
    end
    localparam int W = int'(OUT_W[j]);
    if (W < 1 || W > MAXW) begin : g_bad
      $error("rom_array: output channel width out of range 1..MAXW");
    end
    or_tree #(.N(W), .FANIN(or_fanin(MP, MN))) u_chv (.in(out_d[j][W-1:0]), .out(v_terms[j]));
  end

  if (FEET) begin : g_foot
    assign v_terms[N_OUT] = ~bigromp;
  end else begin : g_nofoot
    // Without a foot, a word line high during precharge would fight the
    // precharge transistors.
    always_comb begin
      if (rst_n) assert (!(bigromp && (|dec)))
        else $error("rom_array: word line high while the footless array precharges");
    end
  end

  c_tree #(.N(VTERMS), .FANIN(c_fanin(MP, MN)), .RST_VAL(1'b0)) u_ov (
    .rst_n(rst_n), .in(v_terms), .out(out_v));

endmodule
