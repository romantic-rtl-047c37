// romantic_rom: quasi delay-insensitive read-only memory generated from a
// value table. It receives one token on each of N_IN 1-of-n input channels,
// looks the combination up, and sends one token on each of N_OUT 1-of-n output
// channels. All channels are four-phase with active-high enables.
//
// Structure: the input channels feed a precharged address decoder that raises
// one of ROWS word lines (the 1-of-ROWS Decode channel); the word line
// discharges the bit lines of the ROM array whose inverters drive the output
// rails. Completion trees give In^v (C-tree over the per-channel ORs of the
// inputs), Decode^v (OR tree of the word lines), Out^v (from the ROM array)
// and Out^e (C-tree of the individual output enables). A control box sequences
// the shared input enable In^e and the precharge signals decodep_ and romp_.
//
// FEET = 1 selects the high-speed ROM (two half-buffer controllers, ROM array
// with virtual-ground foot); FEET = 0 the low-energy ROM (one sequential
// controller, footless array). The datapath is the same in both.
//
// The table: input digit F means don't care (the channel is still
// handshaken, its value unused). Every legal input must match exactly one row;
// one that matches none stalls the ROM. Digits and widths are 4 bits (see
// romantic_pkg); MAXW is the rail count of each channel port, rails at or above
// a channel's width are unused (inputs ignored, outputs low).
// The localparam CYCLE_EST holds the estimated cycle time in transitions for
// the chosen control variant and table size.
// rst_n: active low, asynchronous, this design's addition; hold the input
// channels neutral and the output enables high during reset. No clock and no
// timing: the model settles in zero time and takes its pace from the
// environment.
// The control loops close through the datapath (Out^v, Decode^v, decodep_),
// which Verilator reports as circular logic; in a QDI circuit those loops are
// the handshakes, and they stand. Keepers appear as latches after synthesis.
// bigromp and the high-speed Decode enable x_e are brought to named nets that
// nothing here reads, so that they can be probed; lint lists them as unused.
module romantic_rom
  import romantic_pkg::*;
#(
  parameter bit FEET  = 1'b1,
  parameter int N_IN  = EX_N_IN,
  parameter int N_OUT = EX_N_OUT,
  parameter int ROWS  = EX_ROWS,
  parameter int MAXW  = MAX_RAILS,
  parameter logic [0:N_IN-1][3:0]  IN_W  = EX_IN_W,
  parameter logic [0:N_OUT-1][3:0] OUT_W = EX_OUT_W,
  parameter logic [0:ROWS-1][0:N_IN-1][3:0]  IN_VAL  = EX_IN_VAL,
  parameter logic [0:ROWS-1][0:N_OUT-1][3:0] OUT_VAL = EX_OUT_VAL,
  parameter int MP = SERIES_P,
  parameter int MN = SERIES_N
) (
  input  logic                       rst_n,
  input  logic [N_IN-1:0][MAXW-1:0]  in_d,
  output logic                       in_e,
  output logic [N_OUT-1:0][MAXW-1:0] out_d,
  input  logic [N_OUT-1:0]           out_e
);

  logic [N_IN-1:0][MAXW-1:0] in_used;
  logic [N_IN-1:0]           in_ch_v;
  logic                      in_v, dec_v, out_v, out_e_all;
  logic                      decodep_, romp_, bigromp;
  logic [ROWS-1:0]           dec;

  // First-order cycle-time estimate in CMOS transitions, from the depths of
  // the four completion trees (see romantic_pkg); the trees below are built
  // with exactly these depths.
  function automatic int max_in_depth();
    int d = 0;
    for (int i = 0; i < N_IN; i++) d = max2(d, delta_v(int'(IN_W[i]), MP, MN));
    return d;
  endfunction

  function automatic int max_out_depth();
    int d = 0;
    for (int j = 0; j < N_OUT; j++) d = max2(d, delta_v(int'(OUT_W[j]), MP, MN));
    return d;
  endfunction

  localparam int DELTA_I   = delta_c(N_IN, MP, MN) + max_in_depth();
  localparam int DELTA_D   = delta_v(ROWS, MP, MN);
  localparam int DELTA_O   = delta_c(N_OUT, MP, MN) + max_out_depth();
  localparam int DELTA_E   = delta_c(N_OUT, MP, MN);
  localparam int CYCLE_EST = FEET ? xi_hs(DELTA_I, DELTA_D, DELTA_E, DELTA_O)
                                  : xi_le(DELTA_I, DELTA_D, DELTA_E, DELTA_O);

  // Rails beyond a channel's declared width are not part of the circuit.
  for (genvar i = 0; i < N_IN; i++) begin : g_in
    localparam int W = int'(IN_W[i]);
    if (W < 1 || W > MAXW) begin : g_bad
      $error("romantic_rom: input channel width out of range 1..MAXW");
    end
    for (genvar k = 0; k < MAXW; k++) begin : g_rail
      assign in_used[i][k] = (k < W) ? in_d[i][k] : 1'b0;
    end
    or_tree #(.N(W), .FANIN(or_fanin(MP, MN))) u_iv (.in(in_used[i][W-1:0]), .out(in_ch_v[i]));
  end

  c_tree #(.N(N_IN), .FANIN(c_fanin(MP, MN)), .RST_VAL(1'b0)) u_inv (
    .rst_n(rst_n), .in(in_ch_v), .out(in_v));

  c_tree #(.N(N_OUT), .FANIN(c_fanin(MP, MN)), .RST_VAL(1'b1)) u_oute (
    .rst_n(rst_n), .in(out_e), .out(out_e_all));

  address_decoder #(
    .N_IN(N_IN), .ROWS(ROWS), .MAXW(MAXW), .IN_VAL(IN_VAL), .MP(MP), .MN(MN)
  ) u_dec (
    .rst_n(rst_n), .decodep_(decodep_), .in_d(in_used), .dec(dec), .dec_v(dec_v));

  rom_array #(
    .FEET(FEET), .N_OUT(N_OUT), .ROWS(ROWS), .MAXW(MAXW), .OUT_W(OUT_W),
    .OUT_VAL(OUT_VAL), .MP(MP), .MN(MN)
  ) u_rom (
    .rst_n(rst_n), .romp_(romp_), .dec(dec), .out_d(out_d), .bigromp(bigromp),
    .out_v(out_v));

  if (FEET) begin : g_hs
    logic x_e;
    control_hs u_ctl (
      .rst_n(rst_n), .in_v(in_v), .dec_v(dec_v), .out_v(out_v), .out_e(out_e_all),
      .in_e(in_e), .x_e(x_e), .decodep_(decodep_), .romp_(romp_));
  end else begin : g_le
    control_le u_ctl (
      .rst_n(rst_n), .in_v(in_v), .dec_v(dec_v), .out_v(out_v), .out_e(out_e_all),
      .in_e(in_e), .decodep_(decodep_), .romp_(romp_));
  end

  // Channel rules: 1-of-n outputs carry at most one high rail, and at most
  // one word line is ever high (a single decode value).
  always_comb begin
    if (rst_n) begin
      for (int j = 0; j < N_OUT; j++)
        assert ($onehot0(out_d[j])) else $error("romantic_rom: output %0d not 1-of-n", j);
      assert ($onehot0(dec)) else $error("romantic_rom: more than one word line high");
    end
  end

endmodule
