// romantic_top: the QDI ROM in the setting its cycle-time figures assume,
// with a precharge half-buffer on every input and every output channel.
//
// Each input channel i enters through its own pchb_buffer (enable in_e[i]);
// the buffers all wait on the ROM's single shared input enable. Each ROM output
// channel j leaves through its own pchb_buffer, whose left enable is the
// ROM's individual output enable for channel j; out_e[j] is that buffer's right
// enable. The buffers give the ROM a well-behaved neighbour on every side and
// one extra place of slack per channel.
// Parameters and table format are those of romantic_rom; the default is the
// three-input, five-output example table in romantic_pkg with the high-speed
// (FEET = 1) control. Four-phase channels with active-high enables; rst_n
// active low, asynchronous. No clock.
module romantic_top
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
  output logic [N_IN-1:0]            in_e,
  output logic [N_OUT-1:0][MAXW-1:0] out_d,
  input  logic [N_OUT-1:0]           out_e
);

  logic [N_IN-1:0][MAXW-1:0]  rom_in_d;
  logic                       rom_in_e;
  logic [N_OUT-1:0][MAXW-1:0] rom_out_d;
  logic [N_OUT-1:0]           rom_out_e;

  for (genvar i = 0; i < N_IN; i++) begin : g_ibuf
    pchb_buffer #(.N(MAXW)) u_buf (
      .rst_n(rst_n), .l_d(in_d[i]), .l_e(in_e[i]), .r_d(rom_in_d[i]), .r_e(rom_in_e));
  end

  romantic_rom #(
    .FEET(FEET), .N_IN(N_IN), .N_OUT(N_OUT), .ROWS(ROWS), .MAXW(MAXW),
    .IN_W(IN_W), .OUT_W(OUT_W), .IN_VAL(IN_VAL), .OUT_VAL(OUT_VAL), .MP(MP), .MN(MN)
  ) u_rom (
    .rst_n(rst_n), .in_d(rom_in_d), .in_e(rom_in_e), .out_d(rom_out_d), .out_e(rom_out_e));

  for (genvar j = 0; j < N_OUT; j++) begin : g_obuf
    pchb_buffer #(.N(MAXW)) u_buf (
      .rst_n(rst_n), .l_d(rom_out_d[j]), .l_e(rom_out_e[j]), .r_d(out_d[j]), .r_e(out_e[j]));
  end

endmodule
