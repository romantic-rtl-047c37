// tb_workload_rom: one ROM of a given size with a generated table, in both
// control variants, under the random environment of tb_rom_env.
// FULL = 1: every input is 1-of-4. With NROWS = 0 the table is fully decoded,
// one row per input combination (4^N_IN rows); otherwise it has NROWS rows and
// the other combinations never occur. Row r holds the combination
// c = (37 * r) mod 4^N_IN, input i taking base-4 digit i of c (37 is odd, so
// the rows are distinct and spread over all inputs). Output j of the row for
// inputs x_i is (j + sum_i (i + 1) * x_i) mod 4, on 1-of-4 output channels.
// FULL = 0: a single row in which every input is a don't-care (1-of-2 input
// channels); output j is j mod 4.
module tb_workload_rom #(
  parameter int N_IN  = 2,
  parameter int N_OUT = 2,
  parameter bit FULL  = 1'b1,
  parameter int NROWS = 0,
  parameter int NTOK  = 30
) (
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int COMBS = 1 << (2 * N_IN);
  localparam int ROWS  = !FULL ? 1 : (NROWS > 0) ? NROWS : COMBS;

  function automatic int comb(input int r);
    return (37 * r) % COMBS;
  endfunction
  localparam int MAXW = 4;
  typedef logic [0:ROWS-1][0:N_IN-1][3:0]  in_tab_t;
  typedef logic [0:ROWS-1][0:N_OUT-1][3:0] out_tab_t;

  function automatic logic [0:N_IN-1][3:0] gen_in_w();
    for (int i = 0; i < N_IN; i++) gen_in_w[i] = FULL ? 4'd4 : 4'd2;
  endfunction

  function automatic logic [0:N_OUT-1][3:0] gen_out_w();
    for (int j = 0; j < N_OUT; j++) gen_out_w[j] = 4'd4;
  endfunction

  function automatic in_tab_t gen_in();
    for (int r = 0; r < ROWS; r++)
      for (int i = 0; i < N_IN; i++)
        gen_in[r][i] = FULL ? 4'((comb(r) >> (2 * i)) & 3) : 4'hF;
  endfunction

  function automatic out_tab_t gen_out();
    for (int r = 0; r < ROWS; r++)
      for (int j = 0; j < N_OUT; j++) begin
        int s = j;
        if (FULL)
          for (int i = 0; i < N_IN; i++) s += (i + 1) * ((comb(r) >> (2 * i)) & 3);
        gen_out[r][j] = 4'(s % 4);
      end
  endfunction

  localparam logic [0:N_IN-1][3:0]  IN_W    = gen_in_w();
  localparam logic [0:N_OUT-1][3:0] OUT_W   = gen_out_w();
  localparam in_tab_t               IN_VAL  = gen_in();
  localparam out_tab_t              OUT_VAL = gen_out();

  logic [N_IN-1:0][MAXW-1:0]  in_d  [2];
  logic [N_OUT-1:0][MAXW-1:0] out_d [2];
  logic [N_OUT-1:0]           out_e [2];
  logic                       in_e  [2];
  int   e_checks [2], e_fail [2], e_dc [2];
  logic e_done [2];

  for (genvar f = 0; f < 2; f++) begin : g_v
    romantic_rom #(
      .FEET(f == 0), .N_IN(N_IN), .N_OUT(N_OUT), .ROWS(ROWS), .MAXW(MAXW), .IN_W(IN_W),
      .OUT_W(OUT_W), .IN_VAL(IN_VAL), .OUT_VAL(OUT_VAL)
    ) dut (.rst_n(rst_n), .in_d(in_d[f]), .in_e(in_e[f]), .out_d(out_d[f]), .out_e(out_e[f]));

    tb_rom_env #(
      .N_IN(N_IN), .N_OUT(N_OUT), .ROWS(ROWS), .MAXW(MAXW), .IN_W(IN_W), .OUT_W(OUT_W),
      .IN_VAL(IN_VAL), .OUT_VAL(OUT_VAL), .NTOK(NTOK)
    ) env (
      .rst_n(rst_n), .in_d(in_d[f]), .in_e({N_IN{in_e[f]}}), .out_d(out_d[f]),
      .out_e(out_e[f]), .checks(e_checks[f]), .failures(e_fail[f]), .dc_tokens(e_dc[f]),
      .done(e_done[f]));
  end

  assign done = e_done[0] && e_done[1];
  assign checks = e_checks[0] + e_checks[1];
  assign failures = e_fail[0] + e_fail[1]
                  + ((done && checks != 2 * NTOK * (N_IN + 2 * N_OUT)) ? 1 : 0);

endmodule
