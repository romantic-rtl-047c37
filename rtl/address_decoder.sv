// address_decoder: precharged decoder that turns the ROM's 1-of-n input
// channels into the 1-of-ROWS Decode channel (one word line per table row),
// and computes Decode^v, the OR of all word lines.
//
// Row r's word line rises when decodep_ is high (evaluate) and every input
// whose table digit is not a don't-care (F) has the named rail high; it falls
// when decodep_ is low (precharge) and holds otherwise. In the circuit this is
// a precharged pulldown stack per row followed by an inverter; here the node is
// a latch. For an input marked don't-care the row's stack holds the channel's
// validity (any rail high) instead of one rail: the value is ignored, but the
// word line still waits for a token on every input, so even a row of
// don't-cares cannot fire while its inputs are neutral. At most one row may match a legal input; an input that matches no
// row leaves all word lines low and the ROM stalls, as the table format
// specifies. Decode^v comes from an OR tree with fan-in or_fanin(MP, MN).
// rst_n (this design's addition) clears all word lines. No clock.
// The word lines appear as latches after synthesis (the keepers).
module address_decoder
  import romantic_pkg::*;
#(
  parameter int N_IN = EX_N_IN,
  parameter int ROWS = EX_ROWS,
  parameter int MAXW = MAX_RAILS,
  parameter logic [0:ROWS-1][0:N_IN-1][3:0] IN_VAL = EX_IN_VAL,
  parameter int MP = SERIES_P,
  parameter int MN = SERIES_N
) (
  input  logic                      rst_n,
  input  logic                      decodep_,
  input  logic [N_IN-1:0][MAXW-1:0] in_d,
  output logic [ROWS-1:0]           dec,
  output logic                      dec_v
);

  logic [ROWS-1:0] match;

  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      match[r] = 1'b1;
      for (int i = 0; i < N_IN; i++)
        if (IN_VAL[r][i] == DONT_CARE)
          match[r] = match[r] & (|in_d[i]);
        else
          match[r] = match[r] & (int'(IN_VAL[r][i]) < MAXW) & in_d[i][IN_VAL[r][i][$clog2(MAXW)-1:0]];
    end
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    always_latch begin
      if (!rst_n || !decodep_) dec[r] = 1'b0;
      else if (match[r])       dec[r] = 1'b1;
    end
  end

  or_tree #(.N(ROWS), .FANIN(or_fanin(MP, MN))) u_dv (.in(dec), .out(dec_v));

endmodule
