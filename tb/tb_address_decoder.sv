// tb_address_decoder: the example-table decoder driven directly. For every
// input combination (a in 0..2, b in 0..3, c in 0..1) except the one declared
// never to occur, with decodep_ high, exactly the row the table names must
// rise (the expected row number is written out below by hand from the
// table) and Decode^v with it; the word line must hold while the inputs
// return to neutral and fall when decodep_ falls. Also checks that a row with
// don't-care inputs still waits for a token on each of them.
module tb_address_decoder;
  import romantic_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic                           rst_n, decodep_;
  logic [EX_N_IN-1:0][MAX_RAILS-1:0] in_d;
  logic [EX_ROWS-1:0]             dec;
  logic                           dec_v;
  int checks = 0, failures = 0;

  address_decoder dut (.rst_n(rst_n), .decodep_(decodep_), .in_d(in_d), .dec(dec), .dec_v(dec_v));

  // Row selected by (a, b, c), from the table lines
  // "- 0 1", "- 0 0", "0 1 1", "2 1 1", "- 1 0", "- 2 -", "- 3 -".
  function automatic int exp_row(input int a, input int b, input int c);
    case (b)
      0: return c ? 0 : 1;
      1: return c ? ((a == 0) ? 2 : 3) : 4;
      2: return 5;
      default: return 6;
    endcase
  endfunction

  task automatic check(input logic [EX_ROWS-1:0] exp, input string what);
    checks++;
    if (dec !== exp || dec_v !== (exp != 0)) begin
      failures++;
      $display("ERROR: %s: dec=%b dec_v=%b expected %b", what, dec, dec_v, exp);
    end
  endtask

  initial begin
    in_d = '0;
    decodep_ = 1'b1;
    rst_n = 1'b0;
    #1 check('0, "reset");
    rst_n = 1'b1;
    decodep_ = 1'b0;
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 4; b++)
        for (int c = 0; c < 2; c++) begin
          if (a == 1 && b == 1 && c == 1) continue;   // never occurs
          decodep_ = 1'b1;
          #1 check('0, "evaluate, inputs neutral");
          in_d[0][a] = 1'b1;
          in_d[1][b] = 1'b1;
          in_d[2][c] = 1'b1;
          #1 check(EX_ROWS'(1) << exp_row(a, b, c), "evaluate");
          in_d = '0;
          #1 check(EX_ROWS'(1) << exp_row(a, b, c), "hold");
          decodep_ = 1'b0;
          #1 check('0, "precharge");
        end
    // "- 2 -": row 5 waits for tokens on the don't-care inputs a and c
    decodep_ = 1'b1;
    in_d[1][2] = 1'b1;
    #1 check('0, "don't-care inputs still neutral");
    in_d[0][1] = 1'b1;
    #1 check('0, "c still neutral");
    in_d[2][0] = 1'b1;
    #1 check(EX_ROWS'(1) << 5, "don't-care row with all inputs valid");
    decodep_ = 1'b0;
    in_d = '0;
    #1;
    // inputs while precharging are ignored
    decodep_ = 1'b0;
    in_d[0][0] = 1'b1; in_d[2][1] = 1'b1;
    #1 check('0, "precharge with valid inputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
