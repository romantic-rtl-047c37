// tb_or_tree: OR trees of 13 inputs (fan-in 4, three levels) and 3 inputs
// (single gate) against the reduction OR, on random sparse vectors, all-zero
// and every single-one vector.
module tb_or_tree;
  timeunit 1ns; timeprecision 1ps;

  logic [12:0] a;
  logic [2:0]  b;
  logic        ya, yb;
  int checks = 0, failures = 0;

  or_tree #(.N(13), .FANIN(4)) dut_a (.in(a), .out(ya));
  or_tree #(.N(3),  .FANIN(4)) dut_b (.in(b), .out(yb));

  task automatic check;
    checks++;
    if (ya !== (a != 0) || yb !== (b != 0)) begin
      failures++;
      $display("ERROR: a=%b ya=%b b=%b yb=%b", a, ya, b, yb);
    end
  endtask

  initial begin
    a = '0; b = '0;
    #1 check;
    for (int k = 0; k < 13; k++) begin
      a = 13'(1) << k;
      b = 3'(1) << (k % 3);
      #1 check;
    end
    for (int n = 0; n < 300; n++) begin
      a = 13'($urandom) & 13'($urandom) & 13'($urandom);
      b = 3'($urandom) & 3'($urandom);
      #1 check;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
