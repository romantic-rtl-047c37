// tb_c_tree: a 7-input C-element tree (fan-in 3, two levels) driven the way a
// completion tree is used: in each phase the inputs change one at a time in
// random order, all rising, then all falling. The output must keep its old
// value until the last input has changed and follow immediately after.
module tb_c_tree;
  timeunit 1ns; timeprecision 1ps;

  localparam int N = 7;
  logic         rst_n;
  logic [N-1:0] in;
  logic         out;
  int checks = 0, failures = 0;

  c_tree #(.N(N), .FANIN(3), .RST_VAL(1'b0)) dut (.rst_n(rst_n), .in(in), .out(out));

  task automatic check(input logic exp);
    checks++;
    if (out !== exp) begin
      failures++;
      $display("ERROR: in=%b out=%b expected %b", in, out, exp);
    end
  endtask

  initial begin
    int order [N];
    in = '0;
    rst_n = 1'b0;
    #1 check(1'b0);
    rst_n = 1'b1;
    for (int phase = 0; phase < 40; phase++) begin
      logic target;
      target = (phase % 2 == 0);
      for (int k = 0; k < N; k++) order[k] = k;
      order.shuffle();
      for (int k = 0; k < N; k++) begin
        in[order[k]] = target;
        #1 check((k == N - 1) ? target : !target);
      end
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
