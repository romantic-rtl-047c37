// tb_c_element: random stimulus on a 3-input C-element; the expected output
// is tracked by a reference model (rise on all-ones, fall on all-zeros, hold
// otherwise). Also checks the asynchronous reset to both reset values.
module tb_c_element;
  timeunit 1ns; timeprecision 1ps;

  logic       rst_n;
  logic [2:0] in;
  logic       out0, out1;
  logic       model;
  int checks = 0, failures = 0;

  c_element #(.N(3), .RST_VAL(1'b0)) dut0 (.rst_n(rst_n), .in(in), .out(out0));
  c_element #(.N(3), .RST_VAL(1'b1)) dut1 (.rst_n(rst_n), .in(in), .out(out1));

  task automatic check(input logic exp0, input logic exp1);
    checks++;
    if (out0 !== exp0 || out1 !== exp1) begin
      failures++;
      $display("ERROR: in=%b out0=%b out1=%b expected %b %b", in, out0, out1, exp0, exp1);
    end
  endtask

  initial begin
    in = 3'b010;
    rst_n = 1'b0;
    #1 check(1'b0, 1'b1);
    rst_n = 1'b1;
    #1 check(1'b0, 1'b1);       // mixed inputs: both hold their reset values
    in = 3'b111;
    #1 check(1'b1, 1'b1);
    model = 1'b1;
    for (int n = 0; n < 500; n++) begin
      in = 3'($urandom);
      if (&in) model = 1'b1;
      else if (~|in) model = 1'b0;
      #1 check(model, model);
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
