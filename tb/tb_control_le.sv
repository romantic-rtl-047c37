// tb_control_le: the low-energy control box stepped through its sequential
// handshake by hand. Each step changes one completion input and checks In^e,
// decodep_ and romp_; steps whose guard is not complete must leave them
// unchanged. In particular the box must not acknowledge the inputs before the
// output has been taken (Out^e low), and must not precharge the ROM plane
// before every word line is low.
module tb_control_le;
  timeunit 1ns; timeprecision 1ps;

  logic rst_n, in_v, dec_v, out_v, out_e;
  logic in_e, decodep_, romp_;
  int checks = 0, failures = 0;

  control_le dut (.rst_n(rst_n), .in_v(in_v), .dec_v(dec_v), .out_v(out_v), .out_e(out_e),
                  .in_e(in_e), .decodep_(decodep_), .romp_(romp_));

  task automatic step(input string what, input logic ie, input logic dp, input logic rp);
    #1;
    checks++;
    if ({in_e, decodep_, romp_} !== {ie, dp, rp}) begin
      failures++;
      $display("ERROR: %s: in_e decodep_ romp_ = %b%b%b, expected %b%b%b",
               what, in_e, decodep_, romp_, ie, dp, rp);
    end
  endtask

  initial begin
    {in_v, dec_v, out_v} = '0;
    out_e = 1'b1;
    rst_n = 1'b0;
    step("reset", 0, 0, 0);
    rst_n = 1'b1;         step("after reset: decodep_+, romp_+, In^e+", 1, 1, 1);
    for (int cyc = 0; cyc < 3; cyc++) begin
      in_v = 1;           step("In^v", 1, 1, 1);
      dec_v = 1;          step("Decode^v", 1, 1, 1);
      out_v = 1;          step("Out^v, Out^e still high", 1, 1, 1);
      out_e = 0;          step("Out^e-: In^e-", 0, 1, 1);
      in_v = 0;           step("inputs neutral: decodep_-", 0, 0, 1);
      dec_v = 0;          step("decode neutral: romp_-", 0, 0, 0);
      out_v = 0;          step("outputs neutral, Out^e low: wait", 0, 0, 0);
      out_e = 1;          step("Out^e+: decodep_+, romp_+, In^e+", 1, 1, 1);
    end
    // out of order: Out^e falls before Decode^v -> no acknowledge until all valid
    in_v = 1;             step("In^v", 1, 1, 1);
    out_e = 0;            step("Out^e low early", 1, 1, 1);
    out_v = 1;            step("Out^v without Decode^v", 1, 1, 1);
    dec_v = 1;            step("Decode^v: In^e-", 0, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
