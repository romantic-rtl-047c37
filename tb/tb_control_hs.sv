// tb_control_hs: the high-speed control box stepped through its handshake by
// hand. Each step changes one completion input and checks all four outputs
// (In^e, x^e, decodep_, romp_) against the two half-buffer sequences; steps
// whose guard is not yet complete must leave the outputs unchanged. Two full
// cycles run, the second with the environment's events in another order.
module tb_control_hs;
  timeunit 1ns; timeprecision 1ps;

  logic rst_n, in_v, dec_v, out_v, out_e;
  logic in_e, x_e, decodep_, romp_;
  int checks = 0, failures = 0;

  control_hs dut (.rst_n(rst_n), .in_v(in_v), .dec_v(dec_v), .out_v(out_v), .out_e(out_e),
                  .in_e(in_e), .x_e(x_e), .decodep_(decodep_), .romp_(romp_));

  task automatic step(input string what, input logic ie, input logic xe, input logic dp,
                      input logic rp);
    #1;
    checks++;
    if ({in_e, x_e, decodep_, romp_} !== {ie, xe, dp, rp}) begin
      failures++;
      $display("ERROR: %s: in_e x_e decodep_ romp_ = %b%b%b%b, expected %b%b%b%b",
               what, in_e, x_e, decodep_, romp_, ie, xe, dp, rp);
    end
  endtask

  initial begin
    {in_v, dec_v, out_v} = '0;
    out_e = 1'b1;
    rst_n = 1'b0;
    step("reset", 1, 1, 0, 0);
    rst_n = 1'b1;         step("after reset", 1, 1, 1, 1);
    // cycle 1
    in_v = 1;             step("In^v only", 1, 1, 1, 1);
    dec_v = 1;            step("Decode^v: In^e-", 0, 1, 1, 1);
    out_v = 1;            step("Out^v: x^e-, decodep_-", 0, 0, 0, 1);
    in_v = 0;             step("inputs neutral, decode still valid", 0, 0, 0, 1);
    dec_v = 0;            step("decode neutral: In^e+", 1, 0, 0, 1);
    out_e = 0;            step("Out^e-: romp_-", 1, 0, 0, 0);
    out_v = 0;            step("Out^v-: x^e+, decodep_+", 1, 1, 1, 0);
    out_e = 1;            step("Out^e+: romp_+", 1, 1, 1, 1);
    // cycle 2: output side consumed early, inputs late
    in_v = 1; dec_v = 1;  step("input and decode valid", 0, 1, 1, 1);
    out_v = 1;            step("output valid", 0, 0, 0, 1);
    dec_v = 0;            step("decode precharged, inputs still valid", 0, 0, 0, 1);
    out_e = 0;            step("romp_-", 0, 0, 0, 0);
    out_v = 0;            step("x^e+ but In^e low: decodep_ holds", 0, 1, 0, 0);
    in_v = 0;             step("In^e+ then decodep_+", 1, 1, 1, 0);
    out_e = 1;            step("romp_+", 1, 1, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
