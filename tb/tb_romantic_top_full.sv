// tb_romantic_top_full: the buffered ROM exactly as delivered (default
// parameters: example table, high-speed control) taken through 300 complete
// accesses by randomly timed sources and sinks; every output token is compared
// with a software lookup of the table.
module tb_romantic_top_full;
  import romantic_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int NTOK = 300;

  logic rst_n;
  logic [EX_N_IN-1:0][MAX_RAILS-1:0]  in_d;
  logic [EX_N_IN-1:0]                 in_e;
  logic [EX_N_OUT-1:0][MAX_RAILS-1:0] out_d;
  logic [EX_N_OUT-1:0]                out_e;
  int   e_checks, e_fail, e_dc;
  logic e_done;
  int   checks = 0, failures = 0;

  romantic_top dut (.rst_n(rst_n), .in_d(in_d), .in_e(in_e), .out_d(out_d), .out_e(out_e));

  tb_rom_env #(.IN_VAL(EX_IN_VAL), .OUT_VAL(EX_OUT_VAL), .NTOK(NTOK)) env (
    .rst_n(rst_n), .in_d(in_d), .in_e(in_e), .out_d(out_d), .out_e(out_e),
    .checks(e_checks), .failures(e_fail), .dc_tokens(e_dc), .done(e_done));

  initial begin
    rst_n = 1'b0;
    #20 rst_n = 1'b1;
    wait (e_done);
    #20;
    checks = e_checks + 1;
    failures = e_fail;
    if (e_checks != NTOK * (2 * EX_N_OUT + EX_N_IN)) begin
      failures++;
      $display("ERROR: %0d output tokens", e_checks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
