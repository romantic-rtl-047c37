// tb_rom_workloads: ROMs of the channel counts and row counts of the
// published benchmark set, each in both control variants:
//   2 inputs, 2 outputs, 16 rows    (1-of-4 channels, fully decoded)
//   4 inputs, 4 outputs, 256 rows   (1-of-4 channels, fully decoded)
//   4 inputs, 4 outputs, 1 row      (1-of-2 inputs, all don't-care)
//   8 inputs, 8 outputs, 1 row      (1-of-2 inputs, all don't-care)
//   4 inputs, 9 outputs, 113 rows   (1-of-4 channels, partly decoded)
//   6 inputs, 8 outputs, 100 rows   (1-of-4 channels, partly decoded)
//   6 inputs, 8 outputs, 81 rows    (1-of-4 channels, partly decoded)
// Channel widths and contents are this testbench's choice (see
// tb_workload_rom). Also checks the cycle-time estimate of romantic_pkg for
// the 256-row ROM: tree depths Delta_i = 3, Delta_d = 4, Delta_o = 3,
// Delta_e = 2 give 36 transitions for the low-energy ROM, the figure
// published for that size, and 17 for the high-speed ROM; the ROM's own
// CYCLE_EST must agree.
module tb_rom_workloads;
  import romantic_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic rst_n;
  int   c [7], fl [7];
  logic d [7];
  int   checks = 0, failures = 0;

  tb_workload_rom #(.N_IN(2), .N_OUT(2), .FULL(1'b1)) w16  (.rst_n(rst_n), .checks(c[0]), .failures(fl[0]), .done(d[0]));
  tb_workload_rom #(.N_IN(4), .N_OUT(4), .FULL(1'b1)) w256 (.rst_n(rst_n), .checks(c[1]), .failures(fl[1]), .done(d[1]));
  tb_workload_rom #(.N_IN(4), .N_OUT(4), .FULL(1'b0)) w1a  (.rst_n(rst_n), .checks(c[2]), .failures(fl[2]), .done(d[2]));
  tb_workload_rom #(.N_IN(8), .N_OUT(8), .FULL(1'b0)) w1b  (.rst_n(rst_n), .checks(c[3]), .failures(fl[3]), .done(d[3]));
  tb_workload_rom #(.N_IN(4), .N_OUT(9), .NROWS(113)) w113 (.rst_n(rst_n), .checks(c[4]), .failures(fl[4]), .done(d[4]));
  tb_workload_rom #(.N_IN(6), .N_OUT(8), .NROWS(100)) w100 (.rst_n(rst_n), .checks(c[5]), .failures(fl[5]), .done(d[5]));
  tb_workload_rom #(.N_IN(6), .N_OUT(8), .NROWS(81))  w81  (.rst_n(rst_n), .checks(c[6]), .failures(fl[6]), .done(d[6]));

  task automatic expect_int(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("ERROR: %s = %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int di, dd, d_o, de;
    rst_n = 1'b0;
    #20 rst_n = 1'b1;
    di  = delta_c(4, SERIES_P, SERIES_N) + delta_v(4, SERIES_P, SERIES_N);
    dd  = delta_v(256, SERIES_P, SERIES_N);
    d_o = delta_c(4, SERIES_P, SERIES_N) + delta_v(4, SERIES_P, SERIES_N);
    de  = delta_c(4, SERIES_P, SERIES_N);
    expect_int("Delta_i", di, 3);
    expect_int("Delta_d", dd, 4);
    expect_int("Delta_o", d_o, 3);
    expect_int("Delta_e", de, 2);
    expect_int("low-energy cycle estimate", xi_le(di, dd, de, d_o), 36);
    expect_int("high-speed cycle estimate", xi_hs(di, dd, de, d_o), 17);
    expect_int("256-row high-speed ROM CYCLE_EST", w256.g_v[0].dut.CYCLE_EST, 17);
    expect_int("256-row low-energy ROM CYCLE_EST", w256.g_v[1].dut.CYCLE_EST, 36);
    wait (d[0] && d[1] && d[2] && d[3] && d[4] && d[5] && d[6]);
    #20;
    for (int k = 0; k < 7; k++) begin
      checks += c[k];
      failures += fl[k];
    end
    $display("cycle estimates (high-speed/low-energy): 16 rows %0d/%0d, 256 rows %0d/%0d, 1 row x4 %0d/%0d, 1 row x8 %0d/%0d, 113 rows %0d/%0d, 100 rows %0d/%0d, 81 rows %0d/%0d",
             w16.g_v[0].dut.CYCLE_EST, w16.g_v[1].dut.CYCLE_EST,
             w256.g_v[0].dut.CYCLE_EST, w256.g_v[1].dut.CYCLE_EST,
             w1a.g_v[0].dut.CYCLE_EST, w1a.g_v[1].dut.CYCLE_EST,
             w1b.g_v[0].dut.CYCLE_EST, w1b.g_v[1].dut.CYCLE_EST,
             w113.g_v[0].dut.CYCLE_EST, w113.g_v[1].dut.CYCLE_EST,
             w100.g_v[0].dut.CYCLE_EST, w100.g_v[1].dut.CYCLE_EST,
             w81.g_v[0].dut.CYCLE_EST, w81.g_v[1].dut.CYCLE_EST);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
