// tb_romantic_top: end-to-end test of the buffered ROM, high-speed variant
// (default parameters) and low-energy variant side by side, each fed by
// randomly timed sources and sinks (tb_rom_env) with occasional long output
// stalls. Every output token is compared with a software lookup of the table.
// It also counts how often each mechanism of the design occurred:
//   dc    tokens answered by a table row with a don't-care input
//   slack high-speed ROM raising its input enable while still holding an
//         output token (decoder and ROM plane working as two half-buffers)
//   foot  high-speed ROM evaluating a new word line while its ROM plane is
//         precharging (the case the virtual-ground foot exists for)
// Each must occur at least once in the high-speed ROM; slack and foot must
// never occur in the low-energy ROM.
module tb_romantic_top;
  import romantic_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int NTOK = 80;

  logic rst_n;
  logic [EX_N_IN-1:0][MAX_RAILS-1:0]  in_d  [2];
  logic [EX_N_IN-1:0]                 in_e  [2];
  logic [EX_N_OUT-1:0][MAX_RAILS-1:0] out_d [2];
  logic [EX_N_OUT-1:0]                out_e [2];
  int   e_checks [2], e_fail [2], e_dc [2];
  logic e_done [2];
  int   slack_ev [2] = '{0, 0};
  int   foot_ev  [2] = '{0, 0};
  int   checks = 0, failures = 0;

  romantic_top dut_hs (.rst_n(rst_n), .in_d(in_d[0]), .in_e(in_e[0]), .out_d(out_d[0]),
                       .out_e(out_e[0]));
  romantic_top #(.FEET(1'b0)) dut_le (.rst_n(rst_n), .in_d(in_d[1]), .in_e(in_e[1]),
                                      .out_d(out_d[1]), .out_e(out_e[1]));

  for (genvar f = 0; f < 2; f++) begin : g_env
    tb_rom_env #(.IN_VAL(EX_IN_VAL), .OUT_VAL(EX_OUT_VAL), .NTOK(NTOK), .STALL(25)) env (
      .rst_n(rst_n), .in_d(in_d[f]), .in_e(in_e[f]), .out_d(out_d[f]), .out_e(out_e[f]),
      .checks(e_checks[f]), .failures(e_fail[f]), .dc_tokens(e_dc[f]), .done(e_done[f]));
  end

  always @(posedge dut_hs.u_rom.in_e) if (rst_n && |dut_hs.u_rom.out_d) slack_ev[0]++;
  always @(posedge dut_le.u_rom.in_e) if (rst_n && |dut_le.u_rom.out_d) slack_ev[1]++;
  always @(posedge dut_hs.u_rom.dec_v) if (rst_n && !dut_hs.u_rom.romp_) foot_ev[0]++;
  always @(posedge dut_le.u_rom.dec_v) if (rst_n && !dut_le.u_rom.romp_) foot_ev[1]++;

  task automatic expect_count(input string what, input int n, input bit want_some);
    checks++;
    if (want_some ? (n == 0) : (n != 0)) begin
      failures++;
      $display("ERROR: %s count %0d", what, n);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    #20 rst_n = 1'b1;
    wait (e_done[0] && e_done[1]);
    #20;
    for (int f = 0; f < 2; f++) begin
      checks += e_checks[f];
      failures += e_fail[f];
      checks++;
      if (e_checks[f] != NTOK * (2 * EX_N_OUT + EX_N_IN)) begin
        failures++;
        $display("ERROR: variant %0d: %0d output tokens", f, e_checks[f]);
      end
    end
    expect_count("high-speed don't-care tokens", e_dc[0], 1);
    expect_count("low-energy don't-care tokens", e_dc[1], 1);
    expect_count("high-speed slack", slack_ev[0], 1);
    expect_count("high-speed foot", foot_ev[0], 1);
    expect_count("low-energy slack", slack_ev[1], 0);
    expect_count("low-energy foot", foot_ev[1], 0);
    $display("mechanisms: dc %0d/%0d slack %0d/%0d foot %0d/%0d (high-speed/low-energy)",
             e_dc[0], e_dc[1], slack_ev[0], slack_ev[1], foot_ev[0], foot_ev[1]);
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
