// tb_romantic_rom: end-to-end test of the ROM core in both control variants
// (FEET = 1 high-speed, FEET = 0 low-energy) on the example table, with
// randomly timed sources and sinks (tb_rom_env). Checks every output token
// against a software lookup of the table, and checks the control sequences:
// in the low-energy ROM the control signals must cycle exactly through
// In^e-, decodep_-, romp_-, decodep_+, romp_+, In^e+ (six transitions per
// access); in the high-speed ROM the input enable must at times return high
// while the previous output is still held (the extra place of slack), which
// the low-energy ROM must never do.
module tb_romantic_rom;
  import romantic_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int NTOK = 60;

  logic rst_n;
  logic [EX_N_IN-1:0][MAX_RAILS-1:0]  in_d  [2];
  logic [EX_N_OUT-1:0][MAX_RAILS-1:0] out_d [2];
  logic [EX_N_OUT-1:0]                out_e [2];
  logic                               in_e  [2];
  int   e_checks [2], e_fail [2], e_dc [2];
  logic e_done [2];

  int checks = 0, failures = 0;
  int slack_events [2] = '{0, 0};

  for (genvar f = 0; f < 2; f++) begin : g_v
    romantic_rom #(.FEET(f == 0)) dut (
      .rst_n(rst_n), .in_d(in_d[f]), .in_e(in_e[f]), .out_d(out_d[f]), .out_e(out_e[f]));

    tb_rom_env #(
      .IN_VAL(EX_IN_VAL), .OUT_VAL(EX_OUT_VAL), .NTOK(NTOK)
    ) env (
      .rst_n(rst_n), .in_d(in_d[f]), .in_e({EX_N_IN{in_e[f]}}), .out_d(out_d[f]),
      .out_e(out_e[f]), .checks(e_checks[f]), .failures(e_fail[f]), .dc_tokens(e_dc[f]),
      .done(e_done[f]));

    // input enable returning high while an output token is still on the wires
    always @(posedge in_e[f]) if (rst_n && (|out_d[f])) slack_events[f]++;
  end

  // Low-energy control sequence monitor (instance 1 is FEET = 0).
  typedef enum int {IE_F, DP_F, RP_F, DP_R, RP_R, IE_R} le_ev_e;
  le_ev_e expect_ev = IE_F;
  int le_seq_err = 0, le_cycles = 0;
  logic le_ie, le_dp, le_rp;
  assign le_ie = g_v[1].dut.g_le.u_ctl.in_e;
  assign le_dp = g_v[1].dut.g_le.u_ctl.decodep_;
  assign le_rp = g_v[1].dut.g_le.u_ctl.romp_;

  task automatic le_event(input le_ev_e ev);
    if (!rst_n) return;
    if (ev != expect_ev) begin
      le_seq_err++;
      $display("ERROR: low-energy control event %s, expected %s", ev.name(), expect_ev.name());
    end
    if (ev == IE_F) le_cycles++;
    expect_ev = (ev == IE_R) ? IE_F : le_ev_e'(int'(ev) + 1);
  endtask

  always @(negedge le_ie) le_event(IE_F);
  always @(negedge le_dp) le_event(DP_F);
  always @(negedge le_rp) le_event(RP_F);
  always @(posedge le_dp) le_event(DP_R);
  always @(posedge le_rp) le_event(RP_R);
  always @(posedge le_ie) le_event(IE_R);

  initial begin
    rst_n = 1'b0;
    #20 rst_n = 1'b1;
    // first transitions after reset are decodep_+, romp_+, In^e+
    expect_ev = DP_R;
    wait (e_done[0] && e_done[1]);
    #20;
    for (int f = 0; f < 2; f++) begin
      checks += e_checks[f];
      failures += e_fail[f];
      checks++;
      if (e_checks[f] != NTOK * (2 * EX_N_OUT + EX_N_IN)) begin
        failures++;
        $display("ERROR: variant %0d produced %0d output tokens", f, e_checks[f]);
      end
    end
    checks++;
    if (le_seq_err != 0) failures++;
    checks++;
    if (le_cycles != NTOK) begin
      failures++;
      $display("ERROR: low-energy control made %0d cycles for %0d tokens", le_cycles, NTOK);
    end
    checks++;
    if (slack_events[0] == 0) begin
      failures++;
      $display("ERROR: high-speed ROM never accepted input while holding output");
    end
    checks++;
    if (slack_events[1] != 0) begin
      failures++;
      $display("ERROR: low-energy ROM accepted input while holding output");
    end
    $display("high-speed slack events %0d, low-energy cycles %0d, don't-care tokens %0d",
             slack_events[0], le_cycles, e_dc[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
