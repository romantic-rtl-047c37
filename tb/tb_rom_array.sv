// tb_rom_array: the example-table ROM plane, with (FEET = 1) and without
// (FEET = 0) the virtual-ground foot, driven directly. For each row the
// output rails must equal the row's table entry (written out below by hand),
// Out^v must rise only when all five channels are valid, and precharge
// (romp_ low) must clear the rails and Out^v. In the footed array, Out^v must
// also wait for romp_ (bigromp low), and precharge must work while the word
// line is still high.
module tb_rom_array;
  import romantic_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic rst_n, romp_;
  logic [EX_ROWS-1:0] dec;
  logic [EX_N_OUT-1:0][MAX_RAILS-1:0] out_f, out_n;
  logic big_f, big_n, ov_f, ov_n;
  int checks = 0, failures = 0;

  rom_array #(.FEET(1'b1)) dut_f (.rst_n(rst_n), .romp_(romp_), .dec(dec), .out_d(out_f),
                                  .bigromp(big_f), .out_v(ov_f));
  rom_array #(.FEET(1'b0)) dut_n (.rst_n(rst_n), .romp_(romp_), .dec(dec), .out_d(out_n),
                                  .bigromp(big_n), .out_v(ov_n));

  // channel values per row: x y z u w
  int table_v [EX_ROWS][EX_N_OUT] = '{
    '{1, 1, 1, 0, 0}, '{1, 2, 2, 0, 1}, '{1, 1, 1, 0, 1}, '{1, 1, 1, 1, 0},
    '{1, 1, 1, 1, 1}, '{1, 1, 1, 1, 0}, '{1, 1, 1, 1, 1}};

  task automatic check_rails(input int r, input logic valid);
    for (int j = 0; j < EX_N_OUT; j++) begin
      logic [MAX_RAILS-1:0] exp;
      exp = valid ? (MAX_RAILS'(1) << table_v[r][j]) : '0;
      checks++;
      if (out_f[j] !== exp || out_n[j] !== exp) begin
        failures++;
        $display("ERROR: row %0d ch %0d: feet %b nofeet %b expected %b", r, j, out_f[j], out_n[j], exp);
      end
    end
    checks++;
    if (ov_f !== valid || ov_n !== valid || big_f !== !romp_) begin
      failures++;
      $display("ERROR: row %0d Out^v feet %b nofeet %b expected %b", r, ov_f, ov_n, valid);
    end
  endtask

  initial begin
    dec = '0;
    romp_ = 1'b0;
    rst_n = 1'b0;
    #1 rst_n = 1'b1;
    for (int r = 0; r < EX_ROWS; r++) begin
      romp_ = 1'b1;
      #1 check_rails(r, 1'b0);
      dec[r] = 1'b1;
      #1 check_rails(r, 1'b1);
      dec = '0;
      #1 check_rails(r, 1'b1);          // held by the keepers
      romp_ = 1'b0;
      #1 check_rails(r, 1'b0);
    end
    // footed array only: precharge while the word line stays high
    rst_n = 1'b0;   // keep the footless instance's rule check quiet
    #1 rst_n = 1'b1;
    force dut_n.dec = '0;
    romp_ = 1'b1;
    dec[3] = 1'b1;
    #1;
    checks++;
    if (ov_f !== 1'b1) begin failures++; $display("ERROR: footed array did not evaluate"); end
    romp_ = 1'b0;
    #1;
    checks++;
    if (out_f !== '0 || ov_f !== 1'b0) begin
      failures++;
      $display("ERROR: footed array did not precharge with word line high");
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
