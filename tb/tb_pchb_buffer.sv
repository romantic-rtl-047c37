// tb_pchb_buffer: a 1-of-4 PCHB stage between a random-delay source and sink.
// Checks that every token arrives intact and in order, that the output rails
// stay 1-of-4, and the half-buffer handshake order: L^e falls only while the
// output is valid, and the output returns to neutral only after R^e falls.
module tb_pchb_buffer;
  timeunit 1ns; timeprecision 1ps;

  localparam int N = 4;
  localparam int NTOK = 200;
  logic         rst_n;
  logic [N-1:0] l_d, r_d;
  logic         l_e, r_e;
  int checks = 0, failures = 0;
  int sent [NTOK];
  bit done = 0;

  pchb_buffer #(.N(N)) dut (.rst_n(rst_n), .l_d(l_d), .l_e(l_e), .r_d(r_d), .r_e(r_e));

  always @(negedge l_e) if (rst_n) begin
    checks++;
    if (r_d == '0) begin
      failures++;
      $display("ERROR: input acknowledged before output valid");
    end
  end

  always @(r_d) if (rst_n && r_d == '0) begin
    checks++;
    if (r_e) begin
      failures++;
      $display("ERROR: output reset while R^e high");
    end
  end

  initial begin
    l_d = '0;
    r_e = 1'b1;
    rst_n = 1'b0;
    #5 rst_n = 1'b1;
  end

  initial begin
    wait (rst_n);
    for (int k = 0; k < NTOK; k++) begin
      sent[k] = int'($urandom_range(N - 1, 0));
      wait (l_e);
      #($urandom_range(4, 1));
      l_d[sent[k]] = 1'b1;
      wait (!l_e);
      #($urandom_range(4, 1));
      l_d = '0;
    end
  end

  initial begin
    wait (rst_n);
    for (int k = 0; k < NTOK; k++) begin
      wait (r_d != '0);
      #1ps;
      checks++;
      if (r_d != (N'(1) << sent[k])) begin
        failures++;
        $display("ERROR: token %0d got %b expected rail %0d", k, r_d, sent[k]);
      end
      #($urandom_range(6, 1));
      r_e = 1'b0;
      wait (r_d == '0);
      #($urandom_range(6, 1));
      r_e = 1'b1;
    end
    done = 1;
  end

  initial begin
    wait (done);
    #5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
