// tb_rom_env: test environment for a QDI ROM with four-phase 1-of-n channels.
//
// Sources: one process per input channel sends NTOK tokens. Before a token it
// waits for that channel's enable, waits a random 0..MAXDLY time units, raises
// the chosen rail, waits for the enable to fall, waits again and returns the
// channel to neutral. Tokens are random input combinations that match exactly
// one row of the table (checked here by a software search of the table);
// combinations matching none (declared never to occur) are skipped.
// Sinks: one process per output channel waits for a valid rail, compares its
// index with the expected value, waits a random time (up to STALL extra units
// on every fourth token, to back the ROM up), lowers its enable, waits for
// neutral, waits again and raises the enable.
// Every fall of an input enable is checked to find that channel valid, and
// every return of an output channel to neutral to find its enable low.
// done rises when every sink has seen NTOK tokens.
module tb_rom_env #(
  parameter int N_IN  = 3,
  parameter int N_OUT = 5,
  parameter int ROWS  = 7,
  parameter int MAXW  = 8,
  parameter logic [0:N_IN-1][3:0]  IN_W  = 12'h342,
  parameter logic [0:N_OUT-1][3:0] OUT_W = 20'h28322,
  parameter logic [0:ROWS-1][0:N_IN-1][3:0]  IN_VAL  = '0,
  parameter logic [0:ROWS-1][0:N_OUT-1][3:0] OUT_VAL = '0,
  parameter int NTOK   = 50,
  parameter int MAXDLY = 5,
  parameter int STALL  = 20
) (
  input  logic                       rst_n,
  output logic [N_IN-1:0][MAXW-1:0]  in_d,
  input  logic [N_IN-1:0]            in_e,
  input  logic [N_OUT-1:0][MAXW-1:0] out_d,
  output logic [N_OUT-1:0]           out_e,
  output int                         checks,
  output int                         failures,
  output int                         dc_tokens,   // tokens served by a row with a don't-care
  output logic                       done
);

  int tok_in  [NTOK][N_IN];
  int tok_out [NTOK][N_OUT];
  bit tok_dc  [NTOK];
  int sink_cnt [N_OUT];
  int ch_checks [N_OUT];
  int ch_fail   [N_OUT];
  int src_checks [N_IN];
  int src_fail   [N_IN];
  int rst_checks [N_OUT];
  int rst_fail   [N_OUT];

  function automatic int find_row(input int v [N_IN], output int nmatch);
    int row = -1;
    nmatch = 0;
    for (int r = 0; r < ROWS; r++) begin
      bit ok = 1;
      for (int i = 0; i < N_IN; i++)
        if (IN_VAL[r][i] != 4'hF && int'(IN_VAL[r][i]) != v[i]) ok = 0;
      if (ok) begin
        nmatch++;
        row = r;
      end
    end
    return row;
  endfunction

  initial begin
    int v [N_IN];
    int r, nm;
    dc_tokens = 0;
    for (int k = 0; k < NTOK; k++) begin
      do begin
        for (int i = 0; i < N_IN; i++) v[i] = int'($urandom_range(int'(IN_W[i]) - 1, 0));
        r = find_row(v, nm);
      end while (nm != 1);
      tok_dc[k] = 0;
      for (int i = 0; i < N_IN; i++) begin
        tok_in[k][i] = v[i];
        if (IN_VAL[r][i] == 4'hF) tok_dc[k] = 1;
      end
      for (int j = 0; j < N_OUT; j++) tok_out[k][j] = int'(OUT_VAL[r][j]);
      if (tok_dc[k]) dc_tokens++;
    end
  end

  for (genvar i = 0; i < N_IN; i++) begin : g_src
    // An enable may fall only on a channel that holds a token.
    initial begin
      src_checks[i] = 0;
      src_fail[i] = 0;
    end
    always @(negedge in_e[i]) if (rst_n) begin
      src_checks[i]++;
      if (in_d[i] == '0) begin
        src_fail[i]++;
        $display("ERROR: input %0d acknowledged while neutral", i);
      end
    end

    initial begin
      in_d[i] = '0;
      wait (rst_n);
      for (int k = 0; k < NTOK; k++) begin
        wait (in_e[i]);
        #($urandom_range(MAXDLY, 1));
        in_d[i][tok_in[k][i]] = 1'b1;
        wait (!in_e[i]);
        #($urandom_range(MAXDLY, 1));
        in_d[i] = '0;
      end
    end
  end

  for (genvar j = 0; j < N_OUT; j++) begin : g_sink
    // A sender may return a channel to neutral only after its enable fell.
    logic ch_v;
    assign ch_v = |out_d[j];
    initial begin
      rst_checks[j] = 0;
      rst_fail[j] = 0;
    end
    always @(negedge ch_v) if (rst_n) begin
      rst_checks[j]++;
      if (out_e[j]) begin
        rst_fail[j]++;
        $display("ERROR: output %0d reset while its enable is high", j);
      end
    end

    initial begin
      int got;
      out_e[j] = 1'b1;
      sink_cnt[j] = 0;
      ch_checks[j] = 0;
      ch_fail[j] = 0;
      wait (rst_n);
      for (int k = 0; k < NTOK; k++) begin
        wait (|out_d[j]);
        #1ps;
        got = -1;
        for (int b = 0; b < MAXW; b++) if (out_d[j][b]) got = b;
        ch_checks[j]++;
        if (!$onehot(out_d[j]) || got != tok_out[k][j]) begin
          ch_fail[j]++;
          $display("ERROR: output %0d token %0d: rails %b, expected value %0d",
                   j, k, out_d[j], tok_out[k][j]);
        end
        #($urandom_range(MAXDLY, 1) + ((k % 4 == 3) ? STALL : 0));
        out_e[j] = 1'b0;
        wait (out_d[j] == '0);
        #($urandom_range(MAXDLY, 1));
        out_e[j] = 1'b1;
        sink_cnt[j]++;
      end
    end
  end

  always_comb begin
    done = 1'b1;
    checks = 0;
    failures = 0;
    for (int j = 0; j < N_OUT; j++) begin
      if (sink_cnt[j] != NTOK) done = 1'b0;
      checks += ch_checks[j] + rst_checks[j];
      failures += ch_fail[j] + rst_fail[j];
    end
    for (int i = 0; i < N_IN; i++) begin
      checks += src_checks[i];
      failures += src_fail[i];
    end
  end

endmodule
