// c_tree: C-element completion tree over N signals, built from C-elements of
// at most FANIN inputs.
//
// Used for In^v (all input channels valid / all neutral), Out^v and Out^e
// (all output enables up / all down). Default fan-in 3 is min(mp, mn) for
// mp = 3, mn = 6, giving ceil(log_3 N) levels. The output rises only when
// every input is high and falls only when every input is low, as a single
// N-input C-element would, but with short series stacks. rst_n forces every
// C-element of the tree to RST_VAL (this design's choice; see c_element).
// No clock, no timing.
module c_tree #(
  parameter int   N       = 3,
  parameter int   FANIN   = 3,
  parameter logic RST_VAL = 1'b0
) (
  input  logic         rst_n,
  input  logic [N-1:0] in,
  output logic         out
);

  localparam int GROUPS = (N + FANIN - 1) / FANIN;

  if (N == 1) begin : g_wire
    assign out = in[0];
  end else if (N <= FANIN) begin : g_leaf
    c_element #(.N(N), .RST_VAL(RST_VAL)) u_c (.rst_n(rst_n), .in(in), .out(out));
  end else begin : g_node
    logic [GROUPS-1:0] grp;
    for (genvar g = 0; g < GROUPS; g++) begin : g_grp
      localparam int LO = g * FANIN;
      localparam int HI = (LO + FANIN > N) ? N - 1 : LO + FANIN - 1;
      if (HI == LO) begin : g_one
        assign grp[g] = in[LO];
      end else begin : g_c
        c_element #(.N(HI - LO + 1), .RST_VAL(RST_VAL)) u_c (
          .rst_n(rst_n), .in(in[HI:LO]), .out(grp[g]));
      end
    end
    c_tree #(.N(GROUPS), .FANIN(FANIN), .RST_VAL(RST_VAL)) u_up (
      .rst_n(rst_n), .in(grp), .out(out));
  end

endmodule
