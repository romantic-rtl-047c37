// or_tree: OR completion tree over N signals, built from OR gates of at most
// FANIN inputs.
//
// Used for the validity of one 1-of-n channel (OR of its rails) and for
// Decode^v (OR of all word lines). The default fan-in of 4 is
// floor(sqrt(mp*mn)) for mp = 3 series pMOS and mn = 6 series nMOS, so the
// number of gate levels is ceil(log_4 N), the depth model the design uses for
// its performance estimate. The first level groups consecutive inputs; further
// levels are built by instantiating the tree again on the group outputs.
// Purely combinational, no timing.
module or_tree #(
  parameter int N     = 4,
  parameter int FANIN = 4
) (
  input  logic [N-1:0] in,
  output logic         out
);

  localparam int GROUPS = (N + FANIN - 1) / FANIN;

  if (N <= FANIN) begin : g_leaf
    assign out = |in;
  end else begin : g_node
    logic [GROUPS-1:0] grp;
    for (genvar g = 0; g < GROUPS; g++) begin : g_grp
      localparam int LO = g * FANIN;
      localparam int HI = (LO + FANIN > N) ? N - 1 : LO + FANIN - 1;
      assign grp[g] = |in[HI:LO];
    end
    or_tree #(.N(GROUPS), .FANIN(FANIN)) u_up (.in(grp), .out(out));
  end

endmodule
