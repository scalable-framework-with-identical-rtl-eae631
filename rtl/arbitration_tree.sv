// arbitration_tree: arbitration tree (AT) of one memory cone on the logic die.
//
// Each cycle it picks one of the N_NI request engines that want this cone and grants it
// (combinationally, in the same cycle as the request). The choice is made by a binary tree
// of two-input nodes; every node keeps one priority bit and, after passing a grant towards
// one side, turns its priority to the other side. This is round robin at every node but not
// exactly over all requesters, i.e. pseudo round robin. The granted chunk is registered
// into the first stage of the cone's memory pipeline; that pipeline has no back-pressure,
// so whenever any request is present exactly one grant is given.
//
// Interface: req/chunk/gnt per request engine; out_valid/out_chunk towards the first
// memory die. Timing: a chunk granted in cycle t is at out_* in cycle t+1.
//
// The tree and the pseudo round-robin policy are named by the paper; the per-node
// priority bit is this design's reading of them. N_NI must be a power of two.
module arbitration_tree
  import numa_pkg::*;
#(
  parameter int unsigned N = N_NI
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  req_chunk_t [N-1:0]   chunk,
  output logic [N-1:0]         gnt,
  output logic                 out_valid,
  output req_chunk_t           out_chunk
);

  localparam int unsigned LVL = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned NN  = 1 << LVL;      // leaves of the complete tree

  // Heap-numbered tree: node k has children 2k and 2k+1, leaves are NN..2NN-1.
  logic [2*NN-1:1] any;        // some request below node k
  logic [NN-1:1]   prio_q;     // 1: node k prefers its right child
  logic [NN-1:1]   sel;        // 1: node k picks its right child
  logic [NN-1:1]   on_path;    // node k lies on the winner's path
  logic [LVL-1:0]  winner;

  always_comb begin
    any = '0;
    for (int i = 0; i < NN; i++) any[NN + i] = (i < N) ? req[i] : 1'b0;
    for (int k = NN - 1; k >= 1; k--) begin
      any[k] = any[2*k] | any[2*k+1];
      sel[k] = any[2*k+1] && (!any[2*k] || prio_q[k]);
    end
    // walk down from the root along the selected children
    on_path = '0;
    begin
      int k;
      k = 1;
      for (int l = 0; l < LVL; l++) begin
        on_path[k] = 1'b1;
        k = 2*k + int'(sel[k]);
      end
      winner = LVL'(k - NN);
    end
    gnt = '0;
    if (any[1]) gnt[winner] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prio_q    <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= any[1];
      if (any[1])
        for (int k = 1; k < NN; k++)
          if (on_path[k]) prio_q[k] <= !sel[k];
    end
  end

  always_ff @(posedge clk) begin
    if (any[1]) out_chunk <= chunk[winner];
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt) && ((gnt & ~req) == '0))
    else $error("arbitration_tree: illegal grant vector");

endmodule
