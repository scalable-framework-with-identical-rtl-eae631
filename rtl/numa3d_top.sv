// numa3d_top: 3-D NUMA L2 memory stack, a logic die with NUM_MD identical memory dies
// stacked on it.
//
// The stack is an L2 scratchpad memory reached from a cluster-based multicore through
// N_NI NoC interfaces. Requests (loads and stores of 1 to 8 words) are split on the logic
// die into one-word chunks that climb the N_CONE memory cones in parallel; in every die the
// Fork keeps the chunks addressed to it and passes the others up, and the Join merges the
// die's responses with those from above on their way down. Every die boundary is a pipeline
// register, so dies can be added without slowing the clock, and the access time grows with
// the die index (non-uniform memory access).
//
// Each vertical link between two dies (upward: die index and request chunks; downward:
// response chunks) passes through TSVs with one spare per 25 signals; the repair codes
// tsv_cfg_up[b] / tsv_cfg_dn[b] of the boundary below die b choose which TSV of each group
// is left out (code 25 = none, see tsv_repair_tx). They are static configuration inputs,
// e.g. written after stack test.
//
// Interface: per NI a request port (valid/ready, whole packet) and a response port
// (valid/ready, one flit per word). Timing: a one-word load to die k accepted in cycle t
// presents its flit in cycle t+6+3k when nothing else is in flight: one cycle in the
// request engine, one in the arbitration tree, one up per die boundary passed, three in
// the target die (array, Join FIFO, Join register), two per die on the way down (Join
// FIFO and register) and one in the read buffer.
// The structure follows the paper (its block diagram and architecture description); the packet formats, address map,
// latency numbers and the TSV link arrangement are this design's choices.
module numa3d_top
  import numa_pkg::*;
#(
  parameter int unsigned NUM_MD = MAX_MD,
  localparam int unsigned CW    = $clog2(TSV_GROUP + 1),
  localparam int unsigned UP_W  = MD_W + N_CONE * (1 + $bits(req_chunk_t)),
  localparam int unsigned DN_W  = N_CONE * (1 + $bits(rsp_chunk_t)),
  localparam int unsigned G_UP  = (UP_W + TSV_GROUP - 1) / TSV_GROUP,
  localparam int unsigned G_DN  = (DN_W + TSV_GROUP - 1) / TSV_GROUP
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  // NoC interfaces
  input  logic      [N_NI-1:0]                 ni_req_valid,
  output logic      [N_NI-1:0]                 ni_req_ready,
  input  req_pkt_t  [N_NI-1:0]                 ni_req,
  output logic      [N_NI-1:0]                 ni_rsp_valid,
  input  logic      [N_NI-1:0]                 ni_rsp_ready,
  output rsp_flit_t [N_NI-1:0]                 ni_rsp,
  // TSV repair codes, boundary b lies below memory die b
  input  logic [NUM_MD-1:0][G_UP-1:0][CW-1:0]  tsv_cfg_up,
  input  logic [NUM_MD-1:0][G_DN-1:0][CW-1:0]  tsv_cfg_dn
);

  // signals on the sending and receiving side of every boundary
  logic [NUM_MD-1:0][UP_W-1:0]              up_tx, up_rx;
  logic [NUM_MD-1:0][DN_W-1:0]              dn_tx, dn_rx;
  logic [NUM_MD-1:0][G_UP*(TSV_GROUP+1)-1:0] up_tsv;
  logic [NUM_MD-1:0][G_DN*(TSV_GROUP+1)-1:0] dn_tsv;

  // ---- logic die ----------------------------------------------------------------
  logic       [N_CONE-1:0] ld_req_valid, ld_rsp_valid;
  req_chunk_t [N_CONE-1:0] ld_req;
  rsp_chunk_t [N_CONE-1:0] ld_rsp;

  logic_die #(.N(N_NI)) u_ld (
    .clk, .rst_n,
    .ni_req_valid, .ni_req_ready, .ni_req,
    .ni_rsp_valid, .ni_rsp_ready, .ni_rsp,
    .mem_req_valid(ld_req_valid),
    .mem_req      (ld_req),
    .mem_rsp_valid(ld_rsp_valid),
    .mem_rsp      (ld_rsp)
  );

  assign up_tx[0] = {MD_W'(0), ld_req_valid, ld_req};
  assign {ld_rsp_valid, ld_rsp} = dn_rx[0];

  // ---- TSV links --------------------------------------------------------------------
  for (genvar b = 0; b < NUM_MD; b++) begin : g_link
    tsv_repair_tx #(.W(UP_W)) u_up_tx (.data(up_tx[b]), .cfg(tsv_cfg_up[b]), .tsv(up_tsv[b]));
    tsv_repair_rx #(.W(UP_W)) u_up_rx (.tsv(up_tsv[b]), .cfg(tsv_cfg_up[b]), .data(up_rx[b]));
    tsv_repair_tx #(.W(DN_W)) u_dn_tx (.data(dn_tx[b]), .cfg(tsv_cfg_dn[b]), .tsv(dn_tsv[b]));
    tsv_repair_rx #(.W(DN_W)) u_dn_rx (.tsv(dn_tsv[b]), .cfg(tsv_cfg_dn[b]), .data(dn_rx[b]));
  end

  // ---- memory dies ------------------------------------------------------------------
  for (genvar d = 0; d < NUM_MD; d++) begin : g_md
    logic [MD_W-1:0]         id_in, id_out;
    logic [N_CONE-1:0]       req_in_valid, req_up_valid, rsp_up_valid, rsp_dn_valid;
    req_chunk_t [N_CONE-1:0] req_in, req_up;
    rsp_chunk_t [N_CONE-1:0] rsp_up, rsp_dn;

    assign {id_in, req_in_valid, req_in} = up_rx[d];
    assign dn_tx[d] = {rsp_dn_valid, rsp_dn};

    if (d + 1 < NUM_MD) begin : g_above
      assign up_tx[d+1] = {id_out, req_up_valid, req_up};
      assign {rsp_up_valid, rsp_up} = dn_rx[d+1];
    end else begin : g_top
      // nothing above the top die
      assign rsp_up_valid = '0;
      assign rsp_up       = '0;
      assert property (@(posedge clk) disable iff (!rst_n) req_up_valid == '0)
        else $error("numa3d_top: access beyond the installed memory dies");
    end

    memory_die u_md (
      .clk, .rst_n,
      .die_id_in   (id_in),
      .die_id_out  (id_out),
      .req_in_valid(req_in_valid),
      .req_in      (req_in),
      .req_up_valid(req_up_valid),
      .req_up      (req_up),
      .rsp_up_valid(rsp_up_valid),
      .rsp_up      (rsp_up),
      .rsp_dn_valid(rsp_dn_valid),
      .rsp_dn      (rsp_dn)
    );
  end

endmodule
