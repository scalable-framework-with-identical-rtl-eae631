// logic_die: the logic die (LD) at the bottom of the stack, the memory controller of the
// 3-D memory.
//
// NI side: for every NoC interface a request engine (RE) and a read buffer (RB).
// Memory side: for every cone an arbitration tree (AT), which chooses among the REs and
// feeds the cone's memory pipeline, and a return-address decoder, which hands the cone's
// response chunks to the RB they belong to. Flow control on this die is request-grant
// (between REs and ATs) and valid/ready towards the NIs; the memory pipeline itself has no
// flow control, since every chunk in it already owns a place in an RB.
//
// Interface: ni_req_* / ni_rsp_* per NI; mem_req_* (to memory die 0) and mem_rsp_* (from
// memory die 0) per cone.
// Timing: a packet accepted in cycle t reaches memory die 0 in cycle t+2 at the earliest;
// a chunk arriving in cycle t lets its packet start leaving the RB in cycle t+1.
// The composition follows the paper (its block diagram and its description of the REs, ATs, RBs
// and return-address decoders).
module logic_die
  import numa_pkg::*;
#(
  parameter int unsigned N = N_NI
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // NoC interfaces
  input  logic      [N-1:0]        ni_req_valid,
  output logic      [N-1:0]        ni_req_ready,
  input  req_pkt_t  [N-1:0]        ni_req,
  output logic      [N-1:0]        ni_rsp_valid,
  input  logic      [N-1:0]        ni_rsp_ready,
  output rsp_flit_t [N-1:0]        ni_rsp,
  // memory pipeline, towards memory die 0
  output logic [N_CONE-1:0]        mem_req_valid,
  output req_chunk_t [N_CONE-1:0]  mem_req,
  input  logic [N_CONE-1:0]        mem_rsp_valid,
  input  rsp_chunk_t [N_CONE-1:0]  mem_rsp
);

  // RE -> AT request/grant, indexed [ni][cone] and transposed [cone][ni]
  logic       [N-1:0][N_CONE-1:0]  re_req, re_gnt;
  req_chunk_t [N-1:0][N_CONE-1:0]  re_chunk;
  logic       [N_CONE-1:0][N-1:0]  at_req, at_gnt;
  req_chunk_t [N_CONE-1:0][N-1:0]  at_chunk;
  logic       [N_CONE-1:0][N-1:0]  ret_valid;

  for (genvar n = 0; n < N; n++) begin : g_ni
    for (genvar c = 0; c < N_CONE; c++) begin : g_x
      assign at_req[c][n]   = re_req[n][c];
      assign at_chunk[c][n] = re_chunk[n][c];
      assign re_gnt[n][c]   = at_gnt[c][n];
    end

    logic              alloc, alloc_ready;
    rb_hdr_t           alloc_hdr;
    logic [TAG_W-1:0]  alloc_tag;
    logic [N_CONE-1:0] rb_valid;

    for (genvar c = 0; c < N_CONE; c++) begin : g_rv
      assign rb_valid[c] = ret_valid[c][n];
    end

    request_engine #(.NI_IDX(n)) u_re (
      .clk, .rst_n,
      .in_valid      (ni_req_valid[n]),
      .in_ready      (ni_req_ready[n]),
      .in_pkt        (ni_req[n]),
      .rb_alloc      (alloc),
      .rb_hdr        (alloc_hdr),
      .rb_alloc_ready(alloc_ready),
      .rb_tag        (alloc_tag),
      .at_req        (re_req[n]),
      .at_chunk      (re_chunk[n]),
      .at_gnt        (re_gnt[n])
    );

    read_buffer u_rb (
      .clk, .rst_n,
      .alloc      (alloc),
      .alloc_hdr  (alloc_hdr),
      .alloc_ready(alloc_ready),
      .alloc_tag  (alloc_tag),
      .rsp_valid  (rb_valid),
      .rsp        (mem_rsp),
      .out_valid  (ni_rsp_valid[n]),
      .out_ready  (ni_rsp_ready[n]),
      .out_flit   (ni_rsp[n])
    );
  end

  for (genvar c = 0; c < N_CONE; c++) begin : g_cone
    arbitration_tree #(.N(N)) u_at (
      .clk, .rst_n,
      .req      (at_req[c]),
      .chunk    (at_chunk[c]),
      .gnt      (at_gnt[c]),
      .out_valid(mem_req_valid[c]),
      .out_chunk(mem_req[c])
    );

    return_addr_decoder #(.N(N)) u_rad (
      .in_valid(mem_rsp_valid[c]),
      .in_chunk(mem_rsp[c]),
      .rb_valid(ret_valid[c])
    );
  end

endmodule
