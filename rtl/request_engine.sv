// request_engine: request engine (RE) of one NoC interface on the logic die.
//
// It takes one request packet per cycle from the NI (valid/ready), reserves an entry in the
// NI's read buffer for it and splits it into one-word chunks. Because memory is word-level
// interleaved and a packet is at most N_CONE words long, the chunks of one packet always go
// to different cones, so all of them are offered to the cones' arbitration trees in the
// same cycle. A chunk leaves when its tree grants it; chunks that lose arbitration are
// offered again in the next cycle. The next packet is accepted in the cycle the last
// pending chunk is granted, so with no conflicts the RE sustains one transaction per cycle.
//
// Interface: in_* from the NI; rb_* allocates the read-buffer entry whose index
// (rb_tag) travels with every chunk as its tag; at_req/at_chunk/at_gnt is the
// request-grant handshake with the arbitration tree of each cone (grant is combinational).
// Timing: a packet accepted in cycle t requests its cones from cycle t+1.
//
// The splitting into chunks, the parallel issue and the request-grant handshake follow the
// document. Reserving the read-buffer entry at acceptance and retrying partially granted
// packets are this design's choices.
module request_engine
  import numa_pkg::*;
#(
  parameter int unsigned NI_IDX = 0            // index of this NI, the chunks' return address
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // NI side
  input  logic                     in_valid,
  output logic                     in_ready,
  input  req_pkt_t                 in_pkt,
  // read-buffer allocation
  output logic                     rb_alloc,
  output rb_hdr_t                  rb_hdr,
  input  logic                     rb_alloc_ready,
  input  logic [TAG_W-1:0]         rb_tag,
  // arbitration trees, one per cone
  output logic [N_CONE-1:0]        at_req,
  output req_chunk_t [N_CONE-1:0]  at_chunk,
  input  logic [N_CONE-1:0]        at_gnt
);

  logic [N_CONE-1:0]       pend_q;
  req_chunk_t [N_CONE-1:0] chunk_q;
  logic [N_CONE-1:0]       rem;
  logic                    accept;
  logic [WADDR_W-1:0]      waddr;
  logic [CONE_W-1:0]       start;
  req_chunk_t [N_CONE-1:0] chunk_d;

  assign rem      = pend_q & ~at_gnt;
  assign in_ready = rb_alloc_ready && (rem == '0);
  assign accept   = in_valid && in_ready;

  assign waddr = in_pkt.addr[BADDR_W-1:3];
  assign start = waddr[CONE_W-1:0];

  assign rb_alloc      = accept;
  assign rb_hdr.op     = in_pkt.op;
  assign rb_hdr.tid    = in_pkt.tid;
  assign rb_hdr.len_m1 = in_pkt.len_m1;
  assign rb_hdr.start  = start;

  // Chunk for cone c carries word j = (c - start) mod N_CONE of the packet.
  always_comb begin
    for (int c = 0; c < N_CONE; c++) begin
      logic [CONE_W-1:0]  j;
      logic [WADDR_W-1:0] wa;
      j  = CONE_W'(c) - start;
      wa = waddr + WADDR_W'(j);
      chunk_d[c].ni    = NI_W'(NI_IDX);
      chunk_d[c].tag   = rb_tag;
      chunk_d[c].op    = in_pkt.op;
      chunk_d[c].md    = wa[WADDR_W-1 -: MD_W];
      chunk_d[c].row   = wa[CONE_W +: ROW_W];
      chunk_d[c].wdata = in_pkt.wdata[j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q <= '0;
    end else if (accept) begin
      pend_q <= cone_mask(start, in_pkt.len_m1);
    end else begin
      pend_q <= rem;
    end
  end

  always_ff @(posedge clk) begin
    if (accept) chunk_q <= chunk_d;
  end

  assign at_req   = pend_q;
  assign at_chunk = chunk_q;

  // A grant is only ever given to a pending request.
  assert property (@(posedge clk) disable iff (!rst_n) (at_gnt & ~pend_q) == '0)
    else $error("request_engine: grant without request");

endmodule
