// read_buffer: read buffer (RB) of one NoC interface on the logic die.
//
// The RB decouples the request and response paths. It owns DEPTH (= MOT) entries; the
// request engine reserves one per accepted packet and stores there the packet's header
// (operation, transaction ID, length, first cone), so that only a small tag travels
// through the memory pipeline. Response chunks come back from the cones out of order and
// at different times, up to one per cone per cycle; each is written into its entry at the
// word position given by its cone, and a received-mask records it. When the oldest entry
// has all its chunks, the RB serializes it towards the NI as one flit per word (a store
// returns a single acknowledge flit) and frees the entry after the last flit.
//
// Interface: alloc_* from the request engine (alloc_tag is the entry the next packet gets;
// alloc_ready is low when all DEPTH entries are in use); rsp_valid/rsp per cone from the
// return-address decoders; out_* valid/ready flits towards the NI.
// Timing: a packet whose last chunk arrives in cycle t sends its first flit in t+1.
//
// Merging out-of-order chunks, keeping the header here and limiting outstanding
// transactions to MOT follow the paper. Entries are allocated and released in order
// (responses leave in request order) and the one-word-per-flit serialization are this
// design's choices.
module read_buffer
  import numa_pkg::*;
#(
  parameter int unsigned DEPTH = MOT
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // allocation by the request engine
  input  logic                     alloc,
  input  rb_hdr_t                  alloc_hdr,
  output logic                     alloc_ready,
  output logic [TAG_W-1:0]         alloc_tag,
  // response chunks, one port per cone
  input  logic [N_CONE-1:0]        rsp_valid,
  input  rsp_chunk_t [N_CONE-1:0]  rsp,
  // towards the NI
  output logic                     out_valid,
  input  logic                     out_ready,
  output rsp_flit_t                out_flit
);

  localparam int unsigned PW = TAG_W;

  rb_hdr_t                         hdr  [DEPTH];
  logic [N_CONE-1:0]               recv [DEPTH];
  logic [N_CONE-1:0][DATA_W-1:0]   data [DEPTH];
  logic [PW-1:0]                   head, tail;
  logic [PW:0]                     count;
  logic [LEN_W-1:0]                ser_idx;

  rb_hdr_t            h;
  logic [CONE_W-1:0]  cone;
  logic               head_done;
  logic               fire, last;

  function automatic logic [PW-1:0] incr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign alloc_ready = (count != (PW+1)'(DEPTH));
  assign alloc_tag   = tail;

  assign h         = hdr[head];
  assign head_done = (count != '0) && (recv[head] == cone_mask(h.start, h.len_m1));
  assign cone      = h.start + CONE_W'(ser_idx);
  assign last      = (h.op == OP_STORE) || (ser_idx == h.len_m1);
  assign fire      = out_valid && out_ready;

  assign out_valid     = head_done;
  assign out_flit.op   = h.op;
  assign out_flit.tid  = h.tid;
  assign out_flit.idx  = ser_idx;
  assign out_flit.last = last;
  assign out_flit.data = (h.op == OP_STORE) ? '0 : data[head][cone];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head    <= '0;
      tail    <= '0;
      count   <= '0;
      ser_idx <= '0;
    end else begin
      if (alloc) tail <= incr(tail);
      if (fire) begin
        if (last) begin
          head    <= incr(head);
          ser_idx <= '0;
        end else begin
          ser_idx <= ser_idx + 1'b1;
        end
      end
      count <= count + (PW+1)'(alloc) - (PW+1)'(fire && last);
    end
  end

  always_ff @(posedge clk) begin
    if (alloc) begin
      hdr[tail]  <= alloc_hdr;
      recv[tail] <= '0;
    end
    for (int c = 0; c < N_CONE; c++) begin
      if (rsp_valid[c]) begin
        recv[rsp[c].tag][c] <= 1'b1;
        data[rsp[c].tag][c] <= rsp[c].rdata;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(alloc && !alloc_ready))
    else $error("read_buffer: allocation while full");

endmodule
