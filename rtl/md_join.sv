// md_join: Join of one memory cone inside one memory die.
//
// Response chunks come from this die's memory array (loc_*) and from the die above
// (up_*). Each source writes into a FIFO of its own; every cycle a round-robin choice
// takes one chunk from a non-empty FIFO and registers it towards the die below (out_*),
// which is the response pipeline register between the dies. The memory pipeline has no
// back-pressure, so the FIFOs must never overflow: the number of chunks in flight in one
// cone is bounded by N_NI read buffers of MOT entries each, so DEPTH = N_NI*MOT is safe
// for any traffic. An assertion in the FIFO checks it.
//
// Timing: a chunk pushed in cycle t can be chosen in cycle t+1 and is at out_* in t+2.
// The two FIFOs and the round-robin choice follow the paper; the FIFO depth and the
// single priority bit are this design's choices.
module md_join
  import numa_pkg::*;
#(
  parameter int unsigned DEPTH = JOIN_FIFO_DEPTH
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        loc_valid,
  input  rsp_chunk_t  loc_chunk,
  input  logic        up_valid,
  input  rsp_chunk_t  up_chunk,
  output logic        out_valid,
  output rsp_chunk_t  out_chunk
);

  rsp_chunk_t loc_dout, up_dout;
  logic       loc_empty, up_empty, loc_full, up_full;
  logic       pop_loc, pop_up;
  logic       prio_up_q;        // 1: the upper FIFO wins a tie

  sync_fifo #(.T(rsp_chunk_t), .DEPTH(DEPTH)) u_loc_fifo (
    .clk, .rst_n, .push(loc_valid), .din(loc_chunk), .pop(pop_loc),
    .dout(loc_dout), .empty(loc_empty), .full(loc_full)
  );

  sync_fifo #(.T(rsp_chunk_t), .DEPTH(DEPTH)) u_up_fifo (
    .clk, .rst_n, .push(up_valid), .din(up_chunk), .pop(pop_up),
    .dout(up_dout), .empty(up_empty), .full(up_full)
  );

  always_comb begin
    pop_up  = !up_empty && (loc_empty || prio_up_q);
    pop_loc = !loc_empty && !pop_up;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prio_up_q <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= pop_up || pop_loc;
      if (pop_up)  prio_up_q <= 1'b0;
      if (pop_loc) prio_up_q <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (pop_up)       out_chunk <= up_dout;
    else if (pop_loc) out_chunk <= loc_dout;
  end

endmodule
