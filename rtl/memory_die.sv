// memory_die: one memory die (MD) of the stack. All dies are the same design.
//
// For each of the N_CONE memory cones the die holds a Fork, one memory array and a Join,
// plus the pipeline registers that separate it from the next die:
//   request path   req_in (from below) -> Fork -> memory array    (address match)
//                                              -> register -> req_up (to the die above)
//   response path  memory array -> Join <- rsp_up (from the die above)
//                  Join -> register -> rsp_dn (to the die below)
// Since each die adds one register stage up and the Join stages down, the access time
// grows with the die index (NUMA behaviour), while the clock period does not depend on
// the number of dies.
//
// The die does not know its position: its index arrives on die_id_in from the die below
// and it passes die_id_in+1 to the die above, so every die can be built from one mask set.
// A store writes its word and returns an acknowledge chunk; a load returns the word.
//
// Timing: a chunk entering in cycle t that matches this die returns on rsp_dn in cycle
// t+3; one that goes to the die k levels up returns in t+3+3k.
// The Fork/Join structure and the pipeline registers between the dies follow the paper;
// the die-index chain and the acknowledge chunk for stores are this design's choices.
module memory_die
  import numa_pkg::*;
#(
  parameter int unsigned WORDS      = BANK_WORDS,
  parameter int unsigned FIFO_DEPTH = JOIN_FIFO_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [MD_W-1:0]          die_id_in,
  output logic [MD_W-1:0]          die_id_out,
  // request path
  input  logic [N_CONE-1:0]        req_in_valid,
  input  req_chunk_t [N_CONE-1:0]  req_in,
  output logic [N_CONE-1:0]        req_up_valid,
  output req_chunk_t [N_CONE-1:0]  req_up,
  // response path
  input  logic [N_CONE-1:0]        rsp_up_valid,
  input  rsp_chunk_t [N_CONE-1:0]  rsp_up,
  output logic [N_CONE-1:0]        rsp_dn_valid,
  output rsp_chunk_t [N_CONE-1:0]  rsp_dn
);

  assign die_id_out = die_id_in + 1'b1;

  for (genvar c = 0; c < N_CONE; c++) begin : g_cone
    logic        loc_valid, fwd_valid;
    logic        mem_rsp_valid;
    logic [NI_W-1:0]  mem_ni;
    logic [TAG_W-1:0] mem_tag;
    logic [DATA_W-1:0] rdata;
    logic        was_store;

    md_fork u_fork (
      .in_valid (req_in_valid[c]),
      .in_chunk (req_in[c]),
      .die_id   (die_id_in),
      .loc_valid(loc_valid),
      .up_valid (fwd_valid)
    );

    sram_bank #(.WORDS(WORDS), .W(DATA_W)) u_bank (
      .clk,
      .en   (loc_valid),
      .we   (req_in[c].op == OP_STORE),
      .addr (req_in[c].row[$clog2(WORDS)-1:0]),
      .wdata(req_in[c].wdata),
      .rdata(rdata)
    );

    // request pipeline register to the die above; metadata of the local access
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        req_up_valid[c] <= 1'b0;
        mem_rsp_valid   <= 1'b0;
      end else begin
        req_up_valid[c] <= fwd_valid;
        mem_rsp_valid   <= loc_valid;
      end
    end

    always_ff @(posedge clk) begin
      if (fwd_valid) req_up[c] <= req_in[c];
      if (loc_valid) begin
        mem_ni      <= req_in[c].ni;
        mem_tag     <= req_in[c].tag;
        was_store   <= (req_in[c].op == OP_STORE);
      end
    end

    rsp_chunk_t loc_chunk;
    always_comb begin
      loc_chunk.ni    = mem_ni;
      loc_chunk.tag   = mem_tag;
      loc_chunk.rdata = was_store ? '0 : rdata;
    end

    md_join #(.DEPTH(FIFO_DEPTH)) u_join (
      .clk, .rst_n,
      .loc_valid(mem_rsp_valid),
      .loc_chunk(loc_chunk),
      .up_valid (rsp_up_valid[c]),
      .up_chunk (rsp_up[c]),
      .out_valid(rsp_dn_valid[c]),
      .out_chunk(rsp_dn[c])
    );
  end

endmodule
