// tb_probe_rb: bound into every read_buffer; counts response chunks that arrive for a
// younger packet while the oldest outstanding packet is still incomplete.
module tb_probe_rb
  import numa_pkg::*;
(
  input logic                    clk,
  input logic                    rst_n,
  input logic [N_CONE-1:0]       rsp_valid,
  input rsp_chunk_t [N_CONE-1:0] rsp,
  input logic [TAG_W-1:0]        head,
  input logic                    head_done
);
  always @(posedge clk) if (rst_n && !head_done)
    for (int c = 0; c < N_CONE; c++)
      if (rsp_valid[c] && rsp[c].tag != head) tb_cov_pkg::rb_ooo++;
endmodule
