// tb_probe_md: bound into every memory_die; counts memory-array accesses per die index.
module tb_probe_md
  import numa_pkg::*;
(
  input logic              clk,
  input logic              rst_n,
  input logic [MD_W-1:0]   die_id_in,
  input logic [N_CONE-1:0] req_in_valid,
  input logic [N_CONE-1:0] req_up_valid_d
);
  // a chunk entering the die that is not forwarded upward is served by this die
  logic [N_CONE-1:0] in_q;
  always @(posedge clk) begin
    if (rst_n)
      for (int c = 0; c < N_CONE; c++)
        if (in_q[c] && !req_up_valid_d[c]) tb_cov_pkg::md_access[die_id_in]++;
    in_q <= rst_n ? req_in_valid : '0;
  end
endmodule
