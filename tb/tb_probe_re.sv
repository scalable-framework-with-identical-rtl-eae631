// tb_probe_re: bound into every request_engine; counts cycles with a partial grant.
module tb_probe_re
  import numa_pkg::*;
(
  input logic              clk,
  input logic              rst_n,
  input logic [N_CONE-1:0] at_req,
  input logic [N_CONE-1:0] at_gnt
);
  always @(posedge clk)
    if (rst_n && (at_gnt != '0) && ((at_req & ~at_gnt) != '0)) tb_cov_pkg::re_partial++;
endmodule
