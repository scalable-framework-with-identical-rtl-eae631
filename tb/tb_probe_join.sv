// tb_probe_join: bound into every md_join; counts cycles in which both FIFOs hold chunks.
module tb_probe_join (
  input logic clk,
  input logic rst_n,
  input logic loc_empty,
  input logic up_empty
);
  always @(posedge clk) if (rst_n && !loc_empty && !up_empty) tb_cov_pkg::join_both++;
endmodule
