// tb_probe_at: bound into every arbitration_tree; counts cycles with competing requests.
module tb_probe_at #(parameter int N = 4) (
  input logic         clk,
  input logic         rst_n,
  input logic [N-1:0] req
);
  always @(posedge clk) if (rst_n && !$onehot0(req)) tb_cov_pkg::at_conflict++;
endmodule
