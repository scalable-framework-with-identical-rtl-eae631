// tb_arbitration_tree: self-checking testbench of the arbitration tree. Random request
// patterns: the grant must be one-hot, go to a requester whenever there is one, and the
// granted chunk must appear registered one cycle later. With all requesters active the
// tree must serve each of them once in every N cycles (round robin), and no requester may
// wait N cycles or more while it keeps requesting (no starvation).
module tb_arbitration_tree;
  import numa_pkg::*;
  localparam int N = N_NI;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req = '0, gnt;
  req_chunk_t [N-1:0] chunk;
  logic out_valid;
  req_chunk_t out_chunk;
  int checks = 0, failures = 0;
  int wait_cnt [N];
  bit exp_valid = 0;
  req_chunk_t exp_chunk;
  int served [N];

  arbitration_tree dut (.clk, .rst_n, .req, .chunk, .gnt, .out_valid, .out_chunk);

  always #5 clk = !clk;

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (out_valid !== exp_valid || (exp_valid && out_chunk !== exp_chunk)) begin
      failures++;
      $display("FAIL registered output mismatch at %0t", $time);
    end
    checks++;
    if (!$onehot0(gnt) || (gnt & ~req) != '0 || ((req != '0) && (gnt == '0))) begin
      failures++;
      $display("FAIL grant %b for requests %b", gnt, req);
    end
    exp_valid = (gnt != '0);
    for (int n = 0; n < N; n++) begin
      if (gnt[n]) begin exp_chunk = chunk[n]; served[n]++; end
      if (req[n] && !gnt[n]) wait_cnt[n]++; else wait_cnt[n] = 0;
      if (wait_cnt[n] >= N) begin
        failures++;
        $display("FAIL requester %0d waited %0d cycles", n, wait_cnt[n]);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // phase 1: everybody requests continuously; each must get exactly 1/N of the grants
    for (int n = 0; n < N; n++) served[n] = 0;
    for (int i = 0; i < 40 * N; i++) begin
      @(negedge clk);
      req = '1;
      for (int n = 0; n < N; n++) chunk[n] = req_chunk_t'({$urandom, $urandom, $urandom});
    end
    @(posedge clk);
    // the window may cut one rotation: counts differ by at most one
    for (int n = 0; n < N; n++) begin
      checks++;
      if (served[n] < 39 || served[n] > 41 || served[n] - served[0] > 1 ||
          served[0] - served[n] > 1) begin
        failures++;
        $display("FAIL requester %0d served %0d of about 40", n, served[n]);
      end
    end
    // phase 2: random requests that persist until granted
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      for (int n = 0; n < N; n++) chunk[n] = req_chunk_t'({$urandom, $urandom, $urandom});
      req = N'($urandom);
    end
    @(negedge clk) req = '0;
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
