// tb_workload_l2: workload testbench of the full default stack (eight dies, 4 MB).
//
// Part 1, one transaction per cycle: a single NI offers a one-word load every cycle and
// takes every response at once. For die 0 the stack must accept a packet in (nearly)
// every cycle. Farther dies are limited by the MOT read-buffer entries: an entry is busy
// from acceptance until its flit leaves, 6+3k cycles later, plus one cycle to free it,
// so the sustained rate for die k is min(1, MOT/(7+3k)) packets per cycle. The testbench
// measures the rate for every die and compares it with that formula.
// Part 2, L1 refills and write-backs: all four NIs issue whole 64-byte lines (eight words
// from cone 0), loads and stores mixed, over all dies, as an L2 serving cache misses. All
// data is checked by the NI agents, every packet must complete, and the delivered load
// bandwidth is reported.
module tb_workload_l2;
  import numa_pkg::*;
  localparam int NMD  = MAX_MD;
  localparam int CW   = $clog2(TSV_GROUP + 1);
  localparam int UP_W = MD_W + N_CONE * (1 + $bits(req_chunk_t));
  localparam int DN_W = N_CONE * (1 + $bits(rsp_chunk_t));
  localparam int G_UP = (UP_W + TSV_GROUP - 1) / TSV_GROUP;
  localparam int G_DN = (DN_W + TSV_GROUP - 1) / TSV_GROUP;
  localparam int WINDOW = 400;

  logic clk = 0, rst_n = 0;
  logic      [N_NI-1:0] ni_req_valid, ni_req_ready, ni_rsp_valid, ni_rsp_ready;
  req_pkt_t  [N_NI-1:0] ni_req;
  rsp_flit_t [N_NI-1:0] ni_rsp;
  logic [NMD-1:0][G_UP-1:0][CW-1:0] tsv_cfg_up;
  logic [NMD-1:0][G_DN-1:0][CW-1:0] tsv_cfg_dn;

  int a_checks [N_NI], a_fail [N_NI], a_acc [N_NI], a_done [N_NI];
  int a_sfull [N_NI], a_sarb [N_NI], a_cross [N_NI], a_lat [N_NI];
  logic [N_NI-1:0] run = '0;
  logic one_word = 1'b0, line_mode = 1'b0;
  int md_sel = 0;
  int checks = 0, failures = 0, cyc = 0, load_flits = 0;

  numa3d_top dut (.clk, .rst_n, .ni_req_valid, .ni_req_ready, .ni_req, .ni_rsp_valid,
                  .ni_rsp_ready, .ni_rsp, .tsv_cfg_up, .tsv_cfg_dn);

  for (genvar n = 0; n < N_NI; n++) begin : g_agent
    ni_agent #(.NI(n), .NMD(NMD)) u_agent (
      .clk, .rst_n, .run(run[n]), .ready_pct(100), .md_sel, .one_word, .line_mode,
      .issue_pct(100),
      .req_valid(ni_req_valid[n]), .req_ready(ni_req_ready[n]), .req(ni_req[n]),
      .rsp_valid(ni_rsp_valid[n]), .rsp_ready(ni_rsp_ready[n]), .rsp(ni_rsp[n]),
      .checks(a_checks[n]), .failures(a_fail[n]), .accepted(a_acc[n]), .completed(a_done[n]),
      .stall_full(a_sfull[n]), .stall_arb(a_sarb[n]), .crossings(a_cross[n]),
      .last_latency(a_lat[n]));
  end

  always #5 clk = !clk;
  always @(posedge clk) begin
    cyc++;
    for (int n = 0; n < N_NI; n++)
      if (ni_rsp_valid[n] && ni_rsp_ready[n] && ni_rsp[n].op == OP_LOAD) load_flits++;
  end

  task automatic need(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int b = 0; b < NMD; b++) begin
      for (int g = 0; g < G_UP; g++) tsv_cfg_up[b][g] = CW'(TSV_GROUP);
      for (int g = 0; g < G_DN; g++) tsv_cfg_dn[b][g] = CW'(TSV_GROUP);
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // part 1: sustained one-word loads from NI 0, die by die
    one_word = 1'b1;
    for (int k = 0; k < NMD; k++) begin
      int a0, a1;
      real rate, expect_rate;
      md_sel = k;
      run[0] = 1'b1;
      repeat (50) @(negedge clk);                 // reach steady state
      a0 = a_acc[0];
      repeat (WINDOW) @(negedge clk);
      a1 = a_acc[0];
      run[0] = 1'b0;
      repeat (60) @(negedge clk);
      rate = real'(a1 - a0) / WINDOW;
      expect_rate = real'(MOT) / (7 + 3 * k);
      if (expect_rate > 1.0) expect_rate = 1.0;
      $display("die %0d: %0.3f packets/cycle sustained, model %0.3f", k, rate, expect_rate);
      need(rate > expect_rate - 0.02 && rate < expect_rate + 0.02,
           $sformatf("die %0d sustained rate %0.3f, expected %0.3f", k, rate, expect_rate));
    end
    one_word = 1'b0;

    // part 2: L1 line refills and write-backs from all NIs over all dies
    begin
      int c0, f0, p0;
      line_mode = 1'b1;
      md_sel = -1;
      c0 = cyc; f0 = load_flits;
      p0 = a_done[0] + a_done[1] + a_done[2] + a_done[3];
      run = '1;
      repeat (3000) @(negedge clk);
      run = '0;
      repeat (300) @(negedge clk);
      $display("line traffic: %0d lines in %0d cycles, %0.2f bytes/cycle of load data",
               a_done[0] + a_done[1] + a_done[2] + a_done[3] - p0, cyc - c0,
               8.0 * real'(load_flits - f0) / real'(cyc - c0));
    end
    for (int n = 0; n < N_NI; n++) begin
      checks += a_checks[n];
      failures += a_fail[n];
      need(a_done[n] == a_acc[n], $sformatf("NI %0d: accepted %0d completed %0d", n, a_acc[n],
                                            a_done[n]));
      need(a_done[n] > 100, $sformatf("NI %0d completed only %0d packets", n, a_done[n]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
