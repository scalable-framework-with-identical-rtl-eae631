// tb_numa3d_top: end-to-end testbench of the whole stack at its default size (four NoC
// interfaces, eight cones, eight memory dies of 512 KB, MOT = 8), with every TSV link
// running on repair codes that shift signals around a (fault-free) TSV in each group.
//
// Phase 1 measures the non-uniform access time: one-word loads from a single NI to each
// die in turn, with the stack otherwise idle, must return their first flit 6 + 3*k cycles
// after acceptance for die k. Phase 2 runs random loads and stores of 1 to 8 words from
// all four NIs over all dies; the NI agents check every response against their own copy
// of memory. At the end every packet must have been answered and each mechanism of the
// design must have occurred: arbitration conflicts, partial grants, full read buffers,
// out-of-order chunk arrival, Joins merging two streams, accesses to every die, packets
// crossing a 64-byte line and repaired TSV groups.
module tb_numa3d_top;
  import numa_pkg::*;
  localparam int NMD = MAX_MD;
  localparam int CW  = $clog2(TSV_GROUP + 1);
  localparam int UP_W = MD_W + N_CONE * (1 + $bits(req_chunk_t));
  localparam int DN_W = N_CONE * (1 + $bits(rsp_chunk_t));
  localparam int G_UP = (UP_W + TSV_GROUP - 1) / TSV_GROUP;
  localparam int G_DN = (DN_W + TSV_GROUP - 1) / TSV_GROUP;

  logic clk = 0, rst_n = 0;
  logic      [N_NI-1:0] ni_req_valid, ni_req_ready, ni_rsp_valid, ni_rsp_ready;
  req_pkt_t  [N_NI-1:0] ni_req;
  rsp_flit_t [N_NI-1:0] ni_rsp;
  logic [NMD-1:0][G_UP-1:0][CW-1:0] tsv_cfg_up;
  logic [NMD-1:0][G_DN-1:0][CW-1:0] tsv_cfg_dn;

  int a_checks [N_NI], a_fail [N_NI], a_acc [N_NI], a_done [N_NI];
  int a_sfull [N_NI], a_sarb [N_NI], a_cross [N_NI], a_lat [N_NI];
  logic [N_NI-1:0] run = '0, one_word = '0;
  int ready_pct = 100, md_sel = -1;
  int checks = 0, failures = 0, repaired = 0;

  numa3d_top dut (.clk, .rst_n, .ni_req_valid, .ni_req_ready, .ni_req, .ni_rsp_valid,
                  .ni_rsp_ready, .ni_rsp, .tsv_cfg_up, .tsv_cfg_dn);

  bind read_buffer      tb_probe_rb   u_probe_rb (.clk, .rst_n, .rsp_valid, .rsp, .head, .head_done);
  bind request_engine   tb_probe_re   u_probe_re (.clk, .rst_n, .at_req, .at_gnt);
  bind arbitration_tree tb_probe_at #(.N(N)) u_probe_at (.clk, .rst_n, .req);
  bind md_join          tb_probe_join u_probe_join (.clk, .rst_n, .loc_empty, .up_empty);
  bind memory_die       tb_probe_md   u_probe_md (.clk, .rst_n, .die_id_in, .req_in_valid,
                                                  .req_up_valid_d(req_up_valid));

  for (genvar n = 0; n < N_NI; n++) begin : g_agent
    ni_agent #(.NI(n), .NMD(NMD)) u_agent (
      .clk, .rst_n, .run(run[n]), .ready_pct, .md_sel, .one_word(one_word[n]), .line_mode(1'b0), .issue_pct(75),
      .req_valid(ni_req_valid[n]), .req_ready(ni_req_ready[n]), .req(ni_req[n]),
      .rsp_valid(ni_rsp_valid[n]), .rsp_ready(ni_rsp_ready[n]), .rsp(ni_rsp[n]),
      .checks(a_checks[n]), .failures(a_fail[n]), .accepted(a_acc[n]), .completed(a_done[n]),
      .stall_full(a_sfull[n]), .stall_arb(a_sarb[n]), .crossings(a_cross[n]),
      .last_latency(a_lat[n]));
  end

  always #5 clk = !clk;

  task automatic need(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  int sum_full, sum_arb, sum_cross;

  initial begin
    // repair codes: every group skips one TSV (code TSV_GROUP would leave the spare unused)
    for (int b = 0; b < NMD; b++) begin
      for (int g = 0; g < G_UP; g++) tsv_cfg_up[b][g] = CW'($urandom % (TSV_GROUP + 1));
      for (int g = 0; g < G_DN; g++) tsv_cfg_dn[b][g] = CW'($urandom % (TSV_GROUP + 1));
    end
    for (int b = 0; b < NMD; b++) begin
      for (int g = 0; g < G_UP; g++) if (tsv_cfg_up[b][g] != CW'(TSV_GROUP)) repaired++;
      for (int g = 0; g < G_DN; g++) if (tsv_cfg_dn[b][g] != CW'(TSV_GROUP)) repaired++;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // phase 1: access time per die
    one_word[0] = 1'b1;
    for (int k = 0; k < NMD; k++) begin
      int a0;
      md_sel = k;
      a0 = a_acc[0];
      run[0] = 1'b1;
      while (a_acc[0] == a0) @(negedge clk);
      run[0] = 1'b0;
      repeat (60) @(negedge clk);
      need(a_done[0] == a_acc[0], $sformatf("die %0d load not answered", k));
      need(a_lat[0] == 6 + 3 * k, $sformatf("die %0d latency %0d, expected %0d", k, a_lat[0],
                                           6 + 3 * k));
      $display("die %0d: first flit %0d cycles after acceptance", k, a_lat[0]);
    end
    one_word[0] = 1'b0;

    // phase 2: random traffic from all NIs over all dies
    md_sel = -1;
    ready_pct = 70;
    run = '1;
    repeat (4000) @(posedge clk);
    run = '0;
    repeat (600) @(posedge clk);

    sum_full = 0; sum_arb = 0; sum_cross = 0;
    for (int n = 0; n < N_NI; n++) begin
      checks += a_checks[n];
      failures += a_fail[n];
      need(a_done[n] == a_acc[n] && a_done[n] > 200,
           $sformatf("NI %0d: accepted %0d completed %0d", n, a_acc[n], a_done[n]));
      sum_full += a_sfull[n]; sum_arb += a_sarb[n]; sum_cross += a_cross[n];
    end
    $display("packets per NI: %0d %0d %0d %0d", a_done[0], a_done[1], a_done[2], a_done[3]);
    $display("stalls on full read buffer %0d, on arbitration %0d", sum_full, sum_arb);
    $display("partial grants %0d, AT conflicts %0d, out-of-order chunks %0d, Join merges %0d",
             tb_cov_pkg::re_partial, tb_cov_pkg::at_conflict, tb_cov_pkg::rb_ooo,
             tb_cov_pkg::join_both);
    $display("line crossings %0d, repaired TSV groups %0d", sum_cross, repaired);
    need(sum_full > 0, "read buffer never full");
    need(sum_arb > 0, "no stall on arbitration");
    need(tb_cov_pkg::re_partial > 0, "no partial grant");
    need(tb_cov_pkg::at_conflict > 0, "no arbitration conflict");
    need(tb_cov_pkg::rb_ooo > 0, "no out-of-order chunk");
    need(tb_cov_pkg::join_both > 0, "no Join merging two streams");
    need(sum_cross > 0, "no packet crossing a line");
    need(repaired > 0, "no repaired TSV group");
    for (int k = 0; k < NMD; k++) begin
      $display("die %0d served %0d chunks", k, tb_cov_pkg::md_access[k]);
      need(tb_cov_pkg::md_access[k] > 0, $sformatf("die %0d never accessed", k));
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
