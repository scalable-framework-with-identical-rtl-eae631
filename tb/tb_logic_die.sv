// tb_logic_die: self-checking testbench of the logic die with four NI agents and a
// testbench model of the memory pipeline. The model keeps the words, answers every chunk
// after a random 3 to 30 cycles (at most one answer per cone per cycle, so chunks of one
// packet come back out of order) and checks that each chunk reaches the cone its address
// belongs to. The agents check every response (see ni_agent). Requires that all four ports
// completed many packets and that arbitration conflicts, partial grants, full read
// buffers and out-of-order chunk arrival all occurred.
module tb_logic_die;
  import numa_pkg::*;
  logic clk = 0, rst_n = 0;
  logic      [N_NI-1:0] ni_req_valid, ni_req_ready, ni_rsp_valid, ni_rsp_ready;
  req_pkt_t  [N_NI-1:0] ni_req;
  rsp_flit_t [N_NI-1:0] ni_rsp;
  logic [N_CONE-1:0] mem_req_valid, mem_rsp_valid;
  req_chunk_t [N_CONE-1:0] mem_req;
  rsp_chunk_t [N_CONE-1:0] mem_rsp;
  int a_checks [N_NI], a_fail [N_NI], a_acc [N_NI], a_done [N_NI];
  int a_sfull [N_NI], a_sarb [N_NI], a_cross [N_NI], a_lat [N_NI];
  logic run = 0;
  int checks = 0, failures = 0, cyc = 0;

  logic [DATA_W-1:0] mem [logic [WADDR_W-1:0]];
  rsp_chunk_t pend [N_CONE][$];
  int         due  [N_CONE][$];

  logic_die dut (.clk, .rst_n, .ni_req_valid, .ni_req_ready, .ni_req, .ni_rsp_valid,
                 .ni_rsp_ready, .ni_rsp, .mem_req_valid, .mem_req, .mem_rsp_valid, .mem_rsp);

  bind read_buffer      tb_probe_rb  u_probe_rb (.clk, .rst_n, .rsp_valid, .rsp, .head, .head_done);
  bind request_engine   tb_probe_re  u_probe_re (.clk, .rst_n, .at_req, .at_gnt);
  bind arbitration_tree tb_probe_at #(.N(N)) u_probe_at (.clk, .rst_n, .req);

  for (genvar n = 0; n < N_NI; n++) begin : g_agent
    ni_agent #(.NI(n)) u_agent (
      .clk, .rst_n, .run, .ready_pct(70), .md_sel(-1), .one_word(1'b0), .line_mode(1'b0), .issue_pct(75),
      .req_valid(ni_req_valid[n]), .req_ready(ni_req_ready[n]), .req(ni_req[n]),
      .rsp_valid(ni_rsp_valid[n]), .rsp_ready(ni_rsp_ready[n]), .rsp(ni_rsp[n]),
      .checks(a_checks[n]), .failures(a_fail[n]), .accepted(a_acc[n]), .completed(a_done[n]),
      .stall_full(a_sfull[n]), .stall_arb(a_sarb[n]), .crossings(a_cross[n]),
      .last_latency(a_lat[n]));
  end

  always #5 clk = !clk;

  // memory pipeline model
  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int c = 0; c < N_CONE; c++) if (mem_req_valid[c]) begin
      logic [WADDR_W-1:0] wa;
      rsp_chunk_t r;
      wa = {mem_req[c].md, mem_req[c].row, CONE_W'(c)};
      r.ni = mem_req[c].ni; r.tag = mem_req[c].tag;
      if (mem_req[c].op == OP_STORE) begin
        mem[wa] = mem_req[c].wdata;
        r.rdata = '0;
      end else r.rdata = mem.exists(wa) ? mem[wa] : '0;
      pend[c].push_back(r);
      due[c].push_back(cyc + 3 + int'($urandom % 28));
    end
  end

  always @(negedge clk) begin
    mem_rsp_valid = '0;
    if (rst_n)
      for (int c = 0; c < N_CONE; c++) begin
        int best;
        best = -1;
        for (int k = 0; k < due[c].size(); k++)
          if (due[c][k] <= cyc && (best < 0 || due[c][k] < due[c][best])) best = k;
        if (best >= 0) begin
          mem_rsp_valid[c] = 1'b1;
          mem_rsp[c] = pend[c][best];
          pend[c].delete(best);
          due[c].delete(best);
        end
      end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run = 1;
    repeat (4000) @(posedge clk);
    run = 0;
    repeat (400) @(posedge clk);
    for (int n = 0; n < N_NI; n++) begin
      checks += a_checks[n] + 1;
      failures += a_fail[n];
      if (a_done[n] != a_acc[n] || a_done[n] < 300) begin
        failures++;
        $display("FAIL NI %0d: accepted %0d completed %0d", n, a_acc[n], a_done[n]);
      end
    end
    $display("stalls (rb full) %0d, stalls (arbitration) %0d, partial grants %0d, AT conflicts %0d, out-of-order chunks %0d",
             a_sfull[0] + a_sfull[1] + a_sfull[2] + a_sfull[3],
             a_sarb[0] + a_sarb[1] + a_sarb[2] + a_sarb[3],
             tb_cov_pkg::re_partial, tb_cov_pkg::at_conflict, tb_cov_pkg::rb_ooo);
    checks += 4;
    if (a_sfull[0] + a_sfull[1] + a_sfull[2] + a_sfull[3] == 0) begin
      failures++; $display("FAIL read buffer never full");
    end
    if (tb_cov_pkg::re_partial == 0) begin failures++; $display("FAIL no partial grant"); end
    if (tb_cov_pkg::at_conflict == 0) begin failures++; $display("FAIL no AT conflict"); end
    if (tb_cov_pkg::rb_ooo == 0) begin failures++; $display("FAIL no out-of-order chunk"); end
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
