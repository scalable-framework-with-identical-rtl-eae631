// tb_read_buffer: self-checking testbench of the read buffer. Random packets are
// allocated whenever the buffer has room; their response chunks are returned in random
// order, at most one per cone per cycle, so later packets often complete before earlier
// ones. The NI side applies random back-pressure. Every flit is compared with the packet
// it belongs to: responses must leave in allocation order, a load as one flit per word
// with the right data, a store as one acknowledge flit. Also checks that allocation stops
// at MOT outstanding packets and that out_valid rises exactly in the cycle after the last
// chunk of the oldest packet arrived.
module tb_read_buffer;
  import numa_pkg::*;
  logic clk = 0, rst_n = 0;
  logic alloc = 0, alloc_ready;
  rb_hdr_t alloc_hdr;
  logic [TAG_W-1:0] alloc_tag;
  logic [N_CONE-1:0] rsp_valid = '0;
  rsp_chunk_t [N_CONE-1:0] rsp;
  logic out_valid, out_ready = 0;
  rsp_flit_t out_flit;
  int checks = 0, failures = 0;

  typedef struct {
    rb_hdr_t h;
    logic [TAG_W-1:0] tag;
    logic [N_CONE-1:0] need, sent;
    logic [DATA_W-1:0] word [N_CONE];     // indexed by word position
  } pkt_t;
  pkt_t q[$];                              // outstanding, in allocation order
  int flit_idx = 0, done_pkts = 0, full_seen = 0, ooo = 0;
  int cyc = 0;

  read_buffer dut (.clk, .rst_n, .alloc, .alloc_hdr, .alloc_ready, .alloc_tag, .rsp_valid,
                   .rsp, .out_valid, .out_ready, .out_flit);

  always #5 clk = !clk;

  task automatic fail(input string s);
    failures++;
    $display("FAIL t=%0t %s", $time, s);
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    // occupancy and readiness, as they stood during this cycle
    checks++;
    if (alloc_ready !== (q.size() < MOT)) fail("alloc_ready does not match occupancy");
    checks++;
    if (out_valid !== (q.size() > 0 && q[0].sent == q[0].need))
      fail("out_valid does not match completion of the oldest packet");
    // check outputs
    if (out_valid && out_ready) begin
      checks++;
      if (q.size() == 0) fail("flit without packet");
      else begin
        int pos;
        logic [DATA_W-1:0] want;
        pos = flit_idx;
        want = (q[0].h.op == OP_STORE) ? '0 : q[0].word[pos];
        if (out_flit.op !== q[0].h.op || out_flit.tid !== q[0].h.tid ||
            out_flit.idx !== LEN_W'(pos) || out_flit.data !== want ||
            out_flit.last !== (q[0].h.op == OP_STORE || pos == int'(q[0].h.len_m1)))
          fail($sformatf("flit tid %0d idx %0d data %h want tid %0d idx %0d data %h",
               out_flit.tid, out_flit.idx, out_flit.data, q[0].h.tid, pos, want));
        if (out_flit.last) begin
          void'(q.pop_front()); flit_idx = 0; done_pkts++;
        end else flit_idx++;
      end
    end
    if (!alloc_ready) full_seen++;
    // chunks delivered this cycle
    for (int c = 0; c < N_CONE; c++) if (rsp_valid[c])
      for (int k = 0; k < q.size(); k++) if (q[k].tag == rsp[c].tag) begin
        q[k].sent[c] = 1'b1;
        if (q[k].sent == q[k].need && k > 0 && q[0].sent != q[0].need) ooo++;
      end
    // allocation this cycle
    if (alloc) begin
      pkt_t p;
      p.h = alloc_hdr; p.tag = alloc_tag; p.sent = '0;
      p.need = '0;
      for (int j = 0; j <= int'(alloc_hdr.len_m1); j++)
        p.need[(int'(alloc_hdr.start) + j) % N_CONE] = 1'b1;
      for (int j = 0; j < N_CONE; j++) p.word[j] = {$urandom, $urandom};
      q.push_back(p);
    end
  end

  // drive the inputs for the next cycle
  always @(negedge clk) if (rst_n) begin
    logic [N_CONE-1:0] busy;
    out_ready = ($urandom % 4) != 0;
    alloc = alloc_ready && (($urandom % 3) != 0);
    alloc_hdr.op = op_e'($urandom % 2);
    alloc_hdr.tid = TID_W'($urandom);
    alloc_hdr.len_m1 = LEN_W'($urandom);
    alloc_hdr.start = CONE_W'($urandom);
    busy = '0;
    rsp_valid = '0;
    for (int t = 0; t < 6; t++) begin
      int k;
      if (q.size() == 0) break;
      k = $urandom % q.size();
      for (int c = 0; c < N_CONE; c++)
        if (q[k].need[c] && !q[k].sent[c] && !busy[c] && ($urandom % 2)) begin
          int j;
          busy[c] = 1'b1;
          rsp_valid[c] = 1'b1;
          j = (c - int'(q[k].h.start) + N_CONE) % N_CONE;
          rsp[c].ni = '0;
          rsp[c].tag = q[k].tag;
          rsp[c].rdata = q[k].word[j];
          break;
        end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (6000) @(posedge clk);
    $display("packets %0d, full cycles %0d, out-of-order completions %0d", done_pkts,
             full_seen, ooo);
    checks++;
    if (done_pkts < 500 || full_seen == 0 || ooo == 0) fail("coverage too low");
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
