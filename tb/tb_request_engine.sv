// tb_request_engine: self-checking testbench of the request engine. Random loads and stores
// of 1 to 8 words at random addresses (including ones that cross a 64-byte line and the
// end of a die) meet random grants and a read buffer that is sometimes full. Every chunk
// the RE presents when granted is compared with one computed here from the packet; each
// packet must allocate one read-buffer entry with the right header, must not be accepted
// while chunks of the previous one are still waiting, and must not be accepted when the
// read buffer is full. With all grants given, one packet must be accepted every cycle.
module tb_request_engine;
  import numa_pkg::*;
  localparam int NI = 2;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  req_pkt_t in_pkt;
  logic rb_alloc, rb_alloc_ready = 1;
  rb_hdr_t rb_hdr;
  logic [TAG_W-1:0] rb_tag = '0;
  logic [N_CONE-1:0] at_req, at_gnt;
  req_chunk_t [N_CONE-1:0] at_chunk;
  int checks = 0, failures = 0;
  req_chunk_t expq [N_CONE][$];
  bit all_grant = 0;
  int accepts = 0, partial = 0, rb_stall = 0;

  request_engine #(.NI_IDX(NI)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_pkt, .rb_alloc,
    .rb_hdr, .rb_alloc_ready, .rb_tag, .at_req, .at_chunk, .at_gnt);

  always #5 clk = !clk;

  // grants: random subset of the requests, or all of them
  always_comb at_gnt = all_grant ? at_req : (at_req & gmask);
  logic [N_CONE-1:0] gmask;

  task automatic fail(input string s);
    failures++;
    $display("FAIL t=%0t %s", $time, s);
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < N_CONE; c++) if (at_gnt[c]) begin
      checks++;
      if (expq[c].size() == 0) fail($sformatf("unexpected chunk on cone %0d", c));
      else begin
        req_chunk_t e;
        e = expq[c].pop_front();
        if (at_chunk[c] !== e) fail($sformatf("cone %0d chunk %h want %h", c, at_chunk[c], e));
      end
    end
    if (in_valid && !in_ready && !rb_alloc_ready) rb_stall++;
    checks++;
    if (rb_alloc !== (in_valid && in_ready)) fail("rb_alloc differs from acceptance");
    if (in_valid && in_ready) begin
      logic [WADDR_W-1:0] wa0;
      accepts++;
      checks++;
      if (!rb_alloc_ready) fail("accepted while the read buffer is full");
      for (int c = 0; c < N_CONE; c++)
        if (expq[c].size() != 0) fail("accepted while chunks still pending");
      wa0 = in_pkt.addr[BADDR_W-1:3];
      checks++;
      if (rb_hdr.op !== in_pkt.op || rb_hdr.tid !== in_pkt.tid ||
          rb_hdr.len_m1 !== in_pkt.len_m1 || rb_hdr.start !== wa0[CONE_W-1:0])
        fail("read-buffer header");
      for (int j = 0; j <= int'(in_pkt.len_m1); j++) begin
        logic [WADDR_W-1:0] wa;
        req_chunk_t e;
        wa = wa0 + WADDR_W'(j);
        e.ni = NI_W'(NI); e.tag = rb_tag; e.op = in_pkt.op;
        e.md = MD_W'(wa >> (CONE_W + ROW_W));
        e.row = ROW_W'(wa >> CONE_W);
        e.wdata = in_pkt.wdata[j];
        expq[int'(wa % N_CONE)].push_back(e);
      end
      rb_tag <= rb_tag + 1'b1;
    end
  end

  always @(posedge clk) if (rst_n && at_req != '0 && (at_req & ~at_gnt) != '0) partial++;

  function automatic req_pkt_t rand_pkt();
    req_pkt_t p;
    p = req_pkt_t'('0);
    p.op = op_e'($urandom % 2);
    p.tid = TID_W'($urandom);
    p.len_m1 = LEN_W'($urandom);
    p.addr = BADDR_W'({$urandom} & ~32'h7);
    if ($urandom % 8 == 0) p.addr = {MD_W'($urandom), {(BADDR_W-MD_W-6){1'b1}}, 6'h30};
    for (int j = 0; j < N_CONE; j++) p.wdata[j] = {$urandom, $urandom};
    return p;
  endfunction

  initial begin
    gmask = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // phase 1: random grants and read-buffer back-pressure
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      gmask = N_CONE'($urandom);
      rb_alloc_ready = ($urandom % 8) != 0;
      in_valid = ($urandom % 4) != 0;
      in_pkt = rand_pkt();
    end
    // phase 2: full bandwidth, every request granted
    @(negedge clk) begin in_valid = 0; all_grant = 1; rb_alloc_ready = 1; end
    repeat (2) @(negedge clk);
    begin
      int a0;
      a0 = accepts;
      for (int i = 0; i < 100; i++) begin
        in_valid = 1; in_pkt = rand_pkt();
        @(negedge clk);
      end
      in_valid = 0;
      checks++;
      if (accepts - a0 != 100) fail($sformatf("%0d packets in 100 cycles at full bandwidth",
                                              accepts - a0));
    end
    repeat (5) @(posedge clk);
    for (int c = 0; c < N_CONE; c++) begin
      checks++;
      if (expq[c].size() != 0) fail($sformatf("cone %0d: %0d chunks never issued", c,
                                              expq[c].size()));
    end
    checks++;
    if (partial == 0 || rb_stall == 0) fail("partial grants or full read buffer never seen");
    $display("accepted %0d, partial-grant cycles %0d, rb-full stalls %0d", accepts, partial,
             rb_stall);
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
