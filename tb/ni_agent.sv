// ni_agent: testbench model of one NoC interface talking to the memory stack.
//
// It issues random loads and stores of 1 to 8 words through the request port, keeping
// each packet stable until it is accepted, and drains the response port with a random
// ready. It keeps its own reference copy of the words it wrote and checks every response
// flit: packets must come back in request order, with the right transaction ID, word index,
// last flag and, for loads of words it has written, the right data. Each agent uses only
// addresses whose two upper row bits equal its NI index, so agents never share a word and
// the reference copy is exact.
//
// Control: run enables new packets; ready_pct is the chance of rsp_ready per cycle;
// md_sel >= 0 pins the die of every packet, one_word makes every packet a one-word load,
// line_mode makes every packet a whole 64-byte line (eight words from cone 0), as an L1
// refill or write-back; issue_pct is the chance of offering a new packet in a cycle.
// Statistics: checks/failures of its own comparisons, accepted and completed packets,
// cycles stalled with MOT packets outstanding (read buffer full) or with fewer (chunks
// not yet granted), packets that crossed a 64-byte line, and the cycles from acceptance
// to the first response flit of the latest packet.
module ni_agent
  import numa_pkg::*;
#(
  parameter int NI       = 0,
  parameter int NMD      = MAX_MD,
  parameter int ROW_SPAN = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       run,
  input  int         ready_pct,
  input  int         md_sel,
  input  logic       one_word,
  input  logic       line_mode,
  input  int         issue_pct,
  output logic       req_valid,
  input  logic       req_ready,
  output req_pkt_t   req,
  input  logic       rsp_valid,
  output logic       rsp_ready,
  input  rsp_flit_t  rsp,
  output int         checks,
  output int         failures,
  output int         accepted,
  output int         completed,
  output int         stall_full,
  output int         stall_arb,
  output int         crossings,
  output int         last_latency
);

  typedef struct {
    req_pkt_t          p;
    logic [DATA_W-1:0] word  [N_CONE];
    bit                known [N_CONE];
    int                acc_cyc;
  } exp_t;

  logic [DATA_W-1:0] model [logic [WADDR_W-1:0]];
  exp_t              q [$];
  int                idx = 0, cyc = 0;
  bit                first_seen = 0;
  bit                taken = 0;       // the current packet was accepted at the last edge

  initial begin
    checks = 0; failures = 0; accepted = 0; completed = 0; stall_full = 0; stall_arb = 0;
    crossings = 0; last_latency = -1;
    req_valid = 0; rsp_ready = 0;
  end

  function automatic req_pkt_t make_pkt();
    req_pkt_t p;
    logic [MD_W-1:0]   md;
    logic [ROW_W-1:0]  row;
    logic [CONE_W-1:0] cone;
    p = req_pkt_t'('0);
    md   = (md_sel >= 0) ? MD_W'(md_sel) : MD_W'($urandom % NMD);
    row  = {2'(NI), (ROW_W-2)'($urandom % ROW_SPAN)};
    cone = line_mode ? '0 : CONE_W'($urandom);
    p.addr   = {md, row, cone, 3'b000};
    p.op     = one_word ? OP_LOAD : op_e'($urandom % 2);
    p.len_m1 = one_word ? '0 : line_mode ? LEN_W'(N_CONE - 1) : LEN_W'($urandom);
    p.tid    = TID_W'($urandom);
    for (int j = 0; j < N_CONE; j++) p.wdata[j] = {$urandom, $urandom};
    return p;
  endfunction

  always @(posedge clk) if (rst_n) begin
    cyc++;
    taken = req_valid && req_ready;
    if (req_valid && !req_ready) begin
      if (q.size() >= MOT) stall_full++; else stall_arb++;
    end
    // response flit
    if (rsp_valid && rsp_ready) begin
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL NI %0d: response without request", NI);
      end else begin
        exp_t e;
        bit last;
        e = q[0];
        last = (e.p.op == OP_STORE) || (idx == int'(e.p.len_m1));
        if (!first_seen) begin
          last_latency = cyc - e.acc_cyc;
          first_seen = 1;
        end
        if (rsp.op !== e.p.op || rsp.tid !== e.p.tid || rsp.idx !== LEN_W'(idx) ||
            rsp.last !== last ||
            (e.p.op == OP_LOAD && e.known[idx] && rsp.data !== e.word[idx])) begin
          failures++;
          $display("FAIL NI %0d tid %0d word %0d: got op %0d tid %0d idx %0d last %0b data %h, want data %h",
                   NI, e.p.tid, idx, rsp.op, rsp.tid, rsp.idx, rsp.last, rsp.data, e.word[idx]);
        end
        if (last) begin
          void'(q.pop_front());
          idx = 0;
          first_seen = 0;
          completed++;
        end else idx++;
      end
    end
    // request acceptance
    if (req_valid && req_ready) begin
      exp_t e;
      logic [WADDR_W-1:0] wa0;
      e.p = req;
      e.acc_cyc = cyc;
      wa0 = req.addr[BADDR_W-1:3];
      if (int'(wa0[CONE_W-1:0]) + int'(req.len_m1) >= N_CONE) crossings++;
      for (int j = 0; j < N_CONE; j++) begin
        logic [WADDR_W-1:0] wa;
        wa = wa0 + WADDR_W'(j);
        e.known[j] = 0;
        e.word[j]  = '0;
        if (j <= int'(req.len_m1)) begin
          if (req.op == OP_STORE) model[wa] = req.wdata[j];
          else if (model.exists(wa)) begin
            e.known[j] = 1;
            e.word[j]  = model[wa];
          end
        end
      end
      q.push_back(e);
      accepted++;
    end
  end

  always @(negedge clk) begin
    rsp_ready <= rst_n && (($urandom % 100) < ready_pct);
    if (!rst_n) req_valid <= 1'b0;
    else if (!req_valid || taken) begin
      taken = 0;
      if (run && (($urandom % 100) < issue_pct)) begin
        req_valid <= 1'b1;
        req       <= make_pkt();
      end else req_valid <= 1'b0;
    end
  end

endmodule
