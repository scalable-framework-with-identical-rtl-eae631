// tb_memory_die: self-checking testbench of one memory die at full size, placed as die 2
// of a stack. The die below is the testbench, sending random loads and stores on all cones
// at once, about half of them for this die; the die above is a model that answers every
// forwarded request four cycles later. Checks: chunks for other dies leave on req_up one
// cycle later unchanged; local loads return the data of a reference memory and stores an
// acknowledge; answers from above are passed down; per source, responses keep their order;
// the die passes index 3 upward; and an isolated local load returns after exactly three
// cycles. Counts cycles in which answers from both sources were waiting in the Join.
module tb_memory_die;
  import numa_pkg::*;
  localparam logic [MD_W-1:0] ME = 2;
  localparam int ROWS = 64;            // rows exercised per cone
  localparam int UP_DELAY = 4;
  logic clk = 0, rst_n = 0;
  logic [MD_W-1:0] die_id_out;
  logic [N_CONE-1:0] req_in_valid = '0, req_up_valid, rsp_up_valid = '0, rsp_dn_valid;
  req_chunk_t [N_CONE-1:0] req_in, req_up;
  rsp_chunk_t [N_CONE-1:0] rsp_up, rsp_dn;
  int checks = 0, failures = 0, both = 0, cyc = 0;

  logic [DATA_W-1:0] model [N_CONE][ROWS];
  rsp_chunk_t exp_loc [N_CONE][$];
  rsp_chunk_t exp_up  [N_CONE][$];
  req_chunk_t exp_fwd [N_CONE][$];
  rsp_chunk_t pend_up [N_CONE][$];     // upper-die model: answers and due cycles
  int         pend_due[N_CONE][$];

  memory_die dut (.clk, .rst_n, .die_id_in(ME), .die_id_out, .req_in_valid, .req_in,
                  .req_up_valid, .req_up, .rsp_up_valid, .rsp_up, .rsp_dn_valid, .rsp_dn);

  always #5 clk = !clk;

  task automatic fail(input string s);
    failures++;
    $display("FAIL t=%0t %s", $time, s);
  endtask

  function automatic logic [DATA_W-1:0] up_data(input req_chunk_t r);
    return {32'h5a5a_0000 | 32'(r.md), 32'(r.row)};
  endfunction

  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int c = 0; c < N_CONE; c++) begin
      // responses leaving downward
      if (rsp_dn_valid[c]) begin
        checks++;
        if (exp_loc[c].size() > 0 && rsp_dn[c] === exp_loc[c][0]) void'(exp_loc[c].pop_front());
        else if (exp_up[c].size() > 0 && rsp_dn[c] === exp_up[c][0]) void'(exp_up[c].pop_front());
        else fail($sformatf("cone %0d unexpected response %h", c, rsp_dn[c]));
      end
      // forwarded requests; the upper model answers them later
      if (req_up_valid[c]) begin
        rsp_chunk_t a;
        checks++;
        if (exp_fwd[c].size() == 0 || req_up[c] !== exp_fwd[c][0])
          fail($sformatf("cone %0d wrong forwarded chunk", c));
        if (exp_fwd[c].size() > 0) void'(exp_fwd[c].pop_front());
        a.ni = req_up[c].ni; a.tag = req_up[c].tag; a.rdata = up_data(req_up[c]);
        pend_up[c].push_back(a);
        pend_due[c].push_back(cyc + UP_DELAY);
      end
      // requests entering this cycle
      if (req_in_valid[c]) begin
        if (req_in[c].md == ME) begin
          rsp_chunk_t e;
          e.ni = req_in[c].ni; e.tag = req_in[c].tag;
          if (req_in[c].op == OP_STORE) begin
            model[c][int'(req_in[c].row)] = req_in[c].wdata;
            e.rdata = '0;
          end else e.rdata = model[c][int'(req_in[c].row)];
          exp_loc[c].push_back(e);
        end else exp_fwd[c].push_back(req_in[c]);
      end
      // answers from this die and from above outstanding at once
      if (exp_loc[c].size() > 0 && exp_up[c].size() > 0) both++;
    end
  end

  // drive the upper-die model's answers
  always @(negedge clk) if (rst_n) begin
    for (int c = 0; c < N_CONE; c++) begin
      rsp_up_valid[c] = 1'b0;
      if (pend_due[c].size() > 0 && pend_due[c][0] <= cyc) begin
        void'(pend_due[c].pop_front());
        rsp_up[c] = pend_up[c].pop_front();
        exp_up[c].push_back(rsp_up[c]);
        rsp_up_valid[c] = 1'b1;
      end
    end
  end

  function automatic req_chunk_t rand_chunk(input bit local_die, input op_e op, input int row);
    req_chunk_t r;
    r.ni = NI_W'($urandom); r.tag = TAG_W'($urandom); r.op = op;
    r.md = local_die ? ME : MD_W'(ME + 1 + ($urandom % (MAX_MD - 1)));
    r.row = ROW_W'(row);
    r.wdata = {$urandom, $urandom};
    return r;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // fill the exercised rows of every cone
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < N_CONE; c++) begin
        req_in_valid[c] = 1'b1;
        req_in[c] = rand_chunk(1, OP_STORE, r);
      end
      @(negedge clk);
    end
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      for (int c = 0; c < N_CONE; c++) begin
        req_in_valid[c] = ($urandom % 100) < 70;
        req_in[c] = rand_chunk(($urandom % 2) == 0, op_e'($urandom % 2), $urandom % ROWS);
      end
      @(negedge clk);
    end
    req_in_valid = '0;
    repeat (200) @(negedge clk);
    // isolated local load on cone 0: must return three cycles after it enters
    begin
      int t0;
      req_in_valid[0] = 1'b1;
      req_in[0] = rand_chunk(1, OP_LOAD, 5);
      t0 = cyc;
      @(negedge clk);
      req_in_valid[0] = 1'b0;
      while (!rsp_dn_valid[0] && cyc < t0 + 20) @(negedge clk);
      checks++;
      if (cyc - t0 != 3) fail($sformatf("local load latency %0d, expected 3", cyc - t0));
    end
    repeat (20) @(negedge clk);
    for (int c = 0; c < N_CONE; c++) begin
      checks++;
      if (exp_loc[c].size() + exp_up[c].size() + exp_fwd[c].size() != 0)
        fail($sformatf("cone %0d: responses missing", c));
    end
    checks++;
    if (die_id_out !== ME + 1) fail("die index not passed upward");
    checks++;
    if (both == 0) fail("the Join never held answers from both sources");
    $display("join contention cycles %0d", both);
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
