// tb_md_join: self-checking testbench of the Join. Two random response streams (this die's
// memory and the die above) with a combined load just under one chunk per cycle, plus
// bursts where both sources deliver every cycle. A cycle-exact reference model of the two
// FIFOs and the round-robin choice predicts every output; at the end every chunk must
// have come out once, in order per source. Counts how often both FIFOs competed.
module tb_md_join;
  import numa_pkg::*;
  logic clk = 0, rst_n = 0;
  logic loc_valid = 0, up_valid = 0, out_valid;
  rsp_chunk_t loc_chunk, up_chunk, out_chunk;
  int checks = 0, failures = 0, contended = 0;
  rsp_chunk_t q_loc[$], q_up[$];
  bit prio_up = 0;
  bit exp_valid = 0;
  rsp_chunk_t exp_chunk;
  int sent = 0, recvd = 0;

  md_join dut (.clk, .rst_n, .loc_valid, .loc_chunk, .up_valid, .up_chunk, .out_valid,
               .out_chunk);

  always #5 clk = !clk;

  // reference model, evaluated on the values present at each rising edge
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (out_valid !== exp_valid || (exp_valid && out_chunk !== exp_chunk)) begin
      failures++;
      $display("FAIL t=%0t valid %0b/%0b data %h/%h", $time, out_valid, exp_valid,
               out_chunk, exp_chunk);
    end
    if (out_valid) recvd++;
    if (q_up.size() > 0 && q_loc.size() > 0) contended++;
    exp_valid = 0;
    if (q_up.size() > 0 && (q_loc.size() == 0 || prio_up)) begin
      exp_chunk = q_up.pop_front(); exp_valid = 1; prio_up = 0;
    end else if (q_loc.size() > 0) begin
      exp_chunk = q_loc.pop_front(); exp_valid = 1; prio_up = 1;
    end
    if (loc_valid) q_loc.push_back(loc_chunk);
    if (up_valid)  q_up.push_back(up_chunk);
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if ((i / 200) % 4 == 3) begin             // burst: both sources every cycle, briefly
        loc_valid = (i % 200) < 12;
        up_valid  = (i % 200) < 12;
      end else begin
        loc_valid = ($urandom % 100) < 45;
        up_valid  = ($urandom % 100) < 45;
      end
      loc_chunk = rsp_chunk_t'({$urandom, $urandom, $urandom});
      up_chunk  = rsp_chunk_t'({$urandom, $urandom, $urandom});
      sent += int'(loc_valid) + int'(up_valid);
    end
    @(negedge clk) begin loc_valid = 0; up_valid = 0; end
    repeat (100) @(posedge clk);
    checks++;
    if (recvd != sent) begin
      failures++;
      $display("FAIL sent %0d received %0d", sent, recvd);
    end
    checks++;
    if (contended == 0) begin
      failures++;
      $display("FAIL the two FIFOs never competed");
    end
    $display("contended cycles: %0d", contended);
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
