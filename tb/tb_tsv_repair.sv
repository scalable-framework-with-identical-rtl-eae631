// tb_tsv_repair: self-checking testbench of the TSV repair pair (tsv_repair_tx and
// tsv_repair_rx) on a 60-signal link, i.e. three groups of 25 with one spare each, the last
// group partly filled. For random data and a random faulty TSV per group (stuck at 0 or 1,
// or none), the repair code is set to the faulty TSV and the received data must equal the
// sent data. As a control, the same faults with the spare left unused (code 25) must
// corrupt the data whenever a faulty TSV carries a signal of opposite value.
module tb_tsv_repair;
  import numa_pkg::*;
  localparam int W  = 60;
  localparam int GR = TSV_GROUP;
  localparam int G  = (W + GR - 1) / GR;
  localparam int CW = $clog2(GR + 1);
  logic [W-1:0] data, rx_data, rx_bad;
  logic [G-1:0][CW-1:0] cfg, cfg_none;
  logic [G*(GR+1)-1:0] tsv, tsv_bad, tsv_f, tsv_fb;
  int fault_pos [G];
  logic fault_val [G];
  int checks = 0, failures = 0, corrupted = 0;

  tsv_repair_tx #(.W(W)) u_tx  (.data, .cfg, .tsv);
  tsv_repair_rx #(.W(W)) u_rx  (.tsv(tsv_f), .cfg, .data(rx_data));
  tsv_repair_tx #(.W(W)) u_tx2 (.data, .cfg(cfg_none), .tsv(tsv_bad));
  tsv_repair_rx #(.W(W)) u_rx2 (.tsv(tsv_fb), .cfg(cfg_none), .data(rx_bad));

  // the physical fault: one TSV per group stuck at a value
  always_comb begin
    tsv_f  = tsv;
    tsv_fb = tsv_bad;
    for (int g = 0; g < G; g++)
      if (fault_pos[g] <= GR) begin
        tsv_f [g*(GR+1) + fault_pos[g]] = fault_val[g];
        tsv_fb[g*(GR+1) + fault_pos[g]] = fault_val[g];
      end
  end

  initial begin
    for (int g = 0; g < G; g++) cfg_none[g] = CW'(GR);
    for (int i = 0; i < 3000; i++) begin
      data = W'({$urandom, $urandom});
      for (int g = 0; g < G; g++) begin
        fault_pos[g] = (i % 7 == 0) ? GR + 1 : $urandom % (GR + 1);  // GR+1: no fault
        fault_val[g] = 1'($urandom);
        cfg[g] = CW'((fault_pos[g] > GR) ? GR : fault_pos[g]);
      end
      #1;
      checks++;
      if (rx_data !== data) begin
        failures++;
        $display("FAIL repaired link: sent %h got %h", data, rx_data);
      end
      if (rx_bad !== data) corrupted++;
    end
    checks++;
    if (corrupted == 0) begin
      failures++;
      $display("FAIL faults never showed on the unrepaired link");
    end
    $display("unrepaired link corrupted in %0d of 3000 cases", corrupted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
