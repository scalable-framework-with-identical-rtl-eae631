// tb_sram_bank: self-checking testbench of the memory array. Random reads and writes at
// full size against a model; read data must appear exactly one cycle after the read and
// hold while the bank is idle.
module tb_sram_bank;
  import numa_pkg::*;
  localparam int AW = $clog2(BANK_WORDS);
  logic clk = 0, en = 0, we = 0;
  logic [AW-1:0] addr;
  logic [DATA_W-1:0] wdata, rdata;
  logic [DATA_W-1:0] model [int];
  int checks = 0, failures = 0;
  int cyc = 0;

  sram_bank dut (.clk, .en, .we, .addr, .wdata, .rdata);

  always #5 clk = !clk;
  always @(posedge clk) cyc++;

  task automatic access(input bit w, input logic [AW-1:0] a, input logic [DATA_W-1:0] d);
    @(negedge clk);
    en = 1; we = w; addr = a; wdata = d;
    @(negedge clk);
    en = 0;
    if (w) model[int'(a)] = d;
    else if (model.exists(int'(a))) begin
      checks++;
      if (rdata !== model[int'(a)]) begin
        failures++;
        $display("FAIL read %0d: got %h want %h", a, rdata, model[int'(a)]);
      end
      @(negedge clk);                       // idle cycle: data must hold
      checks++;
      if (rdata !== model[int'(a)]) begin
        failures++;
        $display("FAIL read data not held at %0d", a);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 64; i++) access(1, AW'(i * 131), {$urandom, $urandom});
    access(1, '1, 64'hdead_beef_0123_4567);
    access(1, '0, 64'h0f0f_0f0f_f0f0_f0f0);
    for (int i = 0; i < 3000; i++) begin
      logic [AW-1:0] a;
      a = (i % 2) ? AW'(($urandom % 64) * 131) : AW'($urandom);
      if ($urandom % 3 == 0) access(1, a, {$urandom, $urandom});
      else                   access(0, a, '0);
    end
    access(0, '1, '0);
    access(0, '0, '0);
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
