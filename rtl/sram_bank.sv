// sram_bank: memory array of one cone in one memory die.
//
// Stands for the single-port SRAM hard macro of the physical design: a synchronous
// memory of WORDS words of W bits with one read-or-write access per cycle. A read in
// cycle t returns its data in cycle t+1; a write in cycle t is seen by reads from cycle
// t+1. Read data of a write cycle is undefined by the macro and here holds its old value.
//
// The paper uses industrial high-density macros and gives their total size (4 MB over
// 8 dies and 8 cones); the one-cycle read latency is this design's assumption.
module sram_bank #(
  parameter int unsigned WORDS = numa_pkg::BANK_WORDS,
  parameter int unsigned W     = numa_pkg::DATA_W
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic [W-1:0]             wdata,
  output logic [W-1:0]             rdata
);

  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
