// sync_fifo: small synchronous FIFO used by the Join of each memory-die cone.
//
// DEPTH entries of type T in a circular array with read and write pointers and an entry
// count. dout shows the oldest entry whenever empty is low; pop removes it at the clock
// edge. A push and a pop in the same cycle are allowed also when the FIFO is full.
// Pushing into a full FIFO without popping is an error and is flagged by an assertion.
module sync_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  T      din,
  input  logic  pop,
  output T      dout,
  output logic  empty,
  output logic  full
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                  mem [DEPTH];
  logic [PW-1:0]     rptr, wptr;
  logic [PW:0]       count;

  assign empty = (count == '0);
  assign full  = (count == (PW+1)'(DEPTH));
  assign dout  = mem[rptr];

  function automatic logic [PW-1:0] incr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rptr  <= '0;
      wptr  <= '0;
      count <= '0;
    end else begin
      if (push) wptr <= incr(wptr);
      if (pop)  rptr <= incr(rptr);
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= din;
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop))
    else $error("sync_fifo: overflow");
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("sync_fifo: underflow");

endmodule
