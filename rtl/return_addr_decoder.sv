// return_addr_decoder: return-address decoder of one memory cone on the logic die.
//
// The response path of a cone is shared by all read buffers: the response chunk goes to all
// of them, and this decoder turns the chunk's return address (the NI index it carries) into
// a one-hot valid for the read buffer that owns it. Combinational.
// Follows the paper; the one-hot encoding is this design's choice.
module return_addr_decoder
  import numa_pkg::*;
#(
  parameter int unsigned N = N_NI
) (
  input  logic          in_valid,
  input  rsp_chunk_t    in_chunk,
  output logic [N-1:0]  rb_valid
);

  always_comb begin
    rb_valid = '0;
    for (int n = 0; n < N; n++)
      rb_valid[n] = in_valid && (in_chunk.ni == NI_W'(n));
  end

endmodule
