// tb_return_addr_decoder: self-checking testbench of the return-address decoder. Every
// NI index with valid high and low; the output must be one-hot on that index or all zero.
module tb_return_addr_decoder;
  import numa_pkg::*;
  logic in_valid;
  rsp_chunk_t in_chunk;
  logic [N_NI-1:0] rb_valid;
  int checks = 0, failures = 0;

  return_addr_decoder dut (.in_valid, .in_chunk, .rb_valid);

  initial begin
    for (int i = 0; i < 200; i++) begin
      in_valid = (i % 5) != 0;
      in_chunk = rsp_chunk_t'({$urandom, $urandom, $urandom});
      in_chunk.ni = NI_W'(i);
      #1;
      checks++;
      if (rb_valid !== (in_valid ? (N_NI'(1) << (i % N_NI)) : '0)) begin
        failures++;
        $display("FAIL ni=%0d valid=%0b out=%b", i % N_NI, in_valid, rb_valid);
      end
    end
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
