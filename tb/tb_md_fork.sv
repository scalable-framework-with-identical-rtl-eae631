// tb_md_fork: self-checking testbench of the Fork. Random chunks and die indices; a chunk
// must go to the local memory exactly when its die field equals the die index, otherwise
// up, and never both; an invalid chunk goes nowhere.
module tb_md_fork;
  import numa_pkg::*;
  logic in_valid, loc_valid, up_valid;
  req_chunk_t in_chunk;
  logic [MD_W-1:0] die_id;
  int checks = 0, failures = 0;

  md_fork dut (.in_valid, .in_chunk, .die_id, .loc_valid, .up_valid);

  initial begin
    for (int i = 0; i < 2000; i++) begin
      in_valid = 1'($urandom);
      in_chunk = req_chunk_t'({$urandom, $urandom, $urandom});
      die_id   = MD_W'($urandom);
      if (i % 3 == 0) in_chunk.md = die_id;
      #1;
      checks++;
      if (loc_valid !== (in_valid && in_chunk.md == die_id) ||
          up_valid  !== (in_valid && in_chunk.md != die_id)) begin
        failures++;
        $display("FAIL md=%0d die=%0d v=%0b loc=%0b up=%0b", in_chunk.md, die_id, in_valid,
                 loc_valid, up_valid);
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
