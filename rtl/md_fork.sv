// md_fork: Fork of one memory cone inside one memory die.
//
// A purely combinational partial address check: the die field of the request chunk is
// compared with this die's index. On a match the chunk is steered to the die's memory
// array (loc_valid), otherwise it is forwarded towards the next die up (up_valid). The chunk
// itself goes unchanged to both destinations; only the valids differ.
//
// Interface: in_valid/in_chunk from the pipeline register below, die_id of this die.
// Timing: none; the pipeline register towards the next die sits in memory_die.
// Follows the paper; the die field position in the address is this design's choice.
module md_fork
  import numa_pkg::*;
(
  input  logic              in_valid,
  input  req_chunk_t        in_chunk,
  input  logic [MD_W-1:0]   die_id,
  output logic              loc_valid,
  output logic              up_valid
);

  logic match;
  assign match     = (in_chunk.md == die_id);
  assign loc_valid = in_valid &&  match;
  assign up_valid  = in_valid && !match;

endmodule
