// tsv_repair_tx: sending side of a repairable TSV link between two stacked dies.
//
// The W signals of the link are cut into groups of GROUP signals (the last group padded
// with zeros), and each group travels on GROUP+1 TSVs: one spare per group. The per-group
// repair code cfg[g] names the TSV that is not used: signals below it keep their TSV,
// signals from it upward shift one TSV up. Code GROUP (the default) leaves the spare unused;
// codes above GROUP act like GROUP. The unused TSV is driven low. tsv_repair_rx with the
// same codes undoes the shift, so any single faulty TSV per group can be bypassed.
//
// Combinational. The spare ratio (one TSV per block of 25) follows the paper; the
// shift-based repair and the code format are this design's choices.
module tsv_repair_tx #(
  parameter int unsigned W     = 25,
  parameter int unsigned GROUP = numa_pkg::TSV_GROUP,
  localparam int unsigned G    = (W + GROUP - 1) / GROUP,
  localparam int unsigned CW   = $clog2(GROUP + 1)
) (
  input  logic [W-1:0]            data,
  input  logic [G-1:0][CW-1:0]    cfg,
  output logic [G*(GROUP+1)-1:0]  tsv
);

  logic [G*GROUP-1:0] pad;
  assign pad = (G*GROUP)'(data);

  always_comb begin
    for (int g = 0; g < G; g++) begin
      for (int t = 0; t <= GROUP; t++) begin
        if (t < int'(cfg[g]))
          tsv[g*(GROUP+1) + t] = pad[g*GROUP + t];
        else if (t > int'(cfg[g]))
          tsv[g*(GROUP+1) + t] = pad[g*GROUP + t - 1];
        else
          tsv[g*(GROUP+1) + t] = 1'b0;
      end
    end
  end

endmodule
