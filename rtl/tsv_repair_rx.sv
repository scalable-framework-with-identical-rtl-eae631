// tsv_repair_rx: receiving side of a repairable TSV link between two stacked dies.
//
// Undoes the shift of tsv_repair_tx: in group g, signals below the repair code cfg[g] are
// taken from their own TSV and signals from the code upward from the next TSV, so the TSV
// named by the code (a faulty one, or the spare for code GROUP) is never read.
// Combinational; see tsv_repair_tx for the code format. The spare ratio follows the
// document, the shift scheme is this design's choice.
module tsv_repair_rx #(
  parameter int unsigned W     = 25,
  parameter int unsigned GROUP = numa_pkg::TSV_GROUP,
  localparam int unsigned G    = (W + GROUP - 1) / GROUP,
  localparam int unsigned CW   = $clog2(GROUP + 1)
) (
  input  logic [G*(GROUP+1)-1:0]  tsv,
  input  logic [G-1:0][CW-1:0]    cfg,
  output logic [W-1:0]            data
);

  logic [G*GROUP-1:0] pad;

  always_comb begin
    for (int g = 0; g < G; g++) begin
      for (int k = 0; k < GROUP; k++) begin
        if (k < int'(cfg[g]))
          pad[g*GROUP + k] = tsv[g*(GROUP+1) + k];
        else
          pad[g*GROUP + k] = tsv[g*(GROUP+1) + k + 1];
      end
    end
  end

  assign data = pad[W-1:0];

endmodule
