// tb_cov_pkg: event counters shared by the testbench probes that are bound into blocks of
// the memory stack (see tb_probe_*). Each counter counts one mechanism of the design.
package tb_cov_pkg;
  int join_both     = 0;   // cycles a Join held chunks from its die and from above
  int rb_ooo        = 0;   // chunks of a younger packet arriving before the oldest completes
  int re_partial    = 0;   // cycles an RE got some but not all of its pending grants
  int at_conflict   = 0;   // cycles an arbitration tree saw more than one request
  int md_access [8] = '{default: 0};   // memory-array accesses per die
endpackage
