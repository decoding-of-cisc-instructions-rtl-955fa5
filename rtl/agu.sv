// agu: the isolated address generation unit (AGU-POP strategy), one cycle of
// latency.
//
// It executes AG POPs: address = base + index + displacement, where an absent
// base or index counts as zero (the dispatcher then marks the operand ready
// with value 0). The address goes on the AGU result bus in the same cycle. The
// LSU buffer snoops it there, so a load or store learns its address without
// waiting for its data operand. The isolated AGU and its one-cycle latency
// follow the document. The three-term address is this design's reading of
// "AG temp1, BX, SI". Purely combinational.
module agu
  import cisc_pkg::*;
(
  input  logic        issue_valid,
  input  rs_entry_t   issue,
  output result_bus_t res
);
  assign res.valid = issue_valid;
  assign res.tag   = issue.tag;
  assign res.val   = issue.a.val + issue.b.val + issue.pop.imm;
endmodule
