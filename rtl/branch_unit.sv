// branch_unit: resolves conditional-branch POPs, one cycle of latency.
//
// A branch POP tests its register operand for zero (br_ne = 0) or non-zero
// (br_ne = 1). The outcome is compared with the direction that was predicted at
// fetch. The unit marks the POP complete on its result bus (value = outcome).
// A wrong prediction is reported on `mispredict`. The document assumes perfect
// prediction and describes no recovery, so the core only reports it. The
// one-cycle latency is the document's. The zero-test condition is this
// design's own. Purely combinational.
module branch_unit
  import cisc_pkg::*;
(
  input  logic        issue_valid,
  input  rs_entry_t   issue,
  output result_bus_t res,
  output logic        resolved,
  output logic        mispredict
);
  logic taken;
  assign taken      = issue.pop.br_ne ? (issue.a.val != '0) : (issue.a.val == '0);
  assign resolved   = issue_valid;
  assign mispredict = issue_valid && (taken != issue.pop.br_taken);
  assign res.valid  = issue_valid;
  assign res.tag    = issue.tag;
  assign res.val    = XLEN'(taken);
endmodule
