// alu: integer ALU of the core, one cycle of latency.
//
// It takes the POP that its reservation station issues in this cycle and
// computes a op b, where b is the immediate for POPs that carry one. The result
// is driven on the ALU result bus in the same cycle, tagged with the POP's
// ROB tag. Every listener (RSs, LSU buffer, ROB, dispatcher) captures it at the
// next clock edge. The one-cycle latency is the document's. The operation set
// (add, sub, and, or, xor, move) is this design's own. Purely combinational.
module alu
  import cisc_pkg::*;
(
  input  logic        issue_valid,
  input  rs_entry_t   issue,
  output result_bus_t res
);
  logic [XLEN-1:0] a, b;
  assign a = issue.a.val;
  assign b = issue.pop.use_imm ? issue.pop.imm : issue.b.val;

  always_comb begin
    res.valid = issue_valid;
    res.tag   = issue.tag;
    case (issue.pop.op)
      OP_ADD:  res.val = a + b;
      OP_SUB:  res.val = a - b;
      OP_AND:  res.val = a & b;
      OP_OR:   res.val = a | b;
      OP_XOR:  res.val = a ^ b;
      OP_MOV:  res.val = b;
      default: res.val = a + b;
    endcase
  end
endmodule
