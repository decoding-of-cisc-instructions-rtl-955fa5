// pop_xlate: translation table number IDX of the decoder. It gives the
// IDX-th POP (1..4) of one predecoded instruction, or an invalid POP when the
// instruction has fewer than IDX POPs.
//
// The translation follows the AGU-POP strategy: an instruction with a memory
// operand first generates its address with an AG POP into temp1. Then a LD
// and/or ST POP uses temp1 as the address. For "Add mem[BX+SI],AX" this gives
//   AG temp1,BX,SI ; LD temp2,[temp1] ; ADD temp3,temp2,AX ; ST [temp1],temp3
// which is the document's own example. Table 1 serves every form, and table 4
// only the read-modify-write form. The instruction forms are this design's own.
// The document gives table numbers and their size ratio (11:9:8:2), not contents.
// Purely combinational.
module pop_xlate
  import cisc_pkg::*;
#(
  parameter int IDX = 1            // which POP of the instruction (1..4)
) (
  input  x86_instr_t ins,
  output pop_t       pop
);

  // register number of a general register field
  function automatic logic [LREG_W-1:0] gpr(logic [2:0] r);
    return {1'b0, r};
  endfunction

  pop_t ag, ld, st, alu;

  always_comb begin
    // address generation: temp1 <- base + index + disp
    ag          = '0;
    ag.valid    = 1'b1;
    ag.unit     = U_AGU;
    ag.op       = OP_ADD;
    ag.has_dest = 1'b1;
    ag.dest     = (ins.form == F_LEA) ? gpr(ins.r1) : TEMP1;
    ag.use1     = ins.has_base;
    ag.src1     = gpr(ins.base);
    ag.use2     = ins.has_index;
    ag.src2     = gpr(ins.index);
    ag.use_imm  = 1'b1;
    ag.imm      = ins.imm;

    // load from [temp1]
    ld          = '0;
    ld.valid    = 1'b1;
    ld.unit     = U_LD;
    ld.has_dest = 1'b1;
    ld.dest     = (ins.form == F_LOAD) ? gpr(ins.r1) : TEMP2;
    ld.use1     = 1'b1;
    ld.src1     = TEMP1;

    // store to [temp1]
    st          = '0;
    st.valid    = 1'b1;
    st.unit     = U_ST;
    st.use1     = 1'b1;
    st.src1     = TEMP1;
    st.use2     = 1'b1;
    st.src2     = (ins.form == F_STORE) ? gpr(ins.r1) : TEMP3;

    // ALU operation
    alu          = '0;
    alu.valid    = 1'b1;
    alu.unit     = U_ALU;
    alu.op       = ins.op;
    alu.has_dest = 1'b1;
    alu.dest     = (ins.form == F_ALU_MR) ? TEMP3 : gpr(ins.r1);
    alu.use1     = 1'b1;
    alu.use2     = 1'b1;
    alu.imm      = ins.imm;
    case (ins.form)
      F_ALU_RI: begin alu.src1 = gpr(ins.r1); alu.use2 = 1'b0; alu.use_imm = 1'b1; end
      F_ALU_RM: begin alu.src1 = gpr(ins.r1); alu.src2 = TEMP2; end
      F_ALU_MR: begin alu.src1 = TEMP2;       alu.src2 = gpr(ins.r1); end
      default:  begin alu.src1 = gpr(ins.r1); alu.src2 = gpr(ins.r2); end
    endcase

    pop = '0;
    unique case (ins.form)
      F_ALU_RR, F_ALU_RI: if (IDX == 1) pop = alu;
      F_LEA:              if (IDX == 1) pop = ag;
      F_JCC: if (IDX == 1) begin
        pop.valid    = 1'b1;
        pop.unit     = U_BU;
        pop.use1     = 1'b1;
        pop.src1     = gpr(ins.r1);
        pop.br_ne    = ins.br_ne;
        pop.br_taken = ins.br_taken;
      end
      F_LOAD:   case (IDX) 1: pop = ag; 2: pop = ld;  default: ; endcase
      F_STORE:  case (IDX) 1: pop = ag; 2: pop = st;  default: ; endcase
      F_ALU_RM: case (IDX) 1: pop = ag; 2: pop = ld; 3: pop = alu; default: ; endcase
      F_ALU_MR: case (IDX) 1: pop = ag; 2: pop = ld; 3: pop = alu; 4: pop = st; default: ; endcase
      default: ;   // complex: no POPs from the tables
    endcase
    pop.last = pop.valid && (pop_count(ins.form) == 3'(IDX));
  end

endmodule
