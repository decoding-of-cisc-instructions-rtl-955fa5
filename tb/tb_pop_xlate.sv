// tb_pop_xlate: all four translation tables on random instructions of every
// form. The expected POP sequence for each form is written out in the
// testbench (AGU-POP: address generation into temp1, then LD/ALU/ST), so
// that "Add mem[BX+SI],AX" becomes AG, LD, ADD, ST, and it is compared
// field by field: unit, destination, sources, last-POP mark and validity.
module tb_pop_xlate;
  import cisc_pkg::*;
  x86_instr_t ins;
  pop_t       pop [4];
  int checks = 0, failures = 0;

  pop_xlate #(.IDX(1)) t1 (.ins(ins), .pop(pop[0]));
  pop_xlate #(.IDX(2)) t2 (.ins(ins), .pop(pop[1]));
  pop_xlate #(.IDX(3)) t3 (.ins(ins), .pop(pop[2]));
  pop_xlate #(.IDX(4)) t4 (.ins(ins), .pop(pop[3]));

  typedef struct {
    int unit; int has_dest; int dest; int use1; int src1; int use2; int src2;
  } exp_t;

  task automatic expect_pop(int k, int n, exp_t e);
    checks++;
    if (!pop[k].valid || int'(pop[k].unit) != e.unit || int'(pop[k].has_dest) != e.has_dest
        || (e.has_dest != 0 && int'(pop[k].dest) != e.dest)
        || int'(pop[k].use1) != e.use1 || (e.use1 != 0 && int'(pop[k].src1) != e.src1)
        || int'(pop[k].use2) != e.use2 || (e.use2 != 0 && int'(pop[k].src2) != e.src2)
        || pop[k].last != (k == n - 1)) begin
      failures++;
      if (failures < 8)
        $display("FAIL form=%0d pop%0d unit=%0d dest=%0d s1=%0d/%0d s2=%0d/%0d", ins.form, k + 1,
                 pop[k].unit, pop[k].dest, pop[k].use1, pop[k].src1, pop[k].use2, pop[k].src2);
    end
  endtask

  initial begin
    for (int n = 0; n < 3000; n++) begin
      exp_t e [4];
      int np, r1, r2, b, x;
      ins = x86_instr_t'({$urandom(), $urandom(), $urandom()});
      case ($urandom_range(0, 8))
        0: ins.form = F_ALU_RR; 1: ins.form = F_ALU_RI; 2: ins.form = F_LEA;
        3: ins.form = F_JCC;    4: ins.form = F_LOAD;   5: ins.form = F_STORE;
        6: ins.form = F_ALU_RM; 7: ins.form = F_ALU_MR; default: ins.form = F_CPLX;
      endcase
      ins.op = aluop_e'($urandom_range(0, 5));
      #1;
      r1 = int'(ins.r1); r2 = int'(ins.r2);
      b  = int'(ins.base); x = int'(ins.index);
      // expected: unit, has_dest, dest, use1, src1, use2, src2   (units: 0 ALU 1 BU 2 AG 3 LD 4 ST)
      case (ins.form)
        F_ALU_RR: begin np = 1; e[0] = '{0, 1, r1, 1, r1, 1, r2}; end
        F_ALU_RI: begin np = 1; e[0] = '{0, 1, r1, 1, r1, 0, 0}; end
        F_LEA:    begin np = 1; e[0] = '{2, 1, r1, ins.has_base, b, ins.has_index, x}; end
        F_JCC:    begin np = 1; e[0] = '{1, 0, 0, 1, r1, 0, 0}; end
        F_LOAD:   begin np = 2; e[0] = '{2, 1, 8, ins.has_base, b, ins.has_index, x};
                                e[1] = '{3, 1, r1, 1, 8, 0, 0}; end
        F_STORE:  begin np = 2; e[0] = '{2, 1, 8, ins.has_base, b, ins.has_index, x};
                                e[1] = '{4, 0, 0, 1, 8, 1, r1}; end
        F_ALU_RM: begin np = 3; e[0] = '{2, 1, 8, ins.has_base, b, ins.has_index, x};
                                e[1] = '{3, 1, 9, 1, 8, 0, 0};
                                e[2] = '{0, 1, r1, 1, r1, 1, 9}; end
        F_ALU_MR: begin np = 4; e[0] = '{2, 1, 8, ins.has_base, b, ins.has_index, x};
                                e[1] = '{3, 1, 9, 1, 8, 0, 0};
                                e[2] = '{0, 1, 10, 1, 9, 1, r1};
                                e[3] = '{4, 0, 0, 1, 8, 1, 10}; end
        default:  np = 0;
      endcase
      for (int k = 0; k < 4; k++)
        if (k < np) expect_pop(k, np, e[k]);
        else begin
          checks++;
          if (pop[k].valid) begin
            failures++;
            if (failures < 8) $display("FAIL form=%0d pop%0d should be empty", ins.form, k + 1);
          end
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
