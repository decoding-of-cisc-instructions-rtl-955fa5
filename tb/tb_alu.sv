// tb_alu: random operands and operations, with and without an immediate,
// compared with a reference computed in the testbench. Also checks that the
// result bus carries the issued POP's tag and valid.
module tb_alu;
  import cisc_pkg::*;
  logic        iv;
  rs_entry_t   is;
  result_bus_t res;
  int checks = 0, failures = 0;

  alu dut (.issue_valid(iv), .issue(is), .res(res));

  function automatic logic [XLEN-1:0] ref_alu(aluop_e op, logic [XLEN-1:0] a, logic [XLEN-1:0] b);
    case (op)
      OP_ADD: return a + b;
      OP_SUB: return a - b;
      OP_AND: return a & b;
      OP_OR:  return a | b;
      OP_XOR: return a ^ b;
      default: return b;
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [XLEN-1:0] b;
      is = '0;
      iv = 1'($urandom_range(0, 1));
      is.tag         = TAG_W'($urandom());
      is.pop.op      = aluop_e'($urandom_range(0, 5));
      is.pop.use_imm = 1'($urandom_range(0, 1));
      is.pop.imm     = $urandom();
      is.a.val       = $urandom();
      is.b.val       = $urandom();
      #1;
      b = is.pop.use_imm ? is.pop.imm : is.b.val;
      checks++;
      if (res.valid != iv || res.tag != is.tag || res.val != ref_alu(is.pop.op, is.a.val, b)) begin
        failures++;
        if (failures < 5) $display("FAIL op=%0d a=%h b=%h got %h", is.pop.op, is.a.val, b, res.val);
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
