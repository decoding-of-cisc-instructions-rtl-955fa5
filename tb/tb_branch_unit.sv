// tb_branch_unit: branches on zero and non-zero registers, with right and
// wrong predictions; outcome, resolution and mispredict flags are compared
// with the testbench's own evaluation of the condition.
module tb_branch_unit;
  import cisc_pkg::*;
  logic        iv;
  rs_entry_t   is;
  result_bus_t res;
  logic        resolved, mispredict;
  int checks = 0, failures = 0;

  branch_unit dut (.issue_valid(iv), .issue(is), .res(res), .resolved, .mispredict);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic t;
      is = '0;
      iv = 1'($urandom_range(0, 1));
      is.tag          = TAG_W'($urandom());
      is.pop.br_ne    = 1'($urandom_range(0, 1));
      is.pop.br_taken = 1'($urandom_range(0, 1));
      is.a.val        = ($urandom_range(0, 1) != 0) ? $urandom() : '0;
      #1;
      t = is.pop.br_ne ? (is.a.val != 0) : (is.a.val == 0);
      checks++;
      if (res.valid != iv || res.tag != is.tag || res.val != XLEN'(t) || resolved != iv
          || mispredict != (iv && t != is.pop.br_taken)) begin
        failures++;
        if (failures < 5) $display("FAIL ne=%0d val=%h pred=%0d", is.pop.br_ne, is.a.val, is.pop.br_taken);
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
