// tb_agu: random base, index and displacement; the address on the AGU
// result bus must be their sum, with the POP's tag.
module tb_agu;
  import cisc_pkg::*;
  logic        iv;
  rs_entry_t   is;
  result_bus_t res;
  int checks = 0, failures = 0;

  agu dut (.issue_valid(iv), .issue(is), .res(res));

  initial begin
    for (int n = 0; n < 2000; n++) begin
      is = '0;
      iv = 1'($urandom_range(0, 1));
      is.tag     = TAG_W'($urandom());
      is.pop.imm = $urandom();
      is.a.val   = $urandom();
      is.b.val   = ($urandom_range(0, 1) != 0) ? $urandom() : '0;
      #1;
      checks++;
      if (res.valid != iv || res.tag != is.tag || res.val != is.a.val + is.b.val + is.pop.imm) begin
        failures++;
        if (failures < 5) $display("FAIL %h+%h+%h got %h", is.a.val, is.b.val, is.pop.imm, res.val);
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
