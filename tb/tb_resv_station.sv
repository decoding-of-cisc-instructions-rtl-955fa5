// tb_resv_station: random allocation (up to the free count, several per
// cycle) of POPs whose operands are ready or wait on a producer tag, while
// random tags are broadcast on all result buses. The station is built with
// two issue ports. A reference model of the entries decides, every cycle,
// which entries must issue: the two oldest, by ROB order, with both operands
// captured, the oldest on port 0. Each issued POP's tag and operand values
// are compared with the model. free_count is checked too.
module tb_resv_station;
  import cisc_pkg::*;
  localparam int D = 8;
  localparam int NI = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        [N_POPS-1:0] alloc_valid;
  rs_entry_t   [N_POPS-1:0] alloc_entry;
  logic [$clog2(D+1)-1:0]   free_count;
  result_bus_t [N_BUS-1:0]  bus;
  logic [TAG_W-1:0]         rob_head;
  logic        [NI-1:0]     issue_valid;
  rs_entry_t   [NI-1:0]     issue;
  rs_entry_t                model [$];
  int checks = 0, failures = 0, issued = 0, waited = 0, dual = 0;

  resv_station #(.DEPTH(D), .N_ISSUE(NI)) dut (.*);

  function automatic logic [XLEN-1:0] pval(logic [TAG_W-1:0] t);
    return 32'hA500_0000 + XLEN'(t) * 32'h0001_0203;
  endfunction
  function automatic opnd_t mk_opnd();
    opnd_t o;
    o.rdy = 1'($urandom_range(0, 1));
    o.tag = TAG_W'($urandom());
    o.val = o.rdy ? $urandom() : '0;
    return o;
  endfunction
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    logic [TAG_W-1:0] next_tag;
    alloc_valid = '0; alloc_entry = '0; bus = '0; rob_head = '0;
    next_tag = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      int best [NI];
      int nbest;
      int na;
      @(negedge clk);
      rob_head = (model.size() > 0) ? model[0].tag : next_tag;
      for (int m = 1; m < model.size(); m++)
        if (TAG_W'(model[m].tag - next_tag) < TAG_W'(rob_head - next_tag)) rob_head = model[m].tag;
      // buses
      for (int b = 0; b < N_BUS; b++) begin
        bus[b].valid = 1'($urandom_range(0, 1));
        bus[b].tag   = TAG_W'($urandom());
        bus[b].val   = pval(bus[b].tag);
      end
      // allocation
      alloc_valid = '0;
      na = $urandom_range(0, 3);
      if (na > D - model.size()) na = D - model.size();
      if (TAG_W'(next_tag - rob_head) > 20) na = 0;
      for (int k = 0; k < N_POPS; k++) begin
        alloc_entry[k] = '0;
        if (k < na) begin
          alloc_valid[k]    = 1'b1;
          alloc_entry[k].tag = next_tag;
          alloc_entry[k].a   = mk_opnd();
          alloc_entry[k].b   = mk_opnd();
          next_tag++;
        end
      end
      #1;
      chk(int'(free_count) == D - model.size(), "free_count");
      // expected issue
      nbest = 0;
      for (int p = 0; p < NI; p++) begin
        best[p] = -1;
        for (int m = 0; m < model.size(); m++)
          if (model[m].a.rdy && model[m].b.rdy && !(p == 1 && m == best[0]) &&
              (best[p] < 0 || TAG_W'(model[m].tag - rob_head) < TAG_W'(model[best[p]].tag - rob_head)))
            best[p] = m;
        if (best[p] >= 0) nbest++;
      end
      for (int m = 0; m < model.size(); m++) if (!(model[m].a.rdy && model[m].b.rdy)) waited++;
      for (int p = 0; p < NI; p++) begin
        chk(issue_valid[p] == (best[p] >= 0), $sformatf("issue_valid[%0d]", p));
        if (best[p] >= 0 && issue_valid[p]) begin
          chk(issue[p].tag == model[best[p]].tag && issue[p].a.val == model[best[p]].a.val &&
              issue[p].b.val == model[best[p]].b.val,
              $sformatf("port %0d issued tag %0d, expected %0d", p, issue[p].tag, model[best[p]].tag));
          issued++;
          if (p == 1) dual++;
        end
      end
      @(posedge clk);
      if (nbest == 2) begin
        if (best[0] > best[1]) begin model.delete(best[0]); model.delete(best[1]); end
        else begin model.delete(best[1]); model.delete(best[0]); end
      end else if (nbest == 1) model.delete(best[0]);
      for (int m = 0; m < model.size(); m++) begin
        model[m].a = snoop(model[m].a, bus);
        model[m].b = snoop(model[m].b, bus);
      end
      for (int k = 0; k < na; k++) begin
        rs_entry_t e;
        e = alloc_entry[k];
        e.a = snoop(e.a, bus);
        e.b = snoop(e.b, bus);
        model.push_back(e);
      end
    end
    chk(issued > 100 && waited > 100 && dual > 50, "coverage");
    $display("issued %0d (%0d on the second port), entry-cycles waiting on operands %0d", issued, dual, waited);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
