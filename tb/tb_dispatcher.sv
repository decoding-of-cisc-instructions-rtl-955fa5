// tb_dispatcher: random POP bundles against a reference model of renaming
// and dispatch. The model keeps its own register alias table and resolves
// each source operand in the same priority as the design: an older POP of
// the same bundle, then a producer in flight (value from the ROB or from a
// result bus this cycle), then the register file. The register file, the
// ROB state, the result buses, retirements and the free counts of the
// stations are random. Checked: the tags, the routing to ALU/BU/AGU/LSU,
// every operand, and the stall when any target lacks room.
module tb_dispatcher;
  import cisc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pop_t        [N_POPS-1:0]           bundle;
  logic                               bundle_valid, bundle_ready;
  logic [TAG_W-1:0]                   rob_tail;
  logic [TAG_W:0]                     rob_free;
  logic [ROB_DEPTH-1:0]               rob_done;
  logic [ROB_DEPTH-1:0][XLEN-1:0]     rob_val;
  logic [N_POPS-1:0]                  ret_valid, ret_has_dest;
  logic [N_POPS-1:0][LREG_W-1:0]      ret_dest;
  logic [N_POPS-1:0][TAG_W-1:0]       ret_tag;
  logic [N_POPS-1:0]                  rob_alloc, alu_alloc, bu_alloc, agu_alloc, lsu_alloc, lsu_store;
  logic [2*N_POPS-1:0][LREG_W-1:0]    rf_raddr;
  logic [2*N_POPS-1:0][XLEN-1:0]      rf_rdata;
  logic [3:0]                         alu_free, bu_free, agu_free;
  logic [4:0]                         lsu_free;
  rs_entry_t   [N_POPS-1:0]           entry;
  result_bus_t [N_BUS-1:0]            bus;
  logic                               stall;

  dispatcher #(.RS_CW(4), .LSQ_CW(5)) dut (.*);

  function automatic logic [XLEN-1:0] rfv(logic [LREG_W-1:0] r);
    return 32'h5000_0000 | XLEN'(r);
  endfunction
  always_comb for (int i = 0; i < 2 * N_POPS; i++) rf_rdata[i] = rfv(rf_raddr[i]);

  bit               m_busy [N_LREG];
  logic [TAG_W-1:0] m_tag  [N_LREG];
  int checks = 0, failures = 0, fired = 0, stalls = 0, n_intra = 0, n_rob = 0, n_bus = 0, n_wait = 0;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  function automatic opnd_t ref_opnd(int s, bit use_it, logic [LREG_W-1:0] r, logic [TAG_W-1:0] tags [N_POPS]);
    opnd_t o;
    o = '{rdy: 1'b1, tag: '0, val: '0};
    if (!use_it) return o;
    for (int k = s - 1; k >= 0; k--)
      if (bundle[k].valid && bundle[k].has_dest && bundle[k].dest == r) begin
        n_intra++;
        return '{rdy: 1'b0, tag: tags[k], val: '0};
      end
    if (m_busy[r]) begin
      if (rob_done[m_tag[r]]) begin n_rob++; return '{rdy: 1'b1, tag: m_tag[r], val: rob_val[m_tag[r]]}; end
      for (int b = 0; b < N_BUS; b++)
        if (bus[b].valid && bus[b].tag == m_tag[r]) begin
          n_bus++;
          return '{rdy: 1'b1, tag: m_tag[r], val: bus[b].val};
        end
      n_wait++;
      return '{rdy: 1'b0, tag: m_tag[r], val: '0};
    end
    return '{rdy: 1'b1, tag: '0, val: rfv(r)};
  endfunction

  initial begin
    logic [TAG_W-1:0] tail_q;
    tail_q = '0;
    for (int r = 0; r < N_LREG; r++) m_busy[r] = 0;
    bundle = '0; bundle_valid = 0; ret_valid = '0; ret_has_dest = '0; ret_dest = '0; ret_tag = '0;
    bus = '0; rob_done = '0; rob_val = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      logic [TAG_W-1:0] tags [N_POPS];
      int cnt [5];
      int nall;
      bit exp_fire;
      @(negedge clk);
      rob_tail = tail_q;
      bundle_valid = 1'($urandom_range(0, 7) != 0);
      for (int s = 0; s < N_POPS; s++) begin
        bundle[s] = pop_t'({$urandom(), $urandom(), $urandom()});
        bundle[s].valid = 1'($urandom_range(0, 3) != 0);
        bundle[s].unit  = unit_e'($urandom_range(0, 4));
        bundle[s].dest  = LREG_W'($urandom_range(0, N_LREG - 1));
        bundle[s].src1  = LREG_W'($urandom_range(0, N_LREG - 1));
        bundle[s].src2  = LREG_W'($urandom_range(0, N_LREG - 1));
      end
      for (int t = 0; t < ROB_DEPTH; t++) begin
        rob_done[t] = 1'($urandom_range(0, 3) == 0);
        rob_val[t]  = $urandom();
      end
      for (int b = 0; b < N_BUS; b++) bus[b] = '{valid: 1'($urandom_range(0, 1)), tag: TAG_W'($urandom()), val: $urandom()};
      rob_free = (TAG_W + 1)'($urandom_range(4, 32));
      alu_free = 4'($urandom_range(1, 8)); bu_free = 4'($urandom_range(1, 8));
      agu_free = 4'($urandom_range(1, 8)); lsu_free = 5'($urandom_range(2, 16));
      // retirements: some names of RAT entries, some stale
      ret_valid = '0;
      for (int k = 0; k < 3; k++) begin
        int r;
        r = $urandom_range(0, N_LREG - 1);
        ret_valid[k]    = 1'($urandom_range(0, 1));
        ret_has_dest[k] = 1'b1;
        ret_dest[k]     = LREG_W'(r);
        ret_tag[k]      = ($urandom_range(0, 1) != 0) ? m_tag[r] : TAG_W'($urandom());
      end
      // reference
      nall = 0;
      for (int u = 0; u < 5; u++) cnt[u] = 0;
      for (int s = 0; s < N_POPS; s++) begin
        tags[s] = TAG_W'(tail_q + TAG_W'(nall));
        if (bundle[s].valid) begin nall++; cnt[int'(bundle[s].unit)]++; end
      end
      exp_fire = bundle_valid && nall <= int'(rob_free) && cnt[0] <= int'(alu_free) && cnt[1] <= int'(bu_free)
                 && cnt[2] <= int'(agu_free) && (cnt[3] + cnt[4]) <= int'(lsu_free);
      #1;
      chk(stall == (bundle_valid && !exp_fire) && bundle_ready == (exp_fire || !bundle_valid), "stall/ready");
      for (int s = 0; s < N_POPS; s++) begin
        bit v;
        v = exp_fire && bundle[s].valid;
        chk(rob_alloc[s] == v, $sformatf("rob_alloc[%0d]", s));
        chk(alu_alloc[s] == (v && bundle[s].unit == U_ALU) && bu_alloc[s] == (v && bundle[s].unit == U_BU)
            && agu_alloc[s] == (v && bundle[s].unit == U_AGU)
            && lsu_alloc[s] == (v && (bundle[s].unit == U_LD || bundle[s].unit == U_ST)),
            $sformatf("routing slot %0d", s));
        if (bundle[s].valid) begin
          opnd_t ea, eb;
          ea = ref_opnd(s, bundle[s].use1, bundle[s].src1, tags);
          eb = ref_opnd(s, bundle[s].use2, bundle[s].src2, tags);
          chk(entry[s].tag == tags[s], $sformatf("tag slot %0d", s));
          chk(entry[s].a.rdy == ea.rdy && (ea.rdy ? entry[s].a.val == ea.val : entry[s].a.tag == ea.tag),
              $sformatf("operand a slot %0d", s));
          chk(entry[s].b.rdy == eb.rdy && (eb.rdy ? entry[s].b.val == eb.val : entry[s].b.tag == eb.tag),
              $sformatf("operand b slot %0d", s));
        end
      end
      @(posedge clk);
      for (int k = 0; k < N_POPS; k++)
        if (ret_valid[k] && m_busy[ret_dest[k]] && m_tag[ret_dest[k]] == ret_tag[k]) m_busy[ret_dest[k]] = 0;
      if (exp_fire) begin
        fired++;
        for (int s = 0; s < N_POPS; s++)
          if (bundle[s].valid && bundle[s].has_dest) begin m_busy[bundle[s].dest] = 1; m_tag[bundle[s].dest] = tags[s]; end
        tail_q = TAG_W'(tail_q + TAG_W'(nall));
      end else if (bundle_valid) stalls++;
    end
    $display("dispatched %0d, stalled %0d; operands: in-bundle %0d, from ROB %0d, from bus %0d, waiting %0d",
             fired, stalls, n_intra, n_rob, n_bus, n_wait);
    chk(fired > 0 && stalls > 0 && n_intra > 0 && n_rob > 0 && n_bus > 0 && n_wait > 0, "coverage");
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
