// tb_lsu: the load/store unit of the AGU_SNP model.
//
// Part 1 replays the document's execution flow of "Add mem[BX+SI],AX"
// (AG, LD, ADD, ST) and checks the cycle of each step. The AG address
// appears on the AGU bus in cycle 1, and the load result must come in cycle 3.
// The ADD result appears in cycle 4, and the store must write the cache in
// cycle 5. A following independent load, whose address is known, waits only
// until the store's address is known (cycle 2). It must then use the second
// load pipe and access the cache in cycle 3, together with the first load.
// Part 2 checks forwarding: a load behind a store to the same address takes
// the store's data without reading the cache.
// Part 3 is a random test. Streams of loads and stores use a few addresses,
// and their address and data operands arrive on the buses in random order.
// Every load value and every cache write (in program order) is compared with
// a sequential execution of the same stream. Both load pipes must be used.
module tb_lsu;
  import cisc_pkg::*;
  localparam int D = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        [N_POPS-1:0] alloc_valid, alloc_store;
  rs_entry_t   [N_POPS-1:0] alloc_entry;
  logic [$clog2(D+1)-1:0]   free_count;
  result_bus_t [N_BUS-1:0]  bus;
  logic dc_wr_valid, st_done, ev_forward, ev_dep_wait, ev_early_addr;
  logic [XLEN-1:0] dc_wr_addr, dc_wr_data;
  logic [N_LDP-1:0]           dc_rd_valid;
  logic [N_LDP-1:0][XLEN-1:0] dc_rd_addr, dc_rd_data;
  result_bus_t [N_LDP-1:0]    ld_res;
  logic [TAG_W-1:0] st_done_tag;
  int checks = 0, failures = 0;

  lsu #(.DEPTH(D), .LD_PIPES(N_LDP)) dut (.*);

  logic [XLEN-1:0] mem [16];
  always_comb
    for (int l = 0; l < N_LDP; l++) dc_rd_data[l] = mem[dc_rd_addr[l][3:0]];
  always_ff @(posedge clk) if (dc_wr_valid) mem[dc_wr_addr[3:0]] <= dc_wr_data;

  int cyc;
  always_ff @(posedge clk) cyc <= rst_n ? cyc + 1 : 0;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 12) $display("FAIL: %s", msg); end
  endtask

  function automatic opnd_t wait_on(int t);
    return '{rdy: 1'b0, tag: TAG_W'(t), val: '0};
  endfunction
  function automatic opnd_t ready(logic [XLEN-1:0] v);
    return '{rdy: 1'b1, tag: '0, val: v};
  endfunction

  task automatic idle_inputs();
    alloc_valid = '0; alloc_store = '0; alloc_entry = '0; bus = '0;
  endtask

  // ---------------- part 1: execution flow ----------------
  task automatic flow_test();
    int c0, c_ld, c_ld2, c_st;
    c_ld = -1; c_ld2 = -1; c_st = -1;
    for (int a = 0; a < 16; a++) mem[a] = 32'h1000 + a;
    @(negedge clk);
    idle_inputs();
    // tags: AG=0 LD=1 ADD=2 ST=3 ; next LD=4 (address 9 already known)
    alloc_valid[0] = 1; alloc_entry[0].tag = 1; alloc_entry[0].a = wait_on(0);
    alloc_valid[1] = 1; alloc_store[1] = 1; alloc_entry[1].tag = 3;
    alloc_entry[1].a = wait_on(0); alloc_entry[1].b = wait_on(2);
    alloc_valid[2] = 1; alloc_entry[2].tag = 4; alloc_entry[2].a = ready(32'd9);
    @(posedge clk);
    c0 = cyc;                       // cycle 1 starts now
    @(negedge clk);
    idle_inputs();
    bus[BUS_AGU] = '{valid: 1'b1, tag: 0, val: 32'd5};     // cycle 1: AG
    for (int k = 1; k <= 6; k++) begin
      #1;
      for (int l = 0; l < N_LDP; l++) begin
        if (ld_res[l].valid && ld_res[l].tag == 1) c_ld = k;
        if (ld_res[l].valid && ld_res[l].tag == 4) c_ld2 = k;
        if (ld_res[l].valid && ld_res[l].tag == 1) chk(ld_res[l].val == 32'h1005, "flow: LD value");
        if (ld_res[l].valid && ld_res[l].tag == 4) chk(ld_res[l].val == 32'h1009, "flow: next LD value");
      end
      if (dc_wr_valid) c_st = k;
      if (k == 2) chk(ev_early_addr, "flow: store holds its address before its data");
      if (dc_wr_valid) chk(dc_wr_addr == 5 && dc_wr_data == 32'h7777, "flow: ST address/data");
      @(negedge clk);
      idle_inputs();
      if (k + 1 == 4) bus[BUS_ALU] = '{valid: 1'b1, tag: 2, val: 32'h7777};  // cycle 4: ADD
    end
    $display("flow: LD done in cycle %0d, next LD in cycle %0d, ST cache access in cycle %0d", c_ld, c_ld2, c_st);
    chk(c_ld == 3, "flow: LD must complete in cycle 3");
    chk(c_ld2 == 3, "flow: the next LD must access the cache in cycle 3");
    chk(c_st == 5, "flow: ST must access the cache in cycle 5");
    repeat (4) @(negedge clk);
  endtask

  // ---------------- part 2: forwarding ----------------
  task automatic fwd_test();
    bit seen_fwd;
    seen_fwd = 0;
    @(negedge clk);
    idle_inputs();
    // an older store to 3 whose data is known, then a load from 3
    alloc_valid[0] = 1; alloc_store[0] = 1; alloc_entry[0].tag = 10;
    alloc_entry[0].a = wait_on(20); alloc_entry[0].b = ready(32'hBEEF);
    // an even older unrelated load keeps the store from writing at once
    alloc_valid[1] = 1; alloc_entry[1].tag = 11; alloc_entry[1].a = ready(32'd3);
    @(negedge clk);
    idle_inputs();
    repeat (2) @(negedge clk);
    bus[BUS_AGU] = '{valid: 1'b1, tag: 20, val: 32'd3};
    for (int k = 0; k < 6; k++) begin
      #1;
      for (int l = 0; l < N_LDP; l++)
        if (ld_res[l].valid && ld_res[l].tag == 11) begin
          chk(ld_res[l].val == 32'hBEEF, $sformatf("forwarded value %h", ld_res[l].val));
          chk(!dc_rd_valid[l], "forwarded load must not read the cache");
          seen_fwd = seen_fwd | ev_forward;
        end
      @(negedge clk);
      idle_inputs();
    end
    chk(seen_fwd, "forwarding event");
    repeat (4) @(negedge clk);
  endtask

  // ---------------- part 3: random streams ----------------
  localparam int NOPS = 600;
  bit              op_st [NOPS];
  logic [XLEN-1:0] op_addr [NOPS], op_data [NOPS], op_ldval [NOPS];
  bit              addr_sent [NOPS], data_sent [NOPS], op_done [NOPS];
  int n_alloc, st_idx, dep_waits, dual_loads;
  int st_order [$];

  task automatic random_test();
    logic [XLEN-1:0] g [16];
    for (int a = 0; a < 16; a++) begin mem[a] = $urandom(); g[a] = mem[a]; end
    for (int i = 0; i < NOPS; i++) begin
      op_st[i]   = ($urandom_range(0, 2) == 0);
      op_addr[i] = XLEN'($urandom_range(0, 3));
      op_data[i] = $urandom();
      if (op_st[i]) begin g[op_addr[i]] = op_data[i]; st_order.push_back(i); end
      else op_ldval[i] = g[op_addr[i]];
      addr_sent[i] = 0; data_sent[i] = 0; op_done[i] = 0;
    end
    n_alloc = 0;
    dep_waits = 0;
    dual_loads = 0;
    while (n_alloc < NOPS || st_order.size() > 0) begin
      int na, nb, live_lo;
      @(negedge clk);
      idle_inputs();
      live_lo = n_alloc;
      for (int i = 0; i < n_alloc; i++) if (!op_done[i]) begin live_lo = i; break; end
      na = $urandom_range(0, 3);
      if (na > int'(free_count)) na = int'(free_count);
      for (int k = 0; k < na; k++)
        if (n_alloc < NOPS && n_alloc - live_lo < D) begin
          int i;
          i = n_alloc;
          alloc_valid[k] = 1;
          alloc_store[k] = op_st[i];
          alloc_entry[k].tag = TAG_W'(i);
          if ($urandom_range(0, 3) == 0) begin alloc_entry[k].a = ready(op_addr[i]); addr_sent[i] = 1; end
          else alloc_entry[k].a = wait_on((2 * i) % 32);
          if (!op_st[i] || $urandom_range(0, 3) == 0) begin alloc_entry[k].b = ready(op_data[i]); data_sent[i] = 1; end
          else alloc_entry[k].b = wait_on((2 * i + 1) % 32);
          n_alloc++;
        end
      nb = 0;
      for (int i = live_lo; i < n_alloc && nb < N_BUS; i++) begin
        if (!addr_sent[i] && $urandom_range(0, 2) == 0) begin
          bus[nb] = '{valid: 1'b1, tag: TAG_W'((2 * i) % 32), val: op_addr[i]};
          addr_sent[i] = 1; nb++;
        end else if (!data_sent[i] && $urandom_range(0, 2) == 0) begin
          bus[nb] = '{valid: 1'b1, tag: TAG_W'((2 * i + 1) % 32), val: op_data[i]};
          data_sent[i] = 1; nb++;
        end
      end
      #1;
      if (ev_dep_wait) dep_waits++;
      for (int l = 0; l < N_LDP; l++)
        if (ld_res[l].valid) begin
          int i;
          i = live_lo + int'(TAG_W'(ld_res[l].tag - TAG_W'(live_lo)));
          chk(!op_st[i] && ld_res[l].val == op_ldval[i],
              $sformatf("load #%0d value %h expected %h", i, ld_res[l].val, op_ldval[i]));
          op_done[i] = 1;
          if (l > 0) dual_loads++;
        end
      if (dc_wr_valid) begin
        int i;
        i = st_order.pop_front();
        chk(dc_wr_addr == op_addr[i] && dc_wr_data == op_data[i] && st_done && st_done_tag == TAG_W'(i),
            $sformatf("store #%0d wrote [%0d]=%h", i, dc_wr_addr, dc_wr_data));
        op_done[i] = 1;
      end
      if (cyc > 20000) break;
    end
    @(posedge clk);
    #1;
    for (int a = 0; a < 4; a++) chk(mem[a] == g[a], $sformatf("final mem[%0d]", a));
    $display("random: %0d ops, %0d cycles with a load waiting on an older store", NOPS, dep_waits);
    chk(dep_waits > 0, "dependency waits happened");
    chk(dual_loads > 0, "second load pipe used");
  endtask

  initial begin
    idle_inputs();
    repeat (2) @(posedge clk);
    rst_n = 1;
    flow_test();
    fwd_test();
    random_test();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
