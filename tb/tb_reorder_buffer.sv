// tb_reorder_buffer: random bundles (with empty slots) are allocated, and
// random in-flight entries complete out of order through the result buses
// and the store-completion port. A reference queue checks that retirement is
// strictly in order, takes every done entry at the head up to eight per
// cycle, carries the right destination and value, counts x86 instructions by
// their last POP, and that tail and free count follow allocation.
module tb_reorder_buffer;
  import cisc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        [N_POPS-1:0]             alloc_valid, alloc_has_dest, alloc_last;
  logic        [N_POPS-1:0][LREG_W-1:0] alloc_dest;
  logic [TAG_W-1:0]                     tail, head;
  logic [TAG_W:0]                       free_count;
  result_bus_t [N_BUS-1:0]              bus;
  logic                                 st_done;
  logic [TAG_W-1:0]                     st_done_tag;
  logic [ROB_DEPTH-1:0]                 ent_done;
  logic [ROB_DEPTH-1:0][XLEN-1:0]       ent_val;
  logic [N_POPS-1:0]                    ret_valid, ret_has_dest;
  logic [N_POPS-1:0][LREG_W-1:0]        ret_dest;
  logic [N_POPS-1:0][XLEN-1:0]          ret_val;
  logic [N_POPS-1:0][TAG_W-1:0]         ret_tag;
  logic [3:0]                           ret_count, ret_x86;

  reorder_buffer dut (.*);

  typedef struct { logic [TAG_W-1:0] tag; bit has_dest; logic [LREG_W-1:0] dest; bit last;
                   bit done; bit has_val; logic [XLEN-1:0] val; } ent_t;
  ent_t model [$];
  int checks = 0, failures = 0, total_ret = 0, max_ret = 0;
  logic [TAG_W-1:0] mtail;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    alloc_valid = '0; alloc_has_dest = '0; alloc_last = '0; alloc_dest = '0;
    bus = '0; st_done = 0; st_done_tag = '0; mtail = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int na, exp_ret, exp_x86;
      @(negedge clk);
      chk(tail == mtail && int'(free_count) == ROB_DEPTH - model.size(), "tail/free_count");
      // allocation with holes
      na = $urandom_range(0, 8);
      if (na > ROB_DEPTH - model.size()) na = ROB_DEPTH - model.size();
      alloc_valid = '0;
      for (int k = 0, c = 0; k < N_POPS; k++) begin
        alloc_has_dest[k] = 1'($urandom_range(0, 1));
        alloc_dest[k]     = LREG_W'($urandom_range(0, 10));
        alloc_last[k]     = 1'($urandom_range(0, 1));
        if (c < na && $urandom_range(0, 3) != 0) begin alloc_valid[k] = 1; c++; end
      end
      // completion of random in-flight entries
      bus = '0; st_done = 0;
      for (int b = 0; b <= N_BUS; b++)
        if (model.size() > 0 && $urandom_range(0, 1) == 1) begin
          int m;
          m = $urandom_range(0, model.size() - 1);
          if (!model[m].done) begin
            if (b < N_BUS) bus[b] = '{valid: 1'b1, tag: model[m].tag, val: $urandom()};
            else begin st_done = 1; st_done_tag = model[m].tag; end
          end
        end
      #1;
      // expected retirement
      exp_ret = 0; exp_x86 = 0;
      for (int r = 0; r < N_POPS && r < model.size(); r++)
        if (model[r].done) begin
          exp_ret++;
          if (model[r].last) exp_x86++;
          chk(ret_valid[r] && ret_tag[r] == model[r].tag && ret_has_dest[r] == model[r].has_dest
              && ret_dest[r] == model[r].dest && (!model[r].has_val || ret_val[r] == model[r].val),
              $sformatf("retire slot %0d", r));
        end else break;
      chk(int'(ret_count) == exp_ret && int'(ret_x86) == exp_x86,
          $sformatf("ret_count %0d expected %0d", ret_count, exp_ret));
      total_ret += exp_ret;
      if (exp_ret > max_ret) max_ret = exp_ret;
      @(posedge clk);
      for (int r = 0; r < exp_ret; r++) void'(model.pop_front());
      for (int b = 0; b < N_BUS; b++)
        if (bus[b].valid)
          foreach (model[m]) if (model[m].tag == bus[b].tag) begin model[m].done = 1; model[m].has_val = 1; model[m].val = bus[b].val; end
      if (st_done) foreach (model[m]) if (model[m].tag == st_done_tag) model[m].done = 1;
      for (int k = 0; k < N_POPS; k++)
        if (alloc_valid[k]) begin
          model.push_back('{mtail, alloc_has_dest[k], alloc_dest[k], alloc_last[k], 0, 0, '0});
          mtail++;
        end
    end
    $display("retired %0d POPs, at most %0d in one cycle", total_ret, max_ret);
    chk(max_ret == N_POPS, "eight-wide retirement happened");
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
