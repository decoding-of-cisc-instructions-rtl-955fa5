// tb_cisc_core: end-to-end test of the whole core at its default sizes.
//
// A random instruction trace is generated while a sequential reference model
// executes it. The reference decides every branch outcome, and the branch
// goes into the trace with that outcome as its prediction, as a perfect
// predictor would give. The trace is fed to the core at a random 0..5
// instructions per cycle. The data cache is a 64-word array read in the same
// cycle, indexed by the low address bits, and the reference uses the same
// indexing. Complex instructions are acknowledged by a small micro-ROM model
// after a few cycles and have no architectural effect here.
// At the end the eight general registers and the whole memory must equal the
// reference, every non-complex instruction must have retired, and no
// misprediction may occur. The testbench also counts how often each mechanism
// of the design happened and fails if one never did: 5-wide decode, a
// general instruction decoded, a group cut by a taken branch, a dispatch
// stall, load forwarding, a load waiting on an older store, a store holding
// its address before its data, branch resolution and the micro-ROM hand-off.
module tb_cisc_core;
  import cisc_pkg::*;

  localparam int N_INSTR = 3000;
  localparam int MEMW    = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  x86_instr_t [M_INSTR-1:0] in_instr;
  logic [2:0]  in_count;
  logic        in_ready;
  logic        urom_req, urom_ack;
  x86_instr_t  urom_instr;
  logic        dc_wr_valid;
  logic [XLEN-1:0] dc_wr_addr, dc_wr_data;
  logic [N_LDP-1:0]           dc_rd_valid;
  logic [N_LDP-1:0][XLEN-1:0] dc_rd_addr, dc_rd_data;
  logic [N_LREG-1:0][XLEN-1:0] regs;
  logic [3:0]  ret_pops, ret_x86;
  logic        idle;
  logic [2:0]  ev_decoded;
  logic        ev_taken_cut, ev_disp_stall, ev_forward, ev_dep_wait, ev_early_addr, ev_branch, mispredict;

  cisc_core dut (.*);

  // ---------------- data cache model ----------------
  logic [XLEN-1:0] mem [MEMW];
  always_comb
    for (int l = 0; l < N_LDP; l++) dc_rd_data[l] = mem[dc_rd_addr[l][5:0]];
  always_ff @(posedge clk) if (dc_wr_valid) mem[dc_wr_addr[5:0]] <= dc_wr_data;

  // ---------------- trace and reference model ----------------
  x86_instr_t      trace [N_INSTR];
  logic [XLEN-1:0] gold_r [8];
  logic [XLEN-1:0] gold_m [MEMW];
  int n_cplx;
  // architectural writes in program order, for checking as they retire
  logic [2:0]      exp_wr_reg [$];
  logic [XLEN-1:0] exp_wr_val [$];
  logic [5:0]      exp_st_adr [$];
  logic [XLEN-1:0] exp_st_val [$];

  function automatic logic [XLEN-1:0] f_alu(aluop_e op, logic [XLEN-1:0] a, logic [XLEN-1:0] b);
    case (op)
      OP_ADD: return a + b;
      OP_SUB: return a - b;
      OP_AND: return a & b;
      OP_OR:  return a | b;
      OP_XOR: return a ^ b;
      default: return b;
    endcase
  endfunction

  task automatic gen_trace();
    x86_instr_t in;
    logic [XLEN-1:0] ea, v;
    int f;
    n_cplx = 0;
    for (int r = 0; r < 8; r++) gold_r[r] = '0;
    for (int i = 0; i < N_INSTR; i++) begin
      in = '0;
      f  = $urandom_range(0, 99);
      if      (f < 14) in.form = F_ALU_RR;
      else if (f < 26) in.form = F_ALU_RI;
      else if (f < 32) in.form = F_LEA;
      else if (f < 44) in.form = F_JCC;
      else if (f < 62) in.form = F_LOAD;
      else if (f < 78) in.form = F_STORE;
      else if (f < 88) in.form = F_ALU_RM;
      else if (f < 98) in.form = F_ALU_MR;
      else             in.form = F_CPLX;
      in.op        = aluop_e'($urandom_range(0, 5));
      in.r1        = 3'($urandom_range(0, 6));
      in.r2        = 3'($urandom_range(0, 7));
      in.has_base  = 1'($urandom_range(0, 1));
      in.base      = 3'd7;                 // r7 is never written: a stable base
      in.has_index = ($urandom_range(0, 3) == 0);
      in.index     = 3'd7;                 // so every address stays below 64
      in.imm       = (in.form inside {F_ALU_RI}) ? $urandom() : XLEN'($urandom_range(0, 31));
      in.br_ne     = 1'($urandom_range(0, 1));
      if (i == 0) begin                    // r7 <- 16
        in.form = F_ALU_RI; in.op = OP_MOV; in.r1 = 3'd7; in.imm = 32'd16;
      end
      ea = (in.has_base ? gold_r[in.base] : '0) + (in.has_index ? gold_r[in.index] : '0) + in.imm;
      case (in.form)
        F_ALU_RR: gold_r[in.r1] = f_alu(in.op, gold_r[in.r1], gold_r[in.r2]);
        F_ALU_RI: gold_r[in.r1] = f_alu(in.op, gold_r[in.r1], in.imm);
        F_LEA:    gold_r[in.r1] = ea;
        F_JCC:    in.br_taken = in.br_ne ? (gold_r[in.r1] != 0) : (gold_r[in.r1] == 0);
        F_LOAD:   gold_r[in.r1] = gold_m[ea[5:0]];
        F_STORE:  gold_m[ea[5:0]] = gold_r[in.r1];
        F_ALU_RM: gold_r[in.r1] = f_alu(in.op, gold_r[in.r1], gold_m[ea[5:0]]);
        F_ALU_MR: begin
          v = f_alu(in.op, gold_m[ea[5:0]], gold_r[in.r1]);
          gold_m[ea[5:0]] = v;
        end
        default:  n_cplx++;
      endcase
      if (in.form inside {F_ALU_RR, F_ALU_RI, F_LEA, F_LOAD, F_ALU_RM}) begin
        exp_wr_reg.push_back(in.r1);
        exp_wr_val.push_back(gold_r[in.r1]);
      end
      if (in.form inside {F_STORE, F_ALU_MR}) begin
        exp_st_adr.push_back(ea[5:0]);
        exp_st_val.push_back(gold_m[ea[5:0]]);
      end
      trace[i] = in;
    end
  endtask

  // ---------------- stimulus ----------------
  int sent;
  always_comb begin
    in_instr = '0;
    for (int k = 0; k < M_INSTR; k++)
      if (sent + k < N_INSTR) in_instr[k] = trace[sent + k];
  end

  int urom_wait;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sent      <= 0;
      in_count  <= '0;
      urom_wait <= 0;
    end else begin
      if (in_ready) sent <= sent + int'(in_count);
      // next offer
      begin
        int c;
        c = $urandom_range(0, 5);
        if (c > N_INSTR - (sent + (in_ready ? int'(in_count) : 0)))
          c = N_INSTR - (sent + (in_ready ? int'(in_count) : 0));
        in_count <= 3'(c);
      end
      urom_wait <= urom_req ? urom_wait + 1 : 0;
    end
  end
  assign urom_ack = urom_req && (urom_wait >= 2);

  // ---------------- checking ----------------
  int checks = 0, failures = 0;
  int cnt_5wide, cnt_general, cnt_cut, cnt_stall, cnt_fwd, cnt_dep, cnt_early, cnt_br, cnt_urom, cnt_misp;
  int retired_x86, retired_pops, cycles;

  int wr_seen = 0, st_seen = 0, wr_bad = 0, st_bad = 0;
  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < N_POPS; k++)
      if (dut.ret_valid[k] && dut.ret_has_dest[k] && dut.ret_dest[k] < 4'd8) begin
        if (exp_wr_reg.size() == 0 || exp_wr_reg[0] != dut.ret_dest[k][2:0]
            || exp_wr_val[0] != dut.ret_val[k]) begin
          if (wr_bad < 5)
            $display("FAIL: retire write #%0d r%0d=%h, expected r%0d=%h", wr_seen, dut.ret_dest[k],
                     dut.ret_val[k], exp_wr_reg[0], exp_wr_val[0]);
          wr_bad++;
        end
        if (exp_wr_reg.size() != 0) begin
          void'(exp_wr_reg.pop_front());
          void'(exp_wr_val.pop_front());
        end
        wr_seen++;
      end
    if (dc_wr_valid) begin
      if (exp_st_adr.size() == 0 || exp_st_adr[0] != dc_wr_addr[5:0] || exp_st_val[0] != dc_wr_data) begin
        if (st_bad < 5)
          $display("FAIL: store #%0d [%0d]=%h, expected [%0d]=%h", st_seen, dc_wr_addr[5:0], dc_wr_data,
                   exp_st_adr[0], exp_st_val[0]);
        st_bad++;
      end
      if (exp_st_adr.size() != 0) begin
        void'(exp_st_adr.pop_front());
        void'(exp_st_val.pop_front());
      end
      st_seen++;
    end
  end

  always_ff @(posedge clk) if (!rst_n) begin
    cnt_5wide <= 0; cnt_general <= 0; cnt_cut <= 0; cnt_stall <= 0; cnt_fwd <= 0; cnt_dep <= 0;
    cnt_early <= 0; cnt_br <= 0; cnt_urom <= 0; cnt_misp <= 0; retired_x86 <= 0; retired_pops <= 0;
    cycles <= 0;
  end else begin
    cycles       <= cycles + 1;
    retired_x86  <= retired_x86 + int'(ret_x86);
    retired_pops <= retired_pops + int'(ret_pops);
    if (ev_decoded == 3'd5)  cnt_5wide   <= cnt_5wide + 1;
    if (ev_decoded != 3'd0 && pop_count(dut.win[0].form) > 3'd2) cnt_general <= cnt_general + 1;
    if (ev_taken_cut)        cnt_cut     <= cnt_cut + 1;
    if (ev_disp_stall)       cnt_stall   <= cnt_stall + 1;
    if (ev_forward)          cnt_fwd     <= cnt_fwd + 1;
    if (ev_dep_wait)         cnt_dep     <= cnt_dep + 1;
    if (ev_early_addr)       cnt_early   <= cnt_early + 1;
    if (ev_branch)           cnt_br      <= cnt_br + 1;
    if (urom_ack)            cnt_urom    <= cnt_urom + 1;
    if (mispredict)          cnt_misp    <= cnt_misp + 1;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic mech(int n, string name);
    $display("  %-28s %0d", name, n);
    check(n > 0, {"mechanism never happened: ", name});
  endtask

  initial begin
    for (int a = 0; a < MEMW; a++) begin
      mem[a]    = $urandom();
      gold_m[a] = mem[a];
    end
    gen_trace();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (sent == N_INSTR);
    repeat (4) @(posedge clk);
    wait (idle);
    repeat (4) @(posedge clk);
    for (int r = 0; r < 8; r++)
      check(regs[r] == gold_r[r], $sformatf("r%0d = %h, expected %h", r, regs[r], gold_r[r]));
    for (int a = 0; a < MEMW; a++)
      check(mem[a] == gold_m[a], $sformatf("mem[%0d] = %h, expected %h", a, mem[a], gold_m[a]));
    check(retired_x86 == N_INSTR - n_cplx,
          $sformatf("retired %0d x86 instructions, expected %0d", retired_x86, N_INSTR - n_cplx));
    check(wr_bad == 0 && exp_wr_reg.size() == 0, $sformatf("%0d register writes out of order or wrong", wr_bad));
    check(st_bad == 0 && exp_st_adr.size() == 0, $sformatf("%0d stores out of order or wrong", st_bad));
    check(cnt_misp == 0, "misprediction reported under a perfect-prediction trace");
    $display("%0d instructions (%0d POPs) in %0d cycles: IPC %0d.%02d",
             retired_x86, retired_pops, cycles, retired_x86 / cycles, (retired_x86 * 100 / cycles) % 100);
    mech(cnt_5wide,   "cycles decoding 5 instr");
    mech(cnt_general, "general instr decoded");
    mech(cnt_cut,     "window cut at taken branch");
    mech(cnt_stall,   "dispatch stalls");
    mech(cnt_fwd,     "loads forwarded");
    mech(cnt_dep,     "load dependency waits");
    mech(cnt_early,   "store address before data");
    mech(cnt_br,      "branches resolved");
    mech(cnt_urom,    "micro-ROM hand-offs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
