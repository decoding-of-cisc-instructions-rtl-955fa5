// tb_core_rate: peak-rate test of the whole core at its default sizes.
//
// Two instruction streams are fed at the full fetch width of five
// instructions per cycle, and the number of cycles from the first accepted
// instruction to the last retirement is measured.
//   Stream A: groups of four single-POP ALU instructions and one LEA. This is
//     five S1 instructions, so five instructions and five POPs per cycle.
//   Stream B: groups of one read-modify-write memory instruction (AG, LD,
//     ALU, ST in I0), three single-POP ALU instructions and one LEA. This is
//     five instructions and all eight POP slots per cycle. The units needed
//     per cycle (4 ALU, 2 AGU, 1 load, 1 store) match what the core has.
// Each ALU instruction adds 1 to its own register, so every ALU POP depends
// on the one a group earlier. The read-modify-write addresses repeat every 16
// groups. A stream of G groups must finish within G + 16 cycles, that is at
// 5 instructions per cycle for A and 5 instructions with 8 POPs per cycle for
// B, after the pipeline fill. The final registers and memory are compared
// with values computed here, and the decoder must have taken five
// instructions in at least G - 4 cycles of each stream.
module tb_core_rate;
  import cisc_pkg::*;

  localparam int G    = 200;     // groups per stream
  localparam int MEMW = 64;

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

  assign urom_ack = 1'b0;

  logic [XLEN-1:0] mem [MEMW];
  always_comb
    for (int l = 0; l < N_LDP; l++) dc_rd_data[l] = mem[dc_rd_addr[l][5:0]];
  always_ff @(posedge clk) if (dc_wr_valid) mem[dc_wr_addr[5:0]] <= dc_wr_data;

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic x86_instr_t alu_inc(logic [2:0] r);
    x86_instr_t i;
    i = '0; i.form = F_ALU_RI; i.op = OP_ADD; i.r1 = r; i.imm = 32'd1;
    return i;
  endfunction
  function automatic x86_instr_t lea(logic [2:0] r, int disp);
    x86_instr_t i;
    i = '0; i.form = F_LEA; i.r1 = r; i.has_base = 1'b1; i.base = 3'd7; i.imm = XLEN'(disp);
    return i;
  endfunction
  function automatic x86_instr_t rmw(int disp);
    x86_instr_t i;
    i = '0; i.form = F_ALU_MR; i.op = OP_ADD; i.r1 = 3'd0;
    i.has_base = 1'b1; i.base = 3'd7; i.imm = XLEN'(disp);
    return i;
  endfunction

  function automatic x86_instr_t [M_INSTR-1:0] group(bit b, int g);
    x86_instr_t [M_INSTR-1:0] grp;
    grp[0] = b ? rmw(g % 16) : alu_inc(3'd0);
    grp[1] = alu_inc(3'd1);
    grp[2] = alu_inc(3'd2);
    grp[3] = lea(3'd4, 100 + g);
    grp[4] = alu_inc(3'd3);
    return grp;
  endfunction

  int cycles = 0, retired = 0, wide5 = 0;
  always_ff @(posedge clk) begin
    cycles  <= cycles + 1;
    retired <= retired + (rst_n ? int'(ret_x86) : 0);
    if (rst_n && ev_decoded == 3'd5) wide5 <= wide5 + 1;
  end

  task automatic run_stream(bit b, output int used, output int w5);
    int g, t0, r0, w0;
    g = 0;
    r0 = retired;
    w0 = wide5;
    @(negedge clk);
    in_instr = group(b, 0);
    in_count = 3'd5;
    t0 = cycles;
    while (g < G) begin
      @(posedge clk);
      if (in_ready) g++;
      #1;
      if (g < G) in_instr = group(b, g);
      else in_count = '0;
    end
    while (retired < r0 + M_INSTR * G) @(posedge clk);
    used = cycles - t0;
    w5 = wide5 - w0;
  endtask

  initial begin
    int ca, cb, wa, wb;
    logic [XLEN-1:0] exp_mem [MEMW];
    in_instr = '0;
    in_count = '0;
    for (int a = 0; a < MEMW; a++) begin
      mem[a] = XLEN'(a) * 32'h0101_0101;
      exp_mem[a] = mem[a];
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    run_stream(1'b0, ca, wa);
    $display("stream A: %0d instructions, %0d POPs in %0d cycles (%0d cycles decoding 5)",
             M_INSTR * G, M_INSTR * G, ca, wa);
    chk(ca <= G + 16, $sformatf("stream A took %0d cycles, limit %0d", ca, G + 16));
    chk(wa >= G - 4, $sformatf("stream A decoded 5 wide in only %0d cycles", wa));
    chk(regs[0] == XLEN'(G) && regs[1] == XLEN'(G) && regs[2] == XLEN'(G) && regs[3] == XLEN'(G),
        "stream A register values");
    chk(regs[4] == XLEN'(100 + G - 1), "stream A LEA value");

    run_stream(1'b1, cb, wb);
    $display("stream B: %0d instructions, %0d POPs in %0d cycles (%0d cycles decoding 5)",
             M_INSTR * G, 8 * G, cb, wb);
    chk(cb <= G + 16, $sformatf("stream B took %0d cycles, limit %0d", cb, G + 16));
    chk(wb >= G - 4, $sformatf("stream B decoded 5 wide in only %0d cycles", wb));
    chk(regs[0] == XLEN'(G) && regs[1] == XLEN'(2 * G) && regs[2] == XLEN'(2 * G) &&
        regs[3] == XLEN'(2 * G), "stream B register values");
    for (int g = 0; g < G; g++) exp_mem[g % 16] = exp_mem[g % 16] + XLEN'(G);
    repeat (4) @(posedge clk);
    for (int a = 0; a < MEMW; a++)
      chk(mem[a] == exp_mem[a], $sformatf("mem[%0d]=%h, expected %h", a, mem[a], exp_mem[a]));
    chk(!mispredict && idle, "core idle at the end");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
