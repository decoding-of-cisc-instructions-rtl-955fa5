// cisc_core: a superscalar out-of-order core for an x86-style instruction set,
// built around a high-issue-rate decoder.
//
// Pipeline (six stages): fetch -> decode -> dispatch -> RS -> execute -> retire.
//   fetch     fetcher: queue of predecoded instructions; a window of up to 5
//             per cycle, cut after a predicted-taken branch.
//   decode    x86_decoder: rule 5I:1G:3S2:1S1:8P, up to 5 instructions into
//             up to 8 POPs. Address generation is a POP of its own (AGU-POP).
//   dispatch  dispatcher: renaming, operand read, in-order dispatch of the
//             whole bundle to the stations, the LSU buffer and the ROB.
//   RS        resv_station x3 (ALU, BU, AGU): wait for operands by snooping;
//             the ALU station issues up to N_ALU POPs per cycle, the AGU
//             station up to N_AGU.
//   execute   N_ALU alu, one branch_unit, N_AGU agu (one cycle each) and lsu
//             (store buffer snooping AG addresses, dependency check, cache
//             access).
//   retire    reorder_buffer: up to 8 POPs per cycle, in order, into reg_file.
// One result bus per unit (N_ALU + 1 + N_AGU + N_LDP load pipes of the LSU,
// 9 with the defaults of cisc_pkg) is snooped by the stations, the LSU
// buffer, the dispatcher and the ROB. The document simulates an unlimited
// number of units and cache ports; 4 ALUs, 2 AGUs, 2 load pipes and one
// store port are this design's choice.
//
// Outside the core, on ports: the I-cache/predecoder (in_*), the micro-ROM
// for complex instructions (urom_*), which the document does not detail, and
// the data cache (dc_*: N_LDP read ports with read data expected in the same
// cycle, one write port). The ev_*
// outputs pulse on the mechanisms of the design for monitoring.
// No floating-point unit is built. Perfect branch prediction is assumed, as
// in the document, so a wrong prediction is only reported (mispredict).
module cisc_core
  import cisc_pkg::*;
#(
  parameter int RS_DEPTH  = 16,
  parameter int LSQ_DEPTH = 16,
  parameter int IQ_DEPTH  = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // predecoded instruction stream
  input  x86_instr_t [M_INSTR-1:0]  in_instr,
  input  logic [2:0]                in_count,
  output logic                      in_ready,
  // micro-ROM hand-off for complex instructions
  output logic                      urom_req,
  output x86_instr_t                urom_instr,
  input  logic                      urom_ack,
  // data cache
  output logic [N_LDP-1:0]           dc_rd_valid,   // one read port per load pipe
  output logic [N_LDP-1:0][XLEN-1:0] dc_rd_addr,
  input  logic [N_LDP-1:0][XLEN-1:0] dc_rd_data,
  output logic                      dc_wr_valid,
  output logic [XLEN-1:0]           dc_wr_addr,
  output logic [XLEN-1:0]           dc_wr_data,
  // architectural state and progress
  output logic [N_LREG-1:0][XLEN-1:0] regs,
  output logic [3:0]                ret_pops,
  output logic [3:0]                ret_x86,
  output logic                      idle,
  // events
  output logic [2:0]                ev_decoded,     // instructions decoded this cycle
  output logic                      ev_taken_cut,
  output logic                      ev_disp_stall,
  output logic                      ev_forward,
  output logic                      ev_dep_wait,
  output logic                      ev_early_addr,
  output logic                      ev_branch,
  output logic                      mispredict
);

  localparam int RS_CW  = $clog2(RS_DEPTH + 1);
  localparam int LSQ_CW = $clog2(LSQ_DEPTH + 1);

  result_bus_t [N_BUS-1:0] bus;

  // ---------------- fetch ----------------
  x86_instr_t [M_INSTR-1:0] win;
  logic       [M_INSTR-1:0] win_valid;
  logic [2:0]               take;

  fetcher #(.FETCH_W(M_INSTR), .IQ_DEPTH(IQ_DEPTH)) u_fetch (
    .clk, .rst_n,
    .in_instr, .in_count, .in_ready,
    .win, .win_valid, .take,
    .taken_cut(ev_taken_cut)
  );

  // ---------------- decode ----------------
  pop_t [N_POPS-1:0] bundle;
  logic              bundle_valid, bundle_ready;

  x86_decoder u_dec (
    .clk, .rst_n,
    .win, .win_valid, .take,
    .bundle, .bundle_valid, .bundle_ready,
    .urom_req, .urom_instr, .urom_ack,
    .n_decoded(ev_decoded)
  );

  // ---------------- dispatch ----------------
  logic [TAG_W-1:0]                rob_tail, rob_head;
  logic [TAG_W:0]                  rob_free;
  logic [ROB_DEPTH-1:0]            rob_done;
  logic [ROB_DEPTH-1:0][XLEN-1:0]  rob_val;
  logic [N_POPS-1:0]               ret_valid, ret_has_dest;
  logic [N_POPS-1:0][LREG_W-1:0]   ret_dest;
  logic [N_POPS-1:0][XLEN-1:0]     ret_val;
  logic [N_POPS-1:0][TAG_W-1:0]    ret_tag;
  logic [N_POPS-1:0]               rob_alloc, alu_alloc, bu_alloc, agu_alloc, lsu_alloc, lsu_store;
  rs_entry_t [N_POPS-1:0]          entry;
  logic [2*N_POPS-1:0][LREG_W-1:0] rf_raddr;
  logic [2*N_POPS-1:0][XLEN-1:0]   rf_rdata;
  logic [RS_CW-1:0]                alu_free, bu_free, agu_free;
  logic [LSQ_CW-1:0]               lsu_free;

  dispatcher #(.RS_CW(RS_CW), .LSQ_CW(LSQ_CW)) u_disp (
    .clk, .rst_n,
    .bundle, .bundle_valid, .bundle_ready,
    .rob_tail, .rob_free, .rob_done, .rob_val,
    .ret_valid, .ret_has_dest, .ret_dest, .ret_tag,
    .rob_alloc,
    .rf_raddr, .rf_rdata,
    .alu_free, .bu_free, .agu_free, .lsu_free,
    .alu_alloc, .bu_alloc, .agu_alloc, .lsu_alloc, .lsu_store,
    .entry, .bus,
    .stall(ev_disp_stall)
  );

  // ---------------- stations and units ----------------
  logic      [N_ALU-1:0] alu_iv;
  logic      [N_AGU-1:0] agu_iv;
  logic                  bu_iv;
  rs_entry_t [N_ALU-1:0] alu_is;
  rs_entry_t [N_AGU-1:0] agu_is;
  rs_entry_t             bu_is;

  resv_station #(.DEPTH(RS_DEPTH), .N_ISSUE(N_ALU)) u_rs_alu (
    .clk, .rst_n, .alloc_valid(alu_alloc), .alloc_entry(entry), .free_count(alu_free),
    .bus, .rob_head, .issue_valid(alu_iv), .issue(alu_is));
  resv_station #(.DEPTH(RS_DEPTH)) u_rs_bu (
    .clk, .rst_n, .alloc_valid(bu_alloc), .alloc_entry(entry), .free_count(bu_free),
    .bus, .rob_head, .issue_valid(bu_iv), .issue(bu_is));
  resv_station #(.DEPTH(RS_DEPTH), .N_ISSUE(N_AGU)) u_rs_agu (
    .clk, .rst_n, .alloc_valid(agu_alloc), .alloc_entry(entry), .free_count(agu_free),
    .bus, .rob_head, .issue_valid(agu_iv), .issue(agu_is));

  for (genvar u = 0; u < N_ALU; u++) begin : g_alu
    alu u_alu (.issue_valid(alu_iv[u]), .issue(alu_is[u]), .res(bus[BUS_ALU+u]));
  end
  for (genvar u = 0; u < N_AGU; u++) begin : g_agu
    agu u_agu (.issue_valid(agu_iv[u]), .issue(agu_is[u]), .res(bus[BUS_AGU+u]));
  end

  branch_unit u_bu (.issue_valid(bu_iv), .issue(bu_is), .res(bus[BUS_BU]),
                    .resolved(ev_branch), .mispredict);

  logic             st_done;
  logic [TAG_W-1:0] st_done_tag;

  lsu #(.DEPTH(LSQ_DEPTH), .LD_PIPES(N_LDP)) u_lsu (
    .clk, .rst_n,
    .alloc_valid(lsu_alloc), .alloc_store(lsu_store), .alloc_entry(entry),
    .free_count(lsu_free), .bus,
    .dc_rd_valid, .dc_rd_addr, .dc_rd_data,
    .dc_wr_valid, .dc_wr_addr, .dc_wr_data,
    .ld_res(bus[BUS_LSU +: N_LDP]), .st_done, .st_done_tag,
    .ev_forward, .ev_dep_wait, .ev_early_addr
  );

  // ---------------- reorder buffer and register file ----------------
  logic [N_POPS-1:0]             alloc_has_dest, alloc_last;
  logic [N_POPS-1:0][LREG_W-1:0] alloc_dest;
  always_comb
    for (int s = 0; s < N_POPS; s++) begin
      alloc_has_dest[s] = bundle[s].has_dest;
      alloc_dest[s]     = bundle[s].dest;
      alloc_last[s]     = bundle[s].last;
    end


  reorder_buffer u_rob (
    .clk, .rst_n,
    .alloc_valid(rob_alloc), .alloc_has_dest, .alloc_dest, .alloc_last,
    .tail(rob_tail), .head(rob_head), .free_count(rob_free),
    .bus, .st_done, .st_done_tag,
    .ent_done(rob_done), .ent_val(rob_val),
    .ret_valid, .ret_has_dest, .ret_dest, .ret_val, .ret_tag,
    .ret_count(ret_pops), .ret_x86
  );

  reg_file u_rf (
    .clk, .rst_n,
    .we(ret_valid & ret_has_dest), .waddr(ret_dest), .wdata(ret_val),
    .raddr(rf_raddr), .rdata(rf_rdata), .regs
  );

  assign idle = (rob_free == (TAG_W+1)'(ROB_DEPTH)) && !bundle_valid && (win_valid == '0);

endmodule
