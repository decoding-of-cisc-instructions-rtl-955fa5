// x86_decoder: the decoding unit for rule 5I:1G:3S2:1S1:8P. Per cycle it
// translates up to five instructions into up to eight POPs.
//
// Slot layout (POP0..POP7):
//   F0..F3  hold tables 1,2,3,4 and always take I0, the general instruction
//           (1 to 4 POPs). Slots that I0 does not use stay empty.
//   F4      holds table 1 and takes the first POP of I1.
//   F5..F7  hold tables 1 and 2 each. A crossbar packs into them the rest
//           of I1 and then I2 and I3 (S2: 1 or 2 POPs each) and I4 (S1: 1 POP).
// Decoding is in program order and stops at the first instruction that breaks
// the rule or does not fit in the slots. For example, I4 is decoded only if
// I1..I3 all have one POP, and I3 only if its POPs end by POP7. A complex
// instruction in I0 decodes nothing. It is offered on urom_req and consumed
// when urom_ack arrives. A complex instruction elsewhere ends the group.
//
// Timing: the window is read combinationally, and `take` tells the fetcher
// how many instructions are consumed in this cycle. The POP bundle is
// registered, so the dispatcher sees it in the next cycle. While the
// dispatcher holds off (bundle_valid & !bundle_ready), take is 0.
// Slot layout, table numbers and the 5/8 widths are as the document draws
// them (Fig. 13b). The empty-slot policy and the micro-ROM hand-off are this
// design's choices.
module x86_decoder
  import cisc_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  x86_instr_t [M_INSTR-1:0]  win,
  input  logic       [M_INSTR-1:0]  win_valid,   // contiguous from bit 0
  output logic       [2:0]          take,
  output pop_t       [N_POPS-1:0]   bundle,
  output logic                      bundle_valid,
  input  logic                      bundle_ready,
  output logic                      urom_req,
  output x86_instr_t                urom_instr,
  input  logic                      urom_ack,
  output logic [2:0]                n_decoded    // instructions in the bundle being loaded (for statistics)
);

  logic accept;
  assign accept = !bundle_valid || bundle_ready;

  logic [2:0] n   [M_INSTR];
  logic [3:0] st  [M_INSTR];     // first slot of each instruction
  logic [M_INSTR-1:0] ok;

  always_comb begin
    for (int i = 0; i < M_INSTR; i++) n[i] = pop_count(win[i].form);
    st[0] = 4'd0;
    st[1] = 4'd4;
    for (int i = 2; i < M_INSTR; i++) st[i] = st[i-1] + 4'(n[i-1]);
    ok[0] = win_valid[0] && (n[0] != 3'd0);
    ok[1] = ok[0] && win_valid[1] && (n[1] != 3'd0) && (n[1] <= 3'd2);
    ok[2] = ok[1] && win_valid[2] && (n[2] != 3'd0) && (n[2] <= 3'd2);
    ok[3] = ok[2] && win_valid[3] && (n[3] != 3'd0) && (n[3] <= 3'd2)
            && (5'(st[3]) + 5'(n[3]) <= 5'd8);
    ok[4] = ok[3] && win_valid[4] && (n[4] == 3'd1) && (st[4] <= 4'd7);
  end

  // ---- general slots F0..F3: tables 1..4 on I0 ----
  pop_t [N_POPS-1:0] slot;
  for (genvar k = 0; k < 4; k++) begin : g_gen
    pop_xlate #(.IDX(k + 1)) u_tab (.ins(win[0]), .pop(slot[k]));
  end

  // ---- F4: table 1 on I1 ----
  pop_xlate #(.IDX(1)) u_tab4 (.ins(win[1]), .pop(slot[4]));

  // ---- F5..F7: crossbar + tables 1 and 2 ----
  for (genvar s = 5; s < N_POPS; s++) begin : g_s2
    x86_instr_t sel_ins;
    logic       sel_ok;
    logic       sel_second;            // use table 2
    pop_t       t1, t2;
    always_comb begin
      sel_ins    = win[1];
      sel_ok     = 1'b0;
      sel_second = 1'b0;
      for (int i = 1; i < M_INSTR; i++)
        if (ok[i] && (4'(s) >= st[i]) && (4'(s) < st[i] + 4'(n[i]))) begin
          sel_ins    = win[i];
          sel_ok     = 1'b1;
          sel_second = (4'(s) != st[i]);
        end
    end
    pop_xlate #(.IDX(1)) u_t1 (.ins(sel_ins), .pop(t1));
    pop_xlate #(.IDX(2)) u_t2 (.ins(sel_ins), .pop(t2));
    pop_t res;
    always_comb begin
      res = sel_second ? t2 : t1;
      if (!sel_ok) res = '0;
    end
    assign slot[s] = res;
  end

  // ---- consumption ----
  logic cplx0;
  assign cplx0      = win_valid[0] && (win[0].form == F_CPLX);
  assign urom_req   = cplx0;
  assign urom_instr = win[0];

  logic [2:0] n_ok;
  always_comb begin
    n_ok = 3'd0;
    for (int i = 0; i < M_INSTR; i++) if (ok[i]) n_ok = 3'(i + 1);
  end

  always_comb begin
    if (!accept)      take = 3'd0;
    else if (cplx0)   take = urom_ack ? 3'd1 : 3'd0;
    else              take = n_ok;
  end
  assign n_decoded = (accept && !cplx0) ? n_ok : 3'd0;

  // ---- bundle register ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bundle_valid <= 1'b0;
      bundle       <= '0;
    end else if (accept) begin
      bundle_valid <= ok[0];
      for (int k = 0; k < N_POPS; k++) begin
        bundle[k] <= slot[k];
        if (k < 4 && !ok[0]) bundle[k].valid <= 1'b0;
        if (k == 4 && !ok[1]) bundle[k].valid <= 1'b0;
      end
    end
  end

endmodule
