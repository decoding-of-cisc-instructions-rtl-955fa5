// reorder_buffer: keeps the POPs in program order from dispatch to retire.
//
// The dispatcher allocates up to N_POPS entries per cycle. The POPs of a
// bundle that are valid take consecutive entries from `tail`, and the
// dispatcher derives each POP's tag (its entry number) from the same order.
// An entry becomes done when a result bus or the LSU store-completion port
// carries its tag, and its value is kept. Up to N_RETIRE done entries retire
// per cycle from the head, strictly in order. Retired results are written to
// the register file (ret_* ports) in the same clock edge. done/val of every
// entry are visible to the dispatcher. It uses them to read operands whose
// producers have finished but not yet retired.
//
// In-order allocation and retirement and the retire width of 8 follow the
// document. The document simulates an unlimited ROB. The depth is this
// design's choice.
module reorder_buffer
  import cisc_pkg::*;
#(
  parameter int DEPTH    = ROB_DEPTH,
  parameter int N_IN     = N_POPS,
  parameter int N_RETIRE = N_POPS
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic        [N_IN-1:0]       alloc_valid,
  input  logic        [N_IN-1:0]       alloc_has_dest,
  input  logic        [N_IN-1:0][LREG_W-1:0] alloc_dest,
  input  logic        [N_IN-1:0]       alloc_last,
  output logic [$clog2(DEPTH)-1:0]     tail,
  output logic [$clog2(DEPTH)-1:0]     head,
  output logic [$clog2(DEPTH+1)-1:0]   free_count,
  input  result_bus_t [N_BUS-1:0]      bus,
  input  logic                         st_done,
  input  logic [$clog2(DEPTH)-1:0]     st_done_tag,
  output logic        [DEPTH-1:0]      ent_done,
  output logic        [DEPTH-1:0][XLEN-1:0] ent_val,
  output logic        [N_RETIRE-1:0]   ret_valid,
  output logic        [N_RETIRE-1:0]   ret_has_dest,
  output logic        [N_RETIRE-1:0][LREG_W-1:0] ret_dest,
  output logic        [N_RETIRE-1:0][XLEN-1:0]   ret_val,
  output logic        [N_RETIRE-1:0][$clog2(DEPTH)-1:0] ret_tag,
  output logic [$clog2(N_RETIRE+1)-1:0] ret_count,
  output logic [$clog2(N_RETIRE+1)-1:0] ret_x86      // x86 instructions completed
);

  localparam int PW = $clog2(DEPTH);
  localparam int CW = $clog2(DEPTH + 1);

  logic [DEPTH-1:0]             has_dest, last;
  logic [DEPTH-1:0][LREG_W-1:0] dest;
  logic [CW-1:0]                count;

  assign free_count = CW'(DEPTH) - count;

  // ---- retirement ----
  always_comb begin
    logic run;
    logic [PW-1:0] e;
    run       = 1'b1;
    ret_count = '0;
    ret_x86   = '0;
    for (int r = 0; r < N_RETIRE; r++) begin
      e = PW'((int'(head) + r) % DEPTH);
      ret_tag[r]      = e;
      ret_has_dest[r] = has_dest[e];
      ret_dest[r]     = dest[e];
      ret_val[r]      = ent_val[e];
      ret_valid[r]    = run && (r < int'(count)) && ent_done[e];
      if (ret_valid[r]) begin
        ret_count = ret_count + 1'b1;
        if (last[e]) ret_x86 = ret_x86 + 1'b1;
      end else run = 1'b0;
    end
  end

  logic [CW-1:0] n_alloc;
  always_comb begin
    n_alloc = '0;
    for (int k = 0; k < N_IN; k++) if (alloc_valid[k]) n_alloc = n_alloc + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      head  <= PW'((int'(head) + int'(ret_count)) % DEPTH);
      tail  <= PW'((int'(tail) + int'(n_alloc)) % DEPTH);
      count <= count + n_alloc - CW'(ret_count);
    end
  end

  // entry contents: no reset, an entry is read only between allocation and
  // retirement (allocation clears done)
  always_ff @(posedge clk) begin
    for (int b = 0; b < N_BUS; b++)
      if (bus[b].valid) begin
        ent_done[bus[b].tag] <= 1'b1;
        ent_val[bus[b].tag]  <= bus[b].val;
      end
    if (st_done) ent_done[st_done_tag] <= 1'b1;
    begin
      int r;
      r = 0;
      for (int k = 0; k < N_IN; k++)
        if (alloc_valid[k]) begin
          ent_done[PW'((int'(tail) + r) % DEPTH)] <= 1'b0;
          has_dest[PW'((int'(tail) + r) % DEPTH)] <= alloc_has_dest[k];
          dest[PW'((int'(tail) + r) % DEPTH)]     <= alloc_dest[k];
          last[PW'((int'(tail) + r) % DEPTH)]     <= alloc_last[k];
          r++;
        end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) int'(n_alloc) <= int'(free_count))
    else $error("reorder_buffer: allocation overflow");

endmodule
