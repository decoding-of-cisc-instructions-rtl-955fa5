// lsu: load/store unit of the AGU_SNP model. The address of every load and
// store comes from a separate AG POP. The store buffer snoops the result
// buses, so it learns addresses as soon as the AGU produces them.
//
// Structure: one ordered buffer of DEPTH entries, filled by the dispatcher in
// program order with every LD and ST POP (up to N_IN per cycle). An entry
// holds the ROB tag, the address operand and, for a store, the data operand.
// Each entry snoops all result buses for whichever of them is missing. So a
// store's address is in the buffer, and can be checked, long before its data
// exists. This is the point of the snooping store buffer.
//
// Per cycle:
//   dependency checking: among loads whose address is known and that have not
//     yet gone to the cache, pick the LD_PIPES oldest for which every older
//     pending store has a known address. If the youngest older store with the
//     same address has its data, the load takes the data from it
//     (forwarding). If that store has no data yet, the load waits. Each
//     chosen load goes to the pipeline register of its load pipe.
//   cache access: each registered load reads the data cache through its own
//     read port (read data is expected in the same cycle), or uses its
//     forwarded value. The result goes on that pipe's result bus. So a load
//     whose address arrives at the end of cycle 1 is checked in cycle 2 and
//     done in cycle 3, as in the document's execution flow. A second,
//     independent load that was held only by the store's unknown address is
//     checked in the same cycle 2 and also reaches the cache in cycle 3.
//   store: a store whose older entries are all done, and whose address and
//     data are known, writes the cache and reports completion on st_done.
// Done entries leave the buffer from its head.
//
// The three steps, the snooping and load forwarding are the document's. The
// buffer merges the LSU reservation station (which waits for store data) with
// the store buffer (which holds addresses). The conservative rule that an
// unknown older store address blocks a load, the depth, LD_PIPES = 2 loads and
// one store per cycle (the document simulates unlimited cache ports), and word
// addressing are this design's choices.
module lsu
  import cisc_pkg::*;
#(
  parameter int DEPTH = 16,
  parameter int N_IN  = N_POPS,
  parameter int LD_PIPES = 2
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // allocation from the dispatcher, program order
  input  logic        [N_IN-1:0]      alloc_valid,
  input  logic        [N_IN-1:0]      alloc_store,
  input  rs_entry_t   [N_IN-1:0]      alloc_entry,   // a = address, b = store data
  output logic [$clog2(DEPTH+1)-1:0]  free_count,
  input  result_bus_t [N_BUS-1:0]     bus,
  // data cache
  output logic [LD_PIPES-1:0]            dc_rd_valid,   // one read port per load pipe
  output logic [LD_PIPES-1:0][XLEN-1:0]  dc_rd_addr,
  input  logic [LD_PIPES-1:0][XLEN-1:0]  dc_rd_data,
  output logic                        dc_wr_valid,
  output logic [XLEN-1:0]             dc_wr_addr,
  output logic [XLEN-1:0]             dc_wr_data,
  // completion
  output result_bus_t [LD_PIPES-1:0]    ld_res,
  output logic                        st_done,
  output logic [TAG_W-1:0]            st_done_tag,
  // events
  output logic                        ev_forward,    // a load took store data
  output logic                        ev_dep_wait,   // a load with its address waits on an older store
  output logic                        ev_early_addr  // a store holds its address but not yet its data
);

  localparam int PW = $clog2(DEPTH);
  localparam int CW = $clog2(DEPTH + 1);

  typedef struct packed {
    logic             st;
    logic             done;
    logic             sent;      // load has passed dependency checking
    logic [TAG_W-1:0] tag;
    opnd_t            a;
    opnd_t            b;
  } lsq_t;

  lsq_t           q [DEPTH];
  logic [PW-1:0]  head, tail;
  logic [CW-1:0]  count;

  assign free_count = CW'(DEPTH) - count;

  function automatic logic [PW-1:0] idx(logic [PW-1:0] base, int off);
    return PW'((int'(base) + off) % DEPTH);
  endfunction

  // ---------------- dependency checking ----------------
  logic [LD_PIPES-1:0]  pick;
  logic [PW-1:0]     pick_i       [LD_PIPES];
  logic [LD_PIPES-1:0]  pick_fwd;
  logic [XLEN-1:0]   pick_fwd_val [LD_PIPES];
  logic              dep_wait;

  always_comb begin
    logic            blocked, match, mrdy;
    logic [XLEN-1:0] mval;
    logic [PW-1:0]   i, j;
    int              np;
    blocked      = 1'b0;
    match        = 1'b0;
    mrdy         = 1'b0;
    mval         = '0;
    i            = '0;
    j            = '0;
    np           = 0;
    pick         = '0;
    pick_fwd     = '0;
    for (int l = 0; l < LD_PIPES; l++) begin
      pick_i[l]       = '0;
      pick_fwd_val[l] = '0;
    end
    dep_wait     = 1'b0;
    for (int o = 0; o < DEPTH; o++) begin
      i = idx(head, o);
      if (o < int'(count) && !q[i].st && !q[i].done && !q[i].sent && q[i].a.rdy) begin
        blocked = 1'b0;
        match   = 1'b0;
        mrdy    = 1'b0;
        mval    = '0;
        for (int p = 0; p < DEPTH; p++) begin
          j = idx(head, p);
          if (p < o && q[j].st && !q[j].done) begin
            if (!q[j].a.rdy) blocked = 1'b1;
            else if (q[j].a.val == q[i].a.val) begin
              match = 1'b1;
              mrdy  = q[j].b.rdy;
              mval  = q[j].b.val;
            end
          end
        end
        if (!blocked && (!match || mrdy)) begin
          for (int l = 0; l < LD_PIPES; l++)
            if (l == np) begin
              pick[l]         = 1'b1;
              pick_i[l]       = i;
              pick_fwd[l]     = match;
              pick_fwd_val[l] = mval;
            end
          if (np < LD_PIPES) np++;
        end else begin
          dep_wait = 1'b1;
        end
      end
    end
  end

  // ---------------- cache-access stage ----------------
  logic [LD_PIPES-1:0] s_valid, s_fwd;
  logic [PW-1:0]    s_i       [LD_PIPES];
  logic [TAG_W-1:0] s_tag     [LD_PIPES];
  logic [XLEN-1:0]  s_addr    [LD_PIPES];
  logic [XLEN-1:0]  s_fwd_val [LD_PIPES];

  always_comb
    for (int l = 0; l < LD_PIPES; l++) begin
      dc_rd_valid[l]  = s_valid[l] && !s_fwd[l];
      dc_rd_addr[l]   = s_addr[l];
      ld_res[l].valid = s_valid[l];
      ld_res[l].tag   = s_tag[l];
      ld_res[l].val   = s_fwd[l] ? s_fwd_val[l] : dc_rd_data[l];
    end

  // ---------------- store to cache ----------------
  logic          st_go;
  logic [PW-1:0] st_i;
  always_comb begin
    logic older_done;
    older_done = 1'b1;
    st_go      = 1'b0;
    st_i       = '0;
    for (int o = 0; o < DEPTH; o++) begin
      if (o < int'(count) && !st_go) begin
        if (q[idx(head, o)].st && !q[idx(head, o)].done && older_done
            && q[idx(head, o)].a.rdy && q[idx(head, o)].b.rdy) begin
          st_go = 1'b1;
          st_i  = idx(head, o);
        end
        if (!q[idx(head, o)].done) older_done = 1'b0;
      end
    end
  end
  assign dc_wr_valid = st_go;
  assign dc_wr_addr  = q[st_i].a.val;
  assign dc_wr_data  = q[st_i].b.val;
  assign st_done     = st_go;
  assign st_done_tag = q[st_i].tag;

  // ---------------- retirement from the head ----------------
  logic [CW-1:0] n_free;
  always_comb begin
    logic run;
    run    = 1'b1;
    n_free = '0;
    for (int o = 0; o < DEPTH; o++)
      if (run && o < int'(count) && q[idx(head, o)].done) n_free = n_free + 1'b1;
      else run = 1'b0;
  end

  // ---------------- allocation ----------------
  logic [CW-1:0] n_alloc;
  always_comb begin
    n_alloc = '0;
    for (int k = 0; k < N_IN; k++) if (alloc_valid[k]) n_alloc = n_alloc + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head      <= '0;
      tail      <= '0;
      count     <= '0;
      s_valid <= '0;
      s_fwd   <= '0;
      for (int l = 0; l < LD_PIPES; l++) begin
        s_i[l]       <= '0;
        s_tag[l]     <= '0;
        s_addr[l]    <= '0;
        s_fwd_val[l] <= '0;
      end
    end else begin
      s_valid <= pick;
      for (int l = 0; l < LD_PIPES; l++)
        if (pick[l]) begin
          s_i[l]       <= pick_i[l];
          s_tag[l]     <= q[pick_i[l]].tag;
          s_addr[l]    <= q[pick_i[l]].a.val;
          s_fwd[l]     <= pick_fwd[l];
          s_fwd_val[l] <= pick_fwd_val[l];
        end
      tail  <= idx(tail, int'(n_alloc));
      head  <= idx(head, int'(n_free));
      count <= count + n_alloc - n_free;
    end
  end

  // buffer contents: no reset, an entry is read only while it lies between
  // head and tail
  always_ff @(posedge clk) begin
    int r;
    for (int j = 0; j < DEPTH; j++) begin
      q[j].a <= snoop(q[j].a, bus);
      q[j].b <= snoop(q[j].b, bus);
    end
    for (int l = 0; l < LD_PIPES; l++) begin
      if (s_valid[l]) q[s_i[l]].done    <= 1'b1;   // cache stage completes
      if (pick[l])    q[pick_i[l]].sent <= 1'b1;   // load passed dependency checking
    end
    if (st_go) q[st_i].done <= 1'b1;
    r = 0;
    for (int k = 0; k < N_IN; k++)
      if (alloc_valid[k]) begin
        q[idx(tail, r)].st   <= alloc_store[k];
        q[idx(tail, r)].done <= 1'b0;
        q[idx(tail, r)].sent <= 1'b0;
        q[idx(tail, r)].tag  <= alloc_entry[k].tag;
        q[idx(tail, r)].a    <= snoop(alloc_entry[k].a, bus);
        q[idx(tail, r)].b    <= alloc_store[k] ? snoop(alloc_entry[k].b, bus)
                                               : '{rdy: 1'b1, tag: '0, val: '0};
        r++;
      end
  end

  always_comb begin
    ev_forward    = |(s_valid & s_fwd);
    ev_dep_wait   = dep_wait;
    ev_early_addr = 1'b0;
    for (int o = 0; o < DEPTH; o++)
      if (o < int'(count) && q[idx(head, o)].st && !q[idx(head, o)].done
          && q[idx(head, o)].a.rdy && !q[idx(head, o)].b.rdy)
        ev_early_addr = 1'b1;
  end

  assert property (@(posedge clk) disable iff (!rst_n) int'(n_alloc) <= int'(free_count))
    else $error("lsu: allocation overflow");

endmodule
