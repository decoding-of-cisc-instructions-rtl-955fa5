// dispatcher: renames the POPs of one decoded bundle and dispatches them, in
// order and all together, to the reservation stations, the LSU buffer and
// the reorder buffer.
//
// Renaming: each valid POP is tagged with the ROB entry it gets (ROB tail
// plus its rank among the bundle's valid POPs). A register alias table (RAT)
// records, for every logical register, the tag of the youngest POP in flight
// that writes it. A source operand is resolved in this priority:
//   1. an older POP of the same bundle writes it -> wait for that tag;
//   2. the RAT names a producer in flight -> take its value if the ROB already
//      has it or a result bus carries it now, else wait for its tag;
//   3. otherwise read the register file.
// RAT entries are cleared when their producer retires, unless a newer POP
// has taken them over.
//
// Routing: ADD-type POPs go to the ALU station, branches to the BU station,
// AG POPs to the AGU station (AGU-POP strategy), and LD/ST POPs to the LSU
// buffer. The bundle is dispatched only if the ROB and every target have room
// for all of its POPs. Otherwise it waits (stall), which holds the decoder and,
// through it, the fetcher.
//
// Timing: combinational from the bundle register to the allocation ports. The
// new entries are written at the next clock edge. The dispatch width of 8, the
// in-order dispatch into distributed RSs and the ROB, and the stall back to
// the decoder follow the document (Table 1, Fig. 8). Renaming through a RAT
// and whole-bundle dispatch are this design's choices.
module dispatcher
  import cisc_pkg::*;
#(
  parameter int RS_CW  = 4,          // width of the RS free counts
  parameter int LSQ_CW = 5           // width of the LSU free count
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  pop_t        [N_POPS-1:0]          bundle,
  input  logic                              bundle_valid,
  output logic                              bundle_ready,
  // reorder buffer
  input  logic [TAG_W-1:0]                  rob_tail,
  input  logic [TAG_W:0]                    rob_free,
  input  logic [ROB_DEPTH-1:0]              rob_done,
  input  logic [ROB_DEPTH-1:0][XLEN-1:0]    rob_val,
  input  logic [N_POPS-1:0]                 ret_valid,
  input  logic [N_POPS-1:0]                 ret_has_dest,
  input  logic [N_POPS-1:0][LREG_W-1:0]     ret_dest,
  input  logic [N_POPS-1:0][TAG_W-1:0]      ret_tag,
  output logic [N_POPS-1:0]                 rob_alloc,
  // register file
  output logic [2*N_POPS-1:0][LREG_W-1:0]   rf_raddr,
  input  logic [2*N_POPS-1:0][XLEN-1:0]     rf_rdata,
  // stations
  input  logic [RS_CW-1:0]                  alu_free,
  input  logic [RS_CW-1:0]                  bu_free,
  input  logic [RS_CW-1:0]                  agu_free,
  input  logic [LSQ_CW-1:0]                 lsu_free,
  output logic [N_POPS-1:0]                 alu_alloc,
  output logic [N_POPS-1:0]                 bu_alloc,
  output logic [N_POPS-1:0]                 agu_alloc,
  output logic [N_POPS-1:0]                 lsu_alloc,
  output logic [N_POPS-1:0]                 lsu_store,
  output rs_entry_t [N_POPS-1:0]            entry,
  input  result_bus_t [N_BUS-1:0]           bus,
  output logic                              stall
);

  typedef struct packed {
    logic             busy;
    logic [TAG_W-1:0] tag;
  } rat_t;

  rat_t rat [N_LREG];

  logic [N_POPS-1:0][TAG_W-1:0] tag;

  // resolve one operand of slot s
  function automatic opnd_t resolve(int s, logic use_it, logic [LREG_W-1:0] r,
                                    logic [XLEN-1:0] rf_value);
    opnd_t o;
    logic  found;
    o     = '{rdy: 1'b1, tag: '0, val: '0};
    found = 1'b0;
    if (use_it) begin
      for (int k = 0; k < N_POPS; k++)
        if (k < s && bundle[k].valid && bundle[k].has_dest && bundle[k].dest == r) begin
          o     = '{rdy: 1'b0, tag: tag[k], val: '0};
          found = 1'b1;
        end
      if (!found) begin
        if (int'(r) < N_LREG && rat[r].busy) begin
          o = '{rdy: 1'b0, tag: rat[r].tag, val: '0};
          if (rob_done[rat[r].tag]) begin
            o.rdy = 1'b1;
            o.val = rob_val[rat[r].tag];
          end
          o = snoop(o, bus);
        end else begin
          o.val = rf_value;
        end
      end
    end
    return o;
  endfunction

  logic [3:0] n_all, n_alu, n_bu, n_agu, n_lsu;
  logic fire;

  always_comb begin
    logic [TAG_W-1:0] t;
    t     = rob_tail;
    n_all = '0; n_alu = '0; n_bu = '0; n_agu = '0; n_lsu = '0;
    for (int s = 0; s < N_POPS; s++) begin
      tag[s]          = t;
      rf_raddr[2*s]   = bundle[s].src1;
      rf_raddr[2*s+1] = bundle[s].src2;
      if (bundle[s].valid) begin
        t     = t + 1'b1;
        n_all = n_all + 1'b1;
        case (bundle[s].unit)
          U_ALU:      n_alu = n_alu + 1'b1;
          U_BU:       n_bu  = n_bu  + 1'b1;
          U_AGU:      n_agu = n_agu + 1'b1;
          default:    n_lsu = n_lsu + 1'b1;
        endcase
      end
    end
  end

  always_comb begin
    fire = bundle_valid
        && (int'(n_all) <= int'(rob_free))
        && (int'(n_alu) <= int'(alu_free))
        && (int'(n_bu)  <= int'(bu_free))
        && (int'(n_agu) <= int'(agu_free))
        && (int'(n_lsu) <= int'(lsu_free));
    stall        = bundle_valid && !fire;
    bundle_ready = fire || !bundle_valid;
    for (int s = 0; s < N_POPS; s++) begin
      entry[s].pop = bundle[s];
      entry[s].tag = tag[s];
      entry[s].a   = resolve(s, bundle[s].use1, bundle[s].src1, rf_rdata[2*s]);
      entry[s].b   = resolve(s, bundle[s].use2, bundle[s].src2, rf_rdata[2*s+1]);
      rob_alloc[s] = fire && bundle[s].valid;
      alu_alloc[s] = rob_alloc[s] && bundle[s].unit == U_ALU;
      bu_alloc[s]  = rob_alloc[s] && bundle[s].unit == U_BU;
      agu_alloc[s] = rob_alloc[s] && bundle[s].unit == U_AGU;
      lsu_alloc[s] = rob_alloc[s] && (bundle[s].unit == U_LD || bundle[s].unit == U_ST);
      lsu_store[s] = bundle[s].unit == U_ST;
    end
  end

  // ---- register alias table ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < N_LREG; r++) rat[r] <= '0;
    end else begin
      for (int k = 0; k < N_POPS; k++)
        if (ret_valid[k] && ret_has_dest[k] && int'(ret_dest[k]) < N_LREG
            && rat[ret_dest[k]].busy && rat[ret_dest[k]].tag == ret_tag[k])
          rat[ret_dest[k]].busy <= 1'b0;
      for (int s = 0; s < N_POPS; s++)
        if (rob_alloc[s] && bundle[s].has_dest && int'(bundle[s].dest) < N_LREG)
          rat[bundle[s].dest] <= '{busy: 1'b1, tag: tag[s]};
    end
  end

endmodule
