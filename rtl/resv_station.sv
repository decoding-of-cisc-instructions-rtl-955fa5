// resv_station: reservation station in front of the units of one kind.
//
// The dispatcher writes up to N_IN POPs per cycle (alloc_valid/alloc_entry,
// with operands already resolved as far as they can be). Each POP goes to the
// lowest free entry. Every entry watches the result buses and captures a
// missing operand when a bus carries its tag. Each cycle the station issues
// up to N_ISSUE entries whose operands are both ready, oldest first by ROB
// order: issue[0] is the oldest ready entry, issue[1] the next, and so on,
// one per execution unit behind the station. The issued POPs execute in the
// same cycle and their entries are freed at the clock edge. free_count tells
// the dispatcher how many entries are empty.
//
// Distributed reservation stations that snoop the result buses are the
// document's (Fig. 8). The document simulates unlimited entries and
// execution units. The depth, the oldest-first selection and the number of
// units served are this design's choices. rob_head is used only to rank ages.
module resv_station
  import cisc_pkg::*;
#(
  parameter int DEPTH = 8,
  parameter int N_IN  = N_POPS,
  parameter int N_ISSUE = 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic        [N_IN-1:0]       alloc_valid,
  input  rs_entry_t   [N_IN-1:0]       alloc_entry,
  output logic [$clog2(DEPTH+1)-1:0]   free_count,
  input  result_bus_t [N_BUS-1:0]      bus,
  input  logic [TAG_W-1:0]             rob_head,
  output logic        [N_ISSUE-1:0]    issue_valid,
  output rs_entry_t   [N_ISSUE-1:0]    issue
);

  rs_entry_t        ent [DEPTH];
  logic [DEPTH-1:0] used;

  // ---- free count ----
  always_comb begin
    free_count = '0;
    for (int j = 0; j < DEPTH; j++) if (!used[j]) free_count = free_count + 1'b1;
  end

  // ---- issue: the N_ISSUE oldest ready entries ----
  logic [$clog2(DEPTH)-1:0] sel [N_ISSUE];
  always_comb begin
    logic [TAG_W-1:0] best_age, age;
    logic [DEPTH-1:0] picked;
    picked = '0;
    for (int p = 0; p < N_ISSUE; p++) begin
      issue_valid[p] = 1'b0;
      sel[p]         = '0;
      best_age       = '1;
      for (int j = 0; j < DEPTH; j++) begin
        age = ent[j].tag - rob_head;
        if (used[j] && ent[j].a.rdy && ent[j].b.rdy && !picked[j] &&
            (!issue_valid[p] || age < best_age)) begin
          issue_valid[p] = 1'b1;
          sel[p]         = $clog2(DEPTH)'(j);
          best_age       = age;
        end
      end
      if (issue_valid[p]) picked[sel[p]] = 1'b1;
      issue[p] = ent[sel[p]];
    end
  end

  // ---- allocation slots ----
  logic [$clog2(DEPTH)-1:0] slot_of [N_IN];
  logic [N_IN-1:0]          slot_ok;
  always_comb begin
    logic [DEPTH-1:0] taken;
    taken = used;
    for (int k = 0; k < N_IN; k++) begin
      slot_of[k] = '0;
      slot_ok[k] = 1'b0;
      if (alloc_valid[k])
        for (int j = 0; j < DEPTH; j++)
          if (!slot_ok[k] && !taken[j]) begin
            slot_of[k] = $clog2(DEPTH)'(j);
            slot_ok[k] = 1'b1;
            taken[j]   = 1'b1;
          end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      used <= '0;
    end else begin
      for (int p = 0; p < N_ISSUE; p++)
        if (issue_valid[p]) used[sel[p]] <= 1'b0;
      for (int k = 0; k < N_IN; k++)
        if (slot_ok[k]) used[slot_of[k]] <= 1'b1;
    end
  end

  // entry contents: no reset, an entry is read only while `used` is set
  always_ff @(posedge clk) begin
    for (int j = 0; j < DEPTH; j++) begin
      ent[j].a <= snoop(ent[j].a, bus);
      ent[j].b <= snoop(ent[j].b, bus);
    end
    for (int k = 0; k < N_IN; k++)
      if (slot_ok[k]) begin
        ent[slot_of[k]].pop <= alloc_entry[k].pop;
        ent[slot_of[k]].tag <= alloc_entry[k].tag;
        ent[slot_of[k]].a   <= snoop(alloc_entry[k].a, bus);
        ent[slot_of[k]].b   <= snoop(alloc_entry[k].b, bus);
      end
  end

  // an allocation never lands on a full station
  assert property (@(posedge clk) disable iff (!rst_n)
    $countones(alloc_valid) <= int'(free_count))
    else $error("resv_station: allocation overflow");

endmodule
