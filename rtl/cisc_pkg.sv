// cisc_pkg: types and constants shared by the decoder, the dispatcher and the
// execution back end of the CISC superscalar core.
//
// The core decodes x86-style instructions that a predecoder has already split
// into fields (x86_instr_t). Each one is translated into one to four primitive
// operations (POPs, pop_t). Address generation is a POP of its own (AG), as the
// AGU-POP strategy prescribes. The instruction forms, the field widths, the
// logical register numbering (eight general registers plus three temporaries
// for the POPs of one instruction) and the encodings are this design's own.
// The document gives only the strategy and the worked example "Add mem[BX+SI], AX".
package cisc_pkg;

  localparam int XLEN      = 32;          // data and address width
  localparam int N_GPR     = 8;           // x86 general registers
  localparam int N_LREG    = 11;          // GPRs plus temp1..temp3
  localparam int LREG_W    = 4;
  localparam logic [LREG_W-1:0] TEMP1 = 4'd8;
  localparam logic [LREG_W-1:0] TEMP2 = 4'd9;
  localparam logic [LREG_W-1:0] TEMP3 = 4'd10;

  localparam int ROB_DEPTH = 64;
  localparam int TAG_W     = $clog2(ROB_DEPTH);

  localparam int M_INSTR   = 5;           // x86 instructions decoded per cycle
  localparam int N_POPS    = 8;           // POPs decoded/dispatched/retired per cycle

  // execution units of each kind that may issue in the same cycle
  localparam int N_ALU     = 4;
  localparam int N_AGU     = 2;
  localparam int N_LDP     = 2;           // load pipes (cache read ports) of the LSU

  // result buses, one per unit: ALUs, branch unit, AGUs, load pipes of the LSU
  localparam int BUS_ALU   = 0;                   // first of N_ALU
  localparam int BUS_BU    = N_ALU;
  localparam int BUS_AGU   = N_ALU + 1;           // first of N_AGU
  localparam int BUS_LSU   = N_ALU + 1 + N_AGU;   // first of N_LDP
  localparam int N_BUS     = N_ALU + N_AGU + 1 + N_LDP;

  // Forms of predecoded instructions and the POPs each becomes (AGU-POP)
  typedef enum logic [3:0] {
    F_ALU_RR = 4'd0,  // r1 <- r1 op r2                    : ALU            (S1)
    F_ALU_RI = 4'd1,  // r1 <- r1 op imm                   : ALU            (S1)
    F_LEA    = 4'd2,  // r1 <- base+index+disp             : AG             (S1)
    F_JCC    = 4'd3,  // branch if r1 ==0 / !=0            : BR             (S1)
    F_LOAD   = 4'd4,  // r1 <- mem[ea]                     : AG LD          (S2)
    F_STORE  = 4'd5,  // mem[ea] <- r1                     : AG ST          (S2)
    F_ALU_RM = 4'd6,  // r1 <- r1 op mem[ea]               : AG LD ALU      (G)
    F_ALU_MR = 4'd7,  // mem[ea] <- mem[ea] op r1          : AG LD ALU ST   (G)
    F_CPLX   = 4'd15  // complex: handed to the micro-ROM
  } form_e;

  typedef enum logic [2:0] {
    OP_ADD = 3'd0, OP_SUB = 3'd1, OP_AND = 3'd2, OP_OR = 3'd3,
    OP_XOR = 3'd4, OP_MOV = 3'd5
  } aluop_e;

  typedef struct packed {
    form_e             form;
    aluop_e            op;
    logic [2:0]        r1;         // register operand (destination for ALU forms)
    logic [2:0]        r2;         // second register of F_ALU_RR
    logic              has_base;
    logic [2:0]        base;
    logic              has_index;
    logic [2:0]        index;
    logic [XLEN-1:0]   imm;        // immediate or displacement
    logic              br_ne;      // F_JCC: 1 = branch if r1 != 0, 0 = if r1 == 0
    logic              br_taken;   // F_JCC: predicted direction
  } x86_instr_t;

  typedef enum logic [2:0] {
    U_ALU = 3'd0, U_BU = 3'd1, U_AGU = 3'd2, U_LD = 3'd3, U_ST = 3'd4
  } unit_e;

  typedef struct packed {
    logic              valid;
    unit_e             unit;
    aluop_e            op;
    logic              has_dest;
    logic [LREG_W-1:0] dest;
    logic              use1;       // src1: ALU a, AG base, LD/ST address, BR test
    logic [LREG_W-1:0] src1;
    logic              use2;       // src2: ALU b, AG index, ST data
    logic [LREG_W-1:0] src2;
    logic              use_imm;    // ALU: b is imm; AG: imm is the displacement
    logic [XLEN-1:0]   imm;
    logic              br_ne;
    logic              br_taken;
    logic              last;       // last POP of its x86 instruction
  } pop_t;

  // one source operand as held in an RS or the LSU buffer
  typedef struct packed {
    logic             rdy;
    logic [TAG_W-1:0] tag;
    logic [XLEN-1:0]  val;
  } opnd_t;

  // POP as dispatched: its ROB tag and its resolved operands
  typedef struct packed {
    pop_t             pop;
    logic [TAG_W-1:0] tag;
    opnd_t            a;
    opnd_t            b;
  } rs_entry_t;

  typedef struct packed {
    logic             valid;
    logic [TAG_W-1:0] tag;
    logic [XLEN-1:0]  val;
  } result_bus_t;

  // number of POPs an instruction form translates to
  function automatic logic [2:0] pop_count(form_e f);
    case (f)
      F_ALU_RR, F_ALU_RI, F_LEA, F_JCC: return 3'd1;
      F_LOAD, F_STORE:                  return 3'd2;
      F_ALU_RM:                         return 3'd3;
      F_ALU_MR:                         return 3'd4;
      default:                          return 3'd0;  // complex
    endcase
  endfunction

  // update one operand from the result buses
  function automatic opnd_t snoop(opnd_t o, result_bus_t [N_BUS-1:0] bus);
    opnd_t r = o;
    for (int i = 0; i < N_BUS; i++)
      if (!r.rdy && bus[i].valid && bus[i].tag == r.tag) begin
        r.rdy = 1'b1;
        r.val = bus[i].val;
      end
    return r;
  endfunction

endpackage
