// reg_file: architectural register file, eight x86 general registers plus
// the three temporaries that the POPs of one instruction pass values through.
//
// The reorder buffer writes it at retirement, up to N_W results per cycle.
// Two writes to the same register in one cycle come from POPs in program
// order, so the higher-numbered port (the younger POP) wins. N_R read ports
// are combinational and show the value before this cycle's writes. The
// dispatcher uses them for operands that no POP in flight will write. The
// register file itself is only named in the document (Fig. 8). Its size and
// port counts follow from this design's POP format.
module reg_file
  import cisc_pkg::*;
#(
  parameter int N_W = N_POPS,
  parameter int N_R = 2 * N_POPS
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [N_W-1:0]                    we,
  input  logic [N_W-1:0][LREG_W-1:0]        waddr,
  input  logic [N_W-1:0][XLEN-1:0]          wdata,
  input  logic [N_R-1:0][LREG_W-1:0]        raddr,
  output logic [N_R-1:0][XLEN-1:0]          rdata,
  output logic [N_LREG-1:0][XLEN-1:0]       regs       // whole state, for observation
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) regs <= '0;
    else
      for (int w = 0; w < N_W; w++)
        if (we[w] && int'(waddr[w]) < N_LREG) regs[waddr[w]] <= wdata[w];
  end

  always_comb
    for (int r = 0; r < N_R; r++)
      rdata[r] = (int'(raddr[r]) < N_LREG) ? regs[raddr[r]] : '0;

endmodule
