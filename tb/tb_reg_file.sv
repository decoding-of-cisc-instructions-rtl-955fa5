// tb_reg_file: random multi-port writes (several to the same register in
// one cycle, where the highest port must win) and combinational reads,
// against a shadow array kept by the testbench.
module tb_reg_file;
  import cisc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N_POPS-1:0]                  we;
  logic [N_POPS-1:0][LREG_W-1:0]      waddr;
  logic [N_POPS-1:0][XLEN-1:0]        wdata;
  logic [2*N_POPS-1:0][LREG_W-1:0]    raddr;
  logic [2*N_POPS-1:0][XLEN-1:0]      rdata;
  logic [N_LREG-1:0][XLEN-1:0]        regs;
  logic [XLEN-1:0] shadow [N_LREG];
  int checks = 0, failures = 0;

  reg_file dut (.*);

  initial begin
    we = '0; waddr = '0; wdata = '0; raddr = '0;
    for (int r = 0; r < N_LREG; r++) shadow[r] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      for (int r = 0; r < 2 * N_POPS; r++) raddr[r] = LREG_W'($urandom_range(0, N_LREG - 1));
      #1;
      for (int r = 0; r < 2 * N_POPS; r++) begin
        checks++;
        if (rdata[r] != shadow[raddr[r]]) begin
          failures++;
          if (failures < 5) $display("FAIL read r%0d got %h exp %h", raddr[r], rdata[r], shadow[raddr[r]]);
        end
      end
      for (int w = 0; w < N_POPS; w++) begin
        we[w]    = 1'($urandom_range(0, 1));
        waddr[w] = LREG_W'($urandom_range(0, 3));   // few registers: many same-cycle collisions
        wdata[w] = $urandom();
      end
      @(posedge clk);
      for (int w = 0; w < N_POPS; w++) if (we[w]) shadow[waddr[w]] = wdata[w];
      #1;
      for (int r = 0; r < N_LREG; r++) begin
        checks++;
        if (regs[r] != shadow[r]) begin
          failures++;
          if (failures < 5) $display("FAIL state r%0d got %h exp %h", r, regs[r], shadow[r]);
        end
      end
      we = '0;
    end
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
