// tb_fetcher: random groups of 0..5 instructions pushed, random consumption
// by a stand-in decoder, against a reference queue in the testbench. The
// window must show the oldest queued instructions in order and end right
// after the first predicted-taken branch. in_ready must hold exactly when a
// full group fits.
module tb_fetcher;
  import cisc_pkg::*;
  localparam int W = 5, D = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  x86_instr_t [W-1:0] in_instr, win;
  logic [2:0]   in_count, take;
  logic         in_ready, taken_cut;
  logic [W-1:0] win_valid;
  x86_instr_t   refq [$];
  int checks = 0, failures = 0, cuts = 0;

  fetcher #(.FETCH_W(W), .IQ_DEPTH(D)) dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    in_instr = '0; in_count = 0; take = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int nexp;
      bit stop, rdy;
      @(negedge clk);
      for (int i = 0; i < W; i++) begin
        in_instr[i] = x86_instr_t'({$urandom(), $urandom(), $urandom()});
        in_instr[i].form = ($urandom_range(0, 3) == 0) ? F_JCC : F_ALU_RR;
      end
      in_count = 3'($urandom_range(0, 5));
      #1;
      chk(in_ready == (refq.size() + W <= D), "in_ready");
      nexp = 0;
      stop = 0;
      for (int i = 0; i < W; i++)
        if (!stop && i < refq.size()) begin
          nexp++;
          chk(win[i] == refq[i], $sformatf("window slot %0d", i));
          if (refq[i].form == F_JCC && refq[i].br_taken) stop = 1;
        end
      for (int i = 0; i < W; i++) chk(win_valid[i] == (i < nexp), $sformatf("win_valid[%0d]", i));
      if (taken_cut) cuts++;
      take = 3'($urandom_range(0, nexp));
      rdy = in_ready;
      @(posedge clk);
      for (int i = 0; i < int'(take); i++) void'(refq.pop_front());
      if (rdy) for (int i = 0; i < int'(in_count); i++) refq.push_back(in_instr[i]);
    end
    chk(cuts > 0, "a taken branch cut the window");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
