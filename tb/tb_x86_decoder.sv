// tb_x86_decoder: random five-instruction windows against an independent
// model of rule 5I:1G:3S2:1S1:8P. The model has its own table of POP counts
// and units per form. It decides how many instructions are decoded (I0 any
// non-complex, I1..I3 at most 2 POPs each, I4 exactly 1, all of them within
// eight slots, in order) and where each POP lands: I0 in slots 0..3, the rest
// packed from slot 4. The take count is checked in the same cycle, and the
// registered bundle one cycle later (one-cycle decode latency). The test
// also holds the bundle (bundle_ready low) and checks that nothing is
// consumed or changed, and it exercises the micro-ROM hand-off.
module tb_x86_decoder;
  import cisc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  x86_instr_t [M_INSTR-1:0] win;
  logic [M_INSTR-1:0]       win_valid;
  logic [2:0]               take, n_decoded;
  pop_t [N_POPS-1:0]        bundle;
  logic bundle_valid, bundle_ready, urom_req, urom_ack;
  x86_instr_t urom_instr;
  int checks = 0, failures = 0;
  int cnt_full5 = 0, cnt_g = 0;

  x86_decoder dut (.*);

  // reference tables
  function automatic int ref_n(form_e f);
    case (f)
      F_ALU_RR, F_ALU_RI, F_LEA, F_JCC: return 1;
      F_LOAD, F_STORE: return 2;
      F_ALU_RM: return 3;
      F_ALU_MR: return 4;
      default: return 0;
    endcase
  endfunction
  function automatic unit_e ref_unit(form_e f, int k);
    unit_e seq_ld [2] = '{U_AGU, U_LD};
    unit_e seq_st [2] = '{U_AGU, U_ST};
    unit_e seq_rm [3] = '{U_AGU, U_LD, U_ALU};
    unit_e seq_mr [4] = '{U_AGU, U_LD, U_ALU, U_ST};
    case (f)
      F_ALU_RR, F_ALU_RI: return U_ALU;
      F_LEA: return U_AGU;
      F_JCC: return U_BU;
      F_LOAD: return seq_ld[k];
      F_STORE: return seq_st[k];
      F_ALU_RM: return seq_rm[k];
      default: return seq_mr[k];
    endcase
  endfunction

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  form_e forms [9] = '{F_ALU_RR, F_ALU_RI, F_LEA, F_JCC, F_LOAD, F_STORE, F_ALU_RM, F_ALU_MR, F_CPLX};

  initial begin
    win = '0; win_valid = '0; bundle_ready = 1; urom_ack = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int nv, ntake, pos;
      int exp_slot_i [N_POPS];
      int exp_slot_k [N_POPS];
      bit hold;
      @(negedge clk);
      nv = $urandom_range(0, 5);
      for (int i = 0; i < M_INSTR; i++) begin
        win[i] = x86_instr_t'({$urandom(), $urandom(), $urandom()});
        // mostly simple forms, so that long groups happen
        win[i].form = forms[($urandom_range(0, 99) < 70) ? $urandom_range(0, 3) : $urandom_range(0, 8)];
        win_valid[i] = (i < nv);
      end
      hold = ($urandom_range(0, 9) == 0) && bundle_valid;
      bundle_ready = !hold;
      urom_ack = 1'($urandom_range(0, 1));
      // reference decode
      for (int s = 0; s < N_POPS; s++) exp_slot_i[s] = -1;
      ntake = 0;
      pos = 4;
      for (int i = 0; i < M_INSTR; i++) begin
        int ni;
        bit ok;
        ni = ref_n(win[i].form);
        if (i >= nv || ntake != i || ni == 0) ok = 0;
        else if (i == 0) ok = 1;
        else if (i < 4) ok = (ni <= 2) && (pos + ni <= 8);
        else ok = (ni == 1) && (pos + ni <= 8);
        if (ok) begin
          for (int k = 0; k < ni; k++) begin
            int s;
            s = (i == 0) ? k : pos + k;
            exp_slot_i[s] = i;
            exp_slot_k[s] = k;
          end
          if (i > 0) pos += ni;
          ntake++;
        end
      end
      #1;
      if (hold) chk(take == 0, "take must be 0 while the bundle is held");
      else if (nv > 0 && win[0].form == F_CPLX) begin
        chk(urom_req, "complex I0 must request the micro-ROM");
        chk(take == (urom_ack ? 1 : 0), "complex I0 consumed only on ack");
      end else begin
        chk(!urom_req, "no micro-ROM request");
        chk(int'(take) == ntake, $sformatf("take=%0d expected %0d", take, ntake));
        if (ntake == 5) cnt_full5++;
        if (ntake > 0 && ref_n(win[0].form) > 2) cnt_g++;
      end
      begin
        pop_t [N_POPS-1:0] prev_b;
        bit bv;
        prev_b = bundle;
        bv = bundle_valid;
        @(posedge clk);
        #1;
        if (hold) begin
          chk(bundle == prev_b && bundle_valid == bv, "held bundle must not change");
        end else if (!(nv > 0 && win[0].form == F_CPLX)) begin
          chk(bundle_valid == (ntake > 0), "bundle_valid");
          for (int s = 0; s < N_POPS; s++) begin
            if (exp_slot_i[s] < 0) chk(!bundle[s].valid, $sformatf("slot %0d should be empty", s));
            else begin
              chk(bundle[s].valid && bundle[s].unit == ref_unit(win[exp_slot_i[s]].form, exp_slot_k[s]),
                  $sformatf("slot %0d: valid=%0d unit=%0d, expected POP %0d of I%0d", s, bundle[s].valid,
                            bundle[s].unit, exp_slot_k[s] + 1, exp_slot_i[s]));
              chk(bundle[s].last == (exp_slot_k[s] == ref_n(win[exp_slot_i[s]].form) - 1),
                  $sformatf("slot %0d last flag", s));
            end
          end
        end else begin
          chk(!bundle_valid, "complex instruction yields no POPs");
        end
      end
    end
    $display("groups of 5 decoded: %0d, with a general I0: %0d", cnt_full5, cnt_g);
    chk(cnt_full5 > 0 && cnt_g > 0, "coverage of 5-wide groups and general instructions");
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
