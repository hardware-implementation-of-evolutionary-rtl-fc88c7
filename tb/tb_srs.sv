// tb_srs: checks the reproduction datapath for all four modes with random
// parents, noise vectors and fluctuations, against equations (2) and (3)
// evaluated here with integer arithmetic (Q14 fluctuation times Q11 noise,
// shifted by 11, saturating sums).
module tb_srs;
  import edf_pkg::*;
  import edf_ref_pkg::*;

  rep_mode_t mode;
  indiv_t parent_a, parent_b, child;
  logic signed [15:0] noise [NC];
  sample_t r_fluct, s_fluct;
  int checks = 0, failures = 0;

  srs dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int range;
      range = (t % 4 == 0) ? 32000 : 8000;
      parent_a = rand_indiv(range);
      parent_b = rand_indiv(range);
      for (int i = 0; i < NC; i++) noise[i] = 16'($signed($urandom_range(16000)) - 8000);
      r_fluct = sample_t'($urandom_range(3000));
      s_fluct = sample_t'($urandom_range(3000));
      mode = rep_mode_t'(t % 4);
      #1;
      for (int i = 0; i < NC; i++) begin
        longint a, b, e, rn, sn;
        a = longint'(parent_a.w[i]); b = longint'(parent_b.w[i]);
        rn = (longint'(r_fluct) * longint'(noise[i])) >>> 11;
        sn = (longint'(s_fluct) * longint'(noise[i])) >>> 11;
        case (mode)
          REP_PASS:  e = a;
          REP_CLONE: e = sat(a + rn);
          REP_MATE:  e = sat(((a + b) >>> 1) + sn);
          default:   e = sat(sn);
        endcase
        check(longint'(child.w[i]) == e, $sformatf("t%0d mode %0d w[%0d] %0d exp %0d", t, mode, i, child.w[i], e));
      end
      if (mode == REP_INIT) check(child.s == '0, "initial state cleared");
      else                  check(child.s == parent_a.s, "state from parent a");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
