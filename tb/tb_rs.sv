// tb_rs: checks the reproduction and selection module on its own, with the
// testbench in the place of the FFC module and the common memory.
//
// The stand-in FFC accepts jobs with random back-pressure and returns the
// results in random order after random delays. Its fitness is a made-up
// function of W (minus the distance to a target vector, made unique with
// the evaluation index) and it returns the state S plus one, so that the
// testbench can follow every individual. From the results it returned the
// testbench works out, on its own, which individuals must survive and in
// which rank order, and checks in the next generation that:
//  - the initial generation sends P individuals with cleared state,
//  - cloning parents are sent rank by rank, each followed by Nac clones with
//    the parent's state and coefficients within the fluctuation bound,
//  - every mating parent is sent exactly once, in pairs, each pair followed
//    by an offspring with the first parent's state and coefficients near the
//    pair's midpoint,
//  - A = Nap(Nac+1) + 3Nsp/2 jobs are sent and issued at one per cycle when
//    the FFC is always ready,
//  - the T0 outputs are those of the fittest evaluation of the generation.
module tb_rs;
  import edf_pkg::*;
  import edf_ref_pkg::*;

  localparam int NAP = 4, NAC = 3, NSP = 4, T0 = 4, CM_AW = 14;
  localparam int P = NAP + NSP, A = NAP * (NAC + 1) + 3 * NSP / 2;
  localparam int NGEN = 8;
  localparam int R = 200, S = 300;   // fluctuations, Q14

  logic clk = 0, rst_n = 0;
  sample_t r_fluct = sample_t'(R), s_fluct = sample_t'(S);
  logic gen_ready = 0, release_bank, job_valid, job_ready = 0, res_valid = 0, res_ready;
  job_t job;
  result_t res;
  logic cm_rd_en, y_valid, init_gen, mate_mode;
  logic [CM_AW-1:0] cm_rd_addr;
  sample_t cm_rd_data, y_out;
  fitness_t best_fit;
  logic [15:0] gen_count;
  int checks = 0, failures = 0;
  int cur_gen = 0;
  bit always_ready = 0;

  rs #(.NAP(NAP), .NAC(NAC), .NSP(NSP), .T0(T0), .CM_AW(CM_AW)) dut (.*);
  always #5 clk = ~clk;

  function automatic sample_t cm_pat(int g, int addr);
    return sample_t'(g * 4099 + addr * 7 + 1);
  endfunction
  always_ff @(posedge clk) if (cm_rd_en) cm_rd_data <= cm_pat(cur_gen, int'(cm_rd_addr));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fitness_t fit_of(indiv_t ind, int id);
    longint dsum;
    dsum = 0;
    for (int i = 0; i < NC; i++) begin
      longint dv;
      dv = longint'(ind.w[i]) - 1000 * (i + 1);
      dsum += (dv < 0) ? -dv : dv;
    end
    return fitness_t'(-(dsum * 64) - id);
  endfunction

  job_t     sent [$];            // jobs of this generation in issue order
  result_t  pend [$];            // results not yet returned
  result_t  done_q [$];          // results returned this generation
  int       t_first, t_last;
  longint   cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  // stand-in FFC: accept jobs, return results in random order
  always @(negedge clk) if (rst_n) begin
    job_ready <= always_ready ? 1'b1 : ($urandom_range(3) != 0);
  end
  always @(posedge clk) if (rst_n) begin
    if (job_valid && job_ready) begin
      result_t r;
      if (sent.size() == 0) t_first = int'(cyc);
      t_last = int'(cyc);
      sent.push_back(job);
      r.ind = job.ind;
      for (int i = 0; i < NS; i++) r.ind.s[i] = job.ind.s[i] + 1'b1;
      r.fit = fit_of(job.ind, int'(job.tag.id));
      r.tag = job.tag;
      pend.push_back(r);
    end
  end
  initial begin
    forever begin
      @(negedge clk);
      res_valid = 0;
      if (pend.size() > 0 && $urandom_range(1) == 1) begin
        int k;
        k = $urandom_range(pend.size() - 1);
        res = pend[k];
        res_valid = 1;
        done_q.push_back(pend[k]);
        pend.delete(k);
      end
    end
  end

  indiv_t ranked [P];            // expected population in rank order

  // survivors and their rank order, from the results of a generation
  task automatic expected_population(bit init);
    indiv_t   surv [P];
    fitness_t sf [P];
    bit       sv [P];
    for (int i = 0; i < P; i++) sv[i] = 0;
    // the RS selects in arrival order; ties cannot occur here
    foreach (done_q[q]) begin
      int s;
      s = int'(done_q[q].tag.slot);
      if (done_q[q].tag.role == ROLE_MATE_CHILD || !sv[s] || done_q[q].fit > sf[s]) begin
        surv[s] = done_q[q].ind; sf[s] = done_q[q].fit; sv[s] = 1;
      end
    end
    for (int i = 0; i < P; i++) check(sv[i], $sformatf("slot %0d filled", i));
    for (int i = 0; i < P; i++) begin
      int rk;
      rk = 0;
      for (int j = 0; j < P; j++) if (sf[j] > sf[i]) rk++;
      ranked[rk] = surv[i];
    end
  endtask

  function automatic bit near(sample_t v, longint centre, longint bound);
    longint d;
    d = longint'(v) - centre;
    return d <= bound && d >= -bound;
  endfunction

  initial begin
    int ny, clone_jobs, mate_parents, mate_children;
    longint rb, sb;
    rb = (R * 8) + 2;  // |r*n| with |n| < 8
    sb = (S * 8) + 2;
    clone_jobs = 0; mate_parents = 0; mate_children = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < NGEN; g++) begin
      int best_id;
      fitness_t bf;
      cur_gen = g;
      always_ready = (g == NGEN - 1);
      sent.delete(); done_q.delete();
      check(init_gen == (g == 0), "initial generation flag");
      @(negedge clk);
      gen_ready = 1;
      ny = 0;
      best_id = -1;
      while (!release_bank) begin
        @(posedge clk);
        if (y_valid) begin
          if (best_id < 0) begin
            bf = done_q[0].fit; best_id = int'(done_q[0].tag.id);
            foreach (done_q[q]) if (done_q[q].fit > bf) begin bf = done_q[q].fit; best_id = int'(done_q[q].tag.id); end
          end
          check(y_out == cm_pat(g, best_id * T0 + ny), $sformatf("g%0d y[%0d]", g, ny));
          ny++;
        end
      end
      @(negedge clk);
      gen_ready = 0;
      check(ny == T0, $sformatf("g%0d T0 outputs (%0d)", g, ny));
      check(best_fit == bf, "best fitness reported");
      check(int'(gen_count) == g + 1, "generation count");
      // ---- the jobs of this generation
      if (g == 0) begin
        check(sent.size() == P, "initial generation size");
        foreach (sent[q]) begin
          check(sent[q].tag.role == ROLE_INIT && int'(sent[q].tag.slot) == q, "initial job tag");
          check(sent[q].ind.s == '0, "initial state cleared");
        end
      end else begin
        int q;
        bit used [P];
        check(sent.size() == A, $sformatf("g%0d A jobs (%0d)", g, sent.size()));
        for (int i = 0; i < P; i++) used[i] = 0;
        q = 0;
        for (int p = 0; p < NAP; p++) begin
          check(sent[q].tag.role == ROLE_CLONE && sent[q].ind == ranked[p], $sformatf("g%0d cloning parent %0d", g, p));
          q++;
          for (int c = 0; c < NAC; c++, q++) begin
            bit ok;
            ok = (sent[q].tag.role == ROLE_CLONE) && (int'(sent[q].tag.slot) == p) && (sent[q].ind.s == ranked[p].s);
            for (int i = 0; i < NC; i++) ok &= near(sent[q].ind.w[i], longint'(ranked[p].w[i]), rb);
            check(ok, $sformatf("g%0d clone %0d of parent %0d", g, c, p));
            clone_jobs++;
          end
        end
        for (int m = 0; m < NSP / 2; m++) begin
          int kk, ll;
          bit ok;
          kk = -1; ll = -1;
          for (int r = NAP; r < P; r++) begin
            if (sent[q].ind == ranked[r] && !used[r] && kk < 0) kk = r;
          end
          if (kk >= 0) used[kk] = 1;
          for (int r = NAP; r < P; r++) begin
            if (sent[q+1].ind == ranked[r] && !used[r] && ll < 0) ll = r;
          end
          if (ll >= 0) used[ll] = 1;
          check(kk >= 0 && ll >= 0, $sformatf("g%0d mating pair %0d from the mating parents", g, m));
          check(sent[q].tag.role == ROLE_MATE_PARENT && sent[q+1].tag.role == ROLE_MATE_PARENT, "mating parent roles");
          ok = sent[q+2].tag.role == ROLE_MATE_CHILD && sent[q+2].ind.s == sent[q].ind.s;
          for (int i = 0; i < NC; i++)
            ok &= near(sent[q+2].ind.w[i], (longint'(sent[q].ind.w[i]) + longint'(sent[q+1].ind.w[i])) >>> 1, sb);
          check(ok, $sformatf("g%0d mating offspring %0d", g, m));
          mate_parents += 2; mate_children++;
          q += 3;
        end
        for (int r = NAP; r < P; r++) check(used[r], "each mating parent used once");
        if (g == NGEN - 1)
          check(t_last - t_first == A - 1, $sformatf("one job per cycle (%0d cycles for %0d jobs)", t_last - t_first + 1, A));
      end
      expected_population(g == 0);
    end
    $display("clone jobs %0d, mating parents %0d, mating offspring %0d", clone_jobs, mate_parents, mate_children);
    check(clone_jobs > 0 && mate_children > 0, "both reproduction modes used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
