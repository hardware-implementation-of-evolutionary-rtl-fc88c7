// tb_ffc: checks the FFC module with three SFMs (default is one).
// The testbench plays the RS module: it fills the signal input buffer with
// two generations of random samples, sends individuals with random pauses,
// and collects the results with random back-pressure. Every result
// (advanced state, fitness, echoed W and tag) and every word written into
// the common memory is compared with the reference filter. It also checks
// that the SFMs work in parallel (total time), that results can come back
// in any order, that gen_ready/release_bank move through the two banks, and
// that a sample arriving while both banks are full raises overrun.
module tb_ffc;
  import edf_pkg::*;
  import edf_ref_pkg::*;

  localparam int Q = 3, T0 = 10, CM_AW = 14, NJOB = 40;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, gen_ready, release_bank = 0, overrun;
  sample_t x_in, d_in;
  logic job_valid = 0, job_ready, res_valid, res_ready = 0;
  job_t job;
  result_t res;
  logic cm_we;
  logic [CM_AW-1:0] cm_addr;
  sample_t cm_data;
  sample_t cm [1 << CM_AW];
  int checks = 0, failures = 0;
  int out_of_order = 0, overruns = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) if (cm_we) cm[cm_addr] <= cm_data;
  always_ff @(posedge clk) if (rst_n && overrun) overruns++;
  longint cyc = 0, t_start [2], t_end [2];
  always_ff @(posedge clk) cyc <= cyc + 1;

  ffc #(.Q(Q), .T0(T0), .CM_AW(CM_AW)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint xr[2][], dr[2][];
  indiv_t jobs [2][NJOB];

  task automatic send_gen(int g);
    xr[g] = new[T0]; dr[g] = new[T0];
    for (int k = 0; k < T0; k++) begin
      xr[g][k] = $signed($urandom_range(30000)) - 15000;
      dr[g][k] = $signed($urandom_range(30000)) - 15000;
      @(negedge clk);
      in_valid = 1; x_in = sample_t'(xr[g][k]); d_in = sample_t'(dr[g][k]);
      @(negedge clk);
      in_valid = 0;
    end
  endtask

  initial begin
    int got, last_id;
    bit seen [NJOB];
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(!gen_ready, "no generation after reset");
    send_gen(0);
    send_gen(1);
    @(negedge clk);
    check(gen_ready, "generation 0 ready");
    // both banks full: one more sample must be dropped
    in_valid = 1; x_in = '0; d_in = '0;
    @(negedge clk); in_valid = 0;
    @(negedge clk);
    check(overruns == 1, "overrun pulse");
    for (int g = 0; g < 2; g++) begin
      for (int i = 0; i < NJOB; i++) jobs[g][i] = rand_indiv(5000);
      for (int i = 0; i < NJOB; i++) seen[i] = 0;
      got = 0; last_id = -1;
      t_start[g] = cyc;
      fork
        begin
          for (int i = 0; i < NJOB; i++) begin
            repeat ($urandom_range(3)) @(negedge clk);
            job_valid = 1;
            job.ind = jobs[g][i];
            job.tag.id = ID_W'(i); job.tag.slot = SLOT_W'(i % 64); job.tag.role = ROLE_CLONE;
            @(posedge clk);
            while (!job_ready) @(posedge clk);
            @(negedge clk);
            job_valid = 0;
          end
        end
        begin
          while (got < NJOB) begin
            @(negedge clk);
            res_ready = ($urandom_range(3) != 0);
            @(posedge clk);
            if (res_valid && res_ready) begin
              indiv_t r;
              longint fr, yr[];
              int id;
              id = int'(res.tag.id);
              r = jobs[g][id];
              fr = filter_ref(r, xr[g], dr[g], T0, yr);
              check(!seen[id], "result returned once");
              seen[id] = 1;
              if (id < last_id) out_of_order++;
              last_id = id;
              check(longint'(res.fit) == fr, $sformatf("g%0d id%0d fitness", g, id));
              check(res.ind.s == r.s, $sformatf("g%0d id%0d state", g, id));
              check(res.ind.w == jobs[g][id].w, "W echoed");
              #1;
              for (int k = 0; k < T0; k++)
                check(longint'(cm[id * T0 + k]) == yr[k], $sformatf("g%0d id%0d cm y[%0d]", g, id, k));
              got++;
            end
          end
          t_end[g] = cyc;
          @(negedge clk); res_ready = 0;
        end
      join
      check(gen_ready, "bank still held until release");
      @(negedge clk); release_bank = 1; @(negedge clk); release_bank = 0;
      @(negedge clk);
      check(gen_ready == (g == 0), "release moves to the next bank");
    end
    // one SFM alone needs NJOB*T0*(NC+2) cycles; Q in parallel far less
    for (int g = 0; g < 2; g++)
      check(t_end[g] - t_start[g] < NJOB * T0 * (NC + 2) / 2,
            $sformatf("SFMs work in parallel (%0d cycles)", t_end[g] - t_start[g]));
    $display("cycles per generation %0d/%0d, out-of-order results %0d, overruns %0d",
             t_end[0] - t_start[0], t_end[1] - t_start[1], out_of_order, overruns);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
