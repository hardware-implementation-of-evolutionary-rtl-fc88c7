// tb_sfm: checks the single filtering module against the reference filter.
// Random individuals (coefficients and state) run over random generations of
// T0 samples; every output written to the output buffer, the advanced state,
// the fitness, the echoed W and tag and the run time of T0*(NC+2) cycles are
// compared. Large coefficients are included so that saturation occurs.
module tb_sfm;
  import edf_pkg::*;
  import edf_ref_pkg::*;

  localparam int T0 = 10;
  localparam int AW = $clog2(T0);

  logic clk = 0, rst_n = 0;
  logic start = 0, busy, ybuf_we, done, ack = 0;
  job_t job;
  logic [AW-1:0] smp_addr, ybuf_addr;
  sample_t x_in, d_in, ybuf_data;
  result_t result;
  sample_t xs [T0], ds [T0];
  sample_t ycap [T0];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  assign x_in = xs[smp_addr];
  assign d_in = ds[smp_addr];

  always_ff @(posedge clk) if (ybuf_we) ycap[ybuf_addr] <= ybuf_data;

  sfm #(.T0(T0)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint xr[], dr[], yr[];
    longint fr;
    indiv_t ind, ref_ind;
    int cyc, range;
    xr = new[T0]; dr = new[T0];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      range = (t % 3 == 0) ? 30000 : 6000;
      ind = rand_indiv(range);
      for (int k = 0; k < T0; k++) begin
        xs[k] = sample_t'($signed($urandom_range(32000)) - 16000);
        ds[k] = sample_t'($signed($urandom_range(32000)) - 16000);
        xr[k] = longint'(xs[k]); dr[k] = longint'(ds[k]);
      end
      ref_ind = ind;
      fr = filter_ref(ref_ind, xr, dr, T0, yr);
      @(negedge clk);
      job.ind = ind; job.tag.id = ID_W'(t); job.tag.slot = SLOT_W'(t); job.tag.role = ROLE_CLONE;
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      check(cyc - 1 == T0 * (NC + 2), $sformatf("cycles %0d", cyc - 1));
      for (int k = 0; k < T0; k++)
        check(longint'(ycap[k]) == yr[k], $sformatf("t%0d y[%0d] %0d exp %0d", t, k, ycap[k], yr[k]));
      check(result.ind.s == ref_ind.s, $sformatf("t%0d state", t));
      check(result.ind.w == ind.w, $sformatf("t%0d W echo", t));
      check(longint'(result.fit) == fr, $sformatf("t%0d fit %0d exp %0d", t, result.fit, fr));
      check(result.tag.id == ID_W'(t), "tag");
      repeat (2) @(negedge clk);
      check(done, "done held until ack");
      ack = 1; @(negedge clk); ack = 0;
      check(!busy, "idle after ack");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
