// tb_edf_q21: the evolutionary digital filter with 21 SFMs working in
// parallel, the number at which the filtering side keeps pace with the
// reproduction side of the original processor-based design. Everything else
// is at its default (Nap = Nac = Nsp = 32, T0 = 10, 1104 evaluations per
// generation). Same workload and checks as tb_edf_top, but the time per
// individual and sample must stay below 3.6 clocks, the reproduction
// side's rate in the original design.
//
// Workload: system identification. The desired signal d(k) is the output of
// an unknown IIR system of the filter's own class,
//   d(k) = 0.5 d(k-1) + 0.3 x(k) - 0.2 x(k-1),
// driven by uniform random x(k) in [-0.5, 0.5). Samples are fed a generation
// ahead, so both input banks are kept busy: the samples of generation g+2
// are sent as soon as generation g has been output and its bank released.
//
// Checks, for every generation:
//  - exactly T0 outputs y(k) come out;
//  - the squared error of those outputs against that generation's d(k),
//    computed here, equals minus the fitness reported for the chosen filter
//    (the output really is the fittest filter's output);
//  - the time per individual and sample stays below 3.6 clocks.
// At the end: the error of the last generations must be far below that of
// the initial generation (the filter adapts), and each mechanism must have
// occurred: the initial generation, cloning mode, mating mode, and an input
// overrun (provoked on purpose by one sample too many).
module tb_edf_q21;
  import edf_pkg::*;

  localparam int NAP = 32, NAC = 32, NSP = 32, T0 = 10;
  localparam int A = NAP * (NAC + 1) + 3 * NSP / 2;
  localparam int NGEN = 16;

  logic clk = 0, rst_n = 0, in_valid = 0;
  sample_t x_in, d_in, y_out;
  sample_t r_fluct = sample_t'(164), s_fluct = sample_t'(820);   // 0.01, 0.05
  logic y_valid, overrun, init_gen, mate_mode;
  logic [15:0] gen_count;
  fitness_t best_fit;
  int checks = 0, failures = 0;
  int n_init = 0, n_clone = 0, n_mate = 0, n_overrun = 0;

  edf_top #(.Q(21)) dut (.*);
  always #5 clk = ~clk;

  always_ff @(posedge clk) if (rst_n) begin
    if (init_gen) n_init <= n_init + 1;
    else if (mate_mode) n_mate <= n_mate + 1;
    else n_clone <= n_clone + 1;
    if (overrun) n_overrun <= n_overrun + 1;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (NGEN * 140000 + 300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // unknown system
  longint sys_y1 = 0, sys_x1 = 0;
  longint dq [$];     // d of the generations not yet output
  longint gen_err [NGEN];

  task automatic push_gen();
    for (int k = 0; k < T0; k++) begin
      longint x, d;
      x = longint'($urandom_range(16383)) - 8192;
      d = (8192 * sys_y1 + 4915 * x - 3277 * sys_x1 + 8192) >>> 14;
      sys_y1 = d; sys_x1 = x;
      @(negedge clk);
      in_valid = 1; x_in = sample_t'(x); d_in = sample_t'(d);
      dq.push_back(d);
      @(negedge clk);
      in_valid = 0;
    end
  endtask

  longint cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  initial begin
    longint t0c, t1c;
    repeat (3) @(negedge clk);
    rst_n = 1;
    push_gen();
    push_gen();
    for (int g = 0; g < NGEN; g++) begin
      longint err, e;
      int ny, nind;
      t0c = cyc;
      ny = 0; err = 0;
      while (ny < T0) begin
        @(posedge clk);
        if (y_valid) begin
          e = dq.pop_front() - longint'(y_out);
          if (e > 32767) e = 32767;
          if (e < -32768) e = -32768;
          err += (e * e) >>> 14;
          ny++;
        end
      end
      t1c = cyc;
      @(negedge clk);
      check(y_valid == 0, "T0 outputs per generation");
      check(-longint'(best_fit) == err, $sformatf("gen %0d: output error %0d, fitness %0d", g, err, best_fit));
      gen_err[g] = err;
      // the bank of generation g is free once it has been released
      while (int'(gen_count) != g + 1) @(negedge clk);
      if (g + 2 < NGEN) push_gen();
      if (g + 3 == NGEN) begin
        // both banks are full: one sample too many must be dropped
        @(negedge clk); in_valid = 1; x_in = '0; d_in = '0;
        @(negedge clk); in_valid = 0;
      end
      nind = (g == 0) ? NAP + NSP : A;
      if (g > 0)
        check(real'(t1c - t0c) / real'(nind * T0) < 3.6,
              $sformatf("gen %0d: %0.2f clocks per individual and sample", g, real'(t1c - t0c) / real'(nind * T0)));
      $display("generation %0d: squared error %0d, %0d cycles, %0.2f clocks per individual and sample",
               g, err, t1c - t0c, real'(t1c - t0c) / real'(nind * T0));
    end
    check(int'(gen_count) == NGEN, "generation count");
    begin
      longint late;
      late = (gen_err[NGEN-1] + gen_err[NGEN-2] + gen_err[NGEN-3] + gen_err[NGEN-4]) / 4;
      check(late * 10 < gen_err[0], $sformatf("adaptation: error %0d at start, %0d at end", gen_err[0], late));
    end
    $display("cycles in initial generation %0d, cloning mode %0d, mating mode %0d; overruns %0d",
             n_init, n_clone, n_mate, n_overrun);
    check(n_init > 0, "initial generation happened");
    check(n_clone > 0, "cloning mode happened");
    check(n_mate > 0, "mating mode happened");
    check(n_overrun == 1, "overrun happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
