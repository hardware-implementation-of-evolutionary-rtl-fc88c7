// tb_signal_input_buffer: streams random samples into the two-bank input
// buffer with two read ports. Checks that a generation becomes ready after
// T0 samples, that both ports read the right x and d, that a second
// generation fills the other bank while the first is read, that a sample
// arriving with both banks full is dropped with an overrun pulse, and that
// release moves reading to the next bank in order.
module tb_signal_input_buffer;
  import edf_pkg::*;

  localparam int T0 = 10, Q = 2, AW = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, gen_ready, release_bank = 0, overrun;
  sample_t x_in, d_in;
  logic [AW-1:0] rd_addr [Q];
  sample_t x_rd [Q], d_rd [Q];
  sample_t xm [$], dm [$];
  int checks = 0, failures = 0, overruns = 0;

  signal_input_buffer #(.T0(T0), .Q(Q)) dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) if (rst_n && overrun) overruns++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push(bit keep);
    @(negedge clk);
    in_valid = 1; x_in = sample_t'($urandom); d_in = sample_t'($urandom);
    if (keep) begin xm.push_back(x_in); dm.push_back(d_in); end
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic read_gen(int g);
    for (int k = 0; k < T0; k++) begin
      rd_addr[0] = AW'(k); rd_addr[1] = AW'(T0 - 1 - k);
      #1;
      check(x_rd[0] == xm[k] && d_rd[0] == dm[k], $sformatf("gen %0d port 0 sample %0d", g, k));
      check(x_rd[1] == xm[T0 - 1 - k] && d_rd[1] == dm[T0 - 1 - k], $sformatf("gen %0d port 1 sample %0d", g, k));
    end
    for (int k = 0; k < T0; k++) begin void'(xm.pop_front()); void'(dm.pop_front()); end
    @(negedge clk); release_bank = 1; @(negedge clk); release_bank = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < 8; g++) begin
      for (int k = 0; k < T0 - 1; k++) push(1);
      check(!gen_ready || g > 0, "not ready before T0 samples");
      push(1);
      check(gen_ready, "ready after T0 samples");
      if (g % 2 == 1) begin
        // both banks full now: the next sample is dropped
        push(0);
        @(negedge clk);
        check(overruns == (g + 1) / 2, $sformatf("overrun counted %0d", overruns));
        read_gen(g - 1);
        check(gen_ready, "next bank ready after release");
        read_gen(g);
        check(!gen_ready, "both banks empty");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
