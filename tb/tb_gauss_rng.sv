// tb_gauss_rng: checks the Gaussian noise generator. A behavioural copy of
// the xorshift32 recurrence predicts every output (sum of the four bytes,
// minus 510, times 887/64); the output must hold while step is low; and over
// 20000 samples the mean must be near 0 and the variance near 1.0 (Q11).
module tb_gauss_rng;
  logic clk = 0, rst_n = 0, step = 0;
  logic signed [15:0] n;
  int checks = 0, failures = 0;

  localparam logic [31:0] SEED = 32'hdead_beef;
  gauss_rng #(.SEED(SEED)) dut (.*);

  always #5 clk = ~clk;

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

  function automatic int expect_n(logic [31:0] s);
    int c;
    c = int'(s[7:0]) + int'(s[15:8]) + int'(s[23:16]) + int'(s[31:24]) - 510;
    return (c * 887) >>> 6;
  endfunction

  initial begin
    logic [31:0] st;
    real sum, sq, mean, var_;
    int nsmp;
    st = SEED; sum = 0; sq = 0; nsmp = 20000;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(int'(n) == expect_n(st), "value after reset");
    repeat (3) @(negedge clk);
    check(int'(n) == expect_n(st), "holds while step low");
    for (int i = 0; i < nsmp; i++) begin
      step = 1;
      @(negedge clk);
      st = st ^ (st << 13); st = st ^ (st >> 17); st = st ^ (st << 5);
      check(int'(n) == expect_n(st), $sformatf("sample %0d", i));
      sum += real'(n) / 2048.0;
      sq  += (real'(n) / 2048.0) ** 2;
    end
    step = 0;
    mean = sum / nsmp;
    var_ = sq / nsmp - mean * mean;
    $display("mean %f variance %f", mean, var_);
    check(mean > -0.05 && mean < 0.05, "mean near 0");
    check(var_ > 0.9 && var_ < 1.1, "variance near 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
