// tb_common_memory: fills the full 11,040-word common memory with a pattern
// that depends on the address, reads it back in random order and checks the
// one-cycle read latency and that simultaneous writes elsewhere do not
// disturb the read.
module tb_common_memory;
  import edf_pkg::*;

  localparam int DEPTH = 11040, AW = 14;
  logic clk = 0, wr_en = 0, rd_en = 0;
  logic [AW-1:0] wr_addr, rd_addr;
  sample_t wr_data, rd_data;
  int checks = 0, failures = 0;

  common_memory #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  function automatic sample_t pat(int a, int g);
    return sample_t'((a * 37 + g * 1001) ^ (a >> 3));
  endfunction

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
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); wr_en = 1; wr_addr = AW'(a); wr_data = pat(a, 0);
    end
    @(negedge clk); wr_en = 0;
    for (int i = 0; i < 5000; i++) begin
      int a;
      a = $urandom_range(DEPTH - 1);
      @(negedge clk);
      rd_en = 1; rd_addr = AW'(a);
      wr_en = 1; wr_addr = AW'((a + 1) % DEPTH); wr_data = pat((a + 1) % DEPTH, 0);
      @(negedge clk);
      rd_en = 0; wr_en = 0;
      check(rd_data == pat(a, 0), $sformatf("addr %0d", a));
      @(negedge clk);
      check(rd_data == pat(a, 0), "read data held while rd_en low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
