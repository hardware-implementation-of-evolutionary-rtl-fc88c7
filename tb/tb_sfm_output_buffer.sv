// tb_sfm_output_buffer: writes T0 random outputs and reads them back through
// the combinational read port while new writes go on.
module tb_sfm_output_buffer;
  import edf_pkg::*;

  localparam int T0 = 10, AW = 4;
  logic clk = 0, wr_en = 0;
  logic [AW-1:0] wr_addr, rd_addr;
  sample_t wr_data, rd_data;
  sample_t model [T0];
  int checks = 0, failures = 0;

  sfm_output_buffer #(.T0(T0)) dut (.*);
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

  initial begin
    for (int r = 0; r < 50; r++) begin
      for (int k = 0; k < T0; k++) begin
        @(negedge clk);
        wr_en = 1; wr_addr = AW'(k); wr_data = sample_t'($urandom);
        model[k] = wr_data;
      end
      @(negedge clk); wr_en = 0;
      for (int k = T0 - 1; k >= 0; k--) begin
        rd_addr = AW'(k);
        #1;
        check(rd_data == model[k], $sformatf("round %0d word %0d", r, k));
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
