// tb_individual_memory: writes random individuals into the survivor bank,
// swaps the banks and reads them back through both read ports, and checks
// that writes never disturb the bank being read.
module tb_individual_memory;
  import edf_pkg::*;
  import edf_ref_pkg::*;

  localparam int P = 64;
  logic clk = 0, cur_sel = 0, wr_en = 0;
  logic [5:0] rd_a_addr, rd_b_addr, wr_addr;
  indiv_t rd_a_data, rd_b_data, wr_data;
  indiv_t model [2][P];
  int checks = 0, failures = 0;

  individual_memory #(.P(P)) dut (.*);
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
    for (int g = 0; g < 6; g++) begin
      for (int i = 0; i < P; i++) begin
        @(negedge clk);
        wr_en = 1; wr_addr = 6'(i); wr_data = rand_indiv(20000);
        model[~cur_sel][i] = wr_data;
      end
      @(negedge clk); wr_en = 0;
      cur_sel = ~cur_sel;
      for (int i = 0; i < P; i++) begin
        rd_a_addr = 6'(i); rd_b_addr = 6'(P - 1 - i);
        // write the other bank at the same time
        wr_en = 1; wr_addr = 6'(i); wr_data = rand_indiv(100);
        model[~cur_sel][i] = wr_data;
        #1;
        check(rd_a_data == model[cur_sel][i], $sformatf("g%0d port a %0d", g, i));
        check(rd_b_data == model[cur_sel][P - 1 - i], $sformatf("g%0d port b %0d", g, i));
        @(negedge clk);
        check(rd_a_data == model[cur_sel][i], "current bank unchanged by write");
      end
      wr_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
