// common_memory: outputs of every inner filter evaluated in a generation.
//
// The EDF's output is the output of the inner filter with the highest
// fitness, known only after the whole generation has been evaluated, so the
// outputs y of all A evaluated individuals over the T0 samples of the
// generation are kept here. Row address = evaluation index * T0 + sample
// index. The default depth, A*T0 = 1104*10 = 11,040 words of 16 bits, is the
// minimum size given in the design's specification.
//
// One write port (from the FFC's signal output module) and one read port
// (from the RS control, which reads the best filter's outputs). The read is
// synchronous: rd_data holds the word at rd_addr one clock after rd_en.
// Memory contents are not reset.
module common_memory #(
  parameter int unsigned DEPTH = 11040,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                 clk,
  input  logic                 wr_en,
  input  logic [AW-1:0]        wr_addr,
  input  edf_pkg::sample_t     wr_data,
  input  logic                 rd_en,
  input  logic [AW-1:0]        rd_addr,
  output edf_pkg::sample_t     rd_data
);

  edf_pkg::sample_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
