// sfm_output_buffer: the T0 filter outputs of one SFM's current individual.
//
// The SFM writes y(n) for sample n of the generation as it computes it; the
// FFC's signal output module later copies the T0 words to the common memory.
// Separating the two lets the copy use its own port. The buffer is a small
// register array: one synchronous write port and one combinational read port
// (rd_data shows the word at rd_addr in the same cycle). Contents are not
// reset; every word is written before it is read.
module sfm_output_buffer #(
  parameter int unsigned T0 = 10,
  parameter int unsigned AW = (T0 > 1) ? $clog2(T0) : 1
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  edf_pkg::sample_t wr_data,
  input  logic [AW-1:0]    rd_addr,
  output edf_pkg::sample_t rd_data
);

  edf_pkg::sample_t buf_q [T0];

  always_ff @(posedge clk)
    if (wr_en) buf_q[wr_addr] <= wr_data;

  assign rd_data = buf_q[rd_addr];

endmodule
