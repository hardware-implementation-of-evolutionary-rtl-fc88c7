// signal_input_buffer: input x(k) and desired signal d(k) of one generation.
//
// The adaptive algorithm works in generations of T0 samples: every inner
// filter of a generation is run over the same T0 samples. This buffer
// collects them. It has two banks (ping-pong, this design's choice): while
// the FFC works on one complete generation, the next one is written into the
// other bank. A sample that arrives while both banks are full is dropped and
// `overrun` pulses for one cycle: the sampling rate is then higher than the
// filter can sustain.
//
// Interface:
//   in_valid/x_in/d_in  one sample pair per cycle in which in_valid is high
//   gen_ready           the oldest full bank holds a complete generation
//   release             one-cycle pulse: the FFC/RS are done with that bank
//   rd_addr[q]/x_rd[q]/d_rd[q]  Q combinational read ports into the full
//                       bank, one per SFM (sample index 0..T0-1)
module signal_input_buffer #(
  parameter int unsigned T0 = 10,
  parameter int unsigned Q  = 1,
  parameter int unsigned AW = (T0 > 1) ? $clog2(T0) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  edf_pkg::sample_t x_in,
  input  edf_pkg::sample_t d_in,
  output logic             gen_ready,
  input  logic             release_bank,
  output logic             overrun,
  input  logic [AW-1:0]    rd_addr [Q],
  output edf_pkg::sample_t x_rd    [Q],
  output edf_pkg::sample_t d_rd    [Q]
);

  edf_pkg::sample_t xb [2][T0];
  edf_pkg::sample_t db [2][T0];
  logic [1:0]    full;
  logic          wr_bank, rd_bank;
  logic [AW-1:0] wr_cnt;

  always_ff @(posedge clk) begin
    if (in_valid && !full[wr_bank]) begin
      xb[wr_bank][wr_cnt] <= x_in;
      db[wr_bank][wr_cnt] <= d_in;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full    <= '0;
      wr_bank <= 1'b0;
      rd_bank <= 1'b0;
      wr_cnt  <= '0;
      overrun <= 1'b0;
    end else begin
      overrun <= in_valid && full[wr_bank];
      if (in_valid && !full[wr_bank]) begin
        if (wr_cnt == AW'(T0 - 1)) begin
          wr_cnt        <= '0;
          full[wr_bank] <= 1'b1;
          wr_bank       <= ~wr_bank;
        end else begin
          wr_cnt <= wr_cnt + 1'b1;
        end
      end
      if (release_bank && full[rd_bank]) begin
        full[rd_bank] <= 1'b0;
        rd_bank       <= ~rd_bank;
      end
    end
  end

  assign gen_ready = full[rd_bank];

  for (genvar q = 0; q < Q; q++) begin : g_rd
    assign x_rd[q] = xb[rd_bank][rd_addr[q]];
    assign d_rd[q] = db[rd_bank][rd_addr[q]];
  end

endmodule
