// sfm: single filtering module. Runs one individual's inner filter over the
// T0 samples of a generation and computes its fitness.
//
// The inner filter is the IIR filter
//   y(k) = sum_{i=1..N} a_i*y(k-i) + sum_{j=0..M} b_j*x(k-j)
// in Q14 arithmetic, with N = 3 regressive and M = 2 moving-average taps.
// The error is e(k) = d(k) - y(k) and the fitness is minus the summed
// squared error over the generation (the 2-norm among the error measures
// the EDF allows), so a larger fitness is a better filter.
//
// The document builds the SFM as a small programmable processor whose
// instruction set and program are not given. This module is a fixed-function
// equivalent with the same single-multiplier character: one multiply-
// accumulate per cycle for the NC = N+M+1 products, one cycle to form y,
// write it to the output buffer and update the delay line, and one cycle
// reusing the multiplier for e^2. The products are summed at full precision
// and y is rounded (add 2^13, shift right 14) and saturated to 16 bits; the
// squared error is accumulated in Q14 with saturation at 2^31-1. These
// details are this design's choice.
//
// Timing: `start` (with `job`) in IDLE begins the run; the module takes
// NC+2 cycles per sample, T0*(NC+2) cycles in all, then raises `done` with
// `result` (W unchanged, S advanced by T0 samples, fitness, tag echoed) and
// holds it until `ack`. smp_addr selects the sample read from the signal
// input buffer (combinational read).
module sfm
  import edf_pkg::*;
#(
  parameter int unsigned T0 = 10,
  parameter int unsigned AW = (T0 > 1) ? $clog2(T0) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  job_t          job,
  output logic          busy,
  output logic [AW-1:0] smp_addr,
  input  sample_t       x_in,
  input  sample_t       d_in,
  output logic          ybuf_we,
  output logic [AW-1:0] ybuf_addr,
  output sample_t       ybuf_data,
  output logic          done,
  output result_t       result,
  input  logic          ack
);

  typedef enum logic [2:0] {S_IDLE, S_MAC, S_OUT, S_ERR, S_DONE} state_t;
  state_t state;

  indiv_t ind;
  tag_t   tag;
  logic [AW-1:0]               n;      // sample index in the generation
  logic [$clog2(NC+1)-1:0]     c;      // coefficient index
  logic signed [39:0]          acc;
  logic [31:0]                 err;    // summed squared error, Q14
  sample_t                     e;

  sample_t                     op_a, op_b;
  logic signed [31:0]          prod;
  sample_t                     y_new;
  logic [32:0]                 err_sum;

  // Shared multiplier operands.
  always_comb begin
    op_a = e;
    op_b = e;
    if (state == S_MAC) begin
      op_a = ind.w[c];
      if (int'(c) < N_AR)       op_b = ind.s[c];
      else if (int'(c) == N_AR) op_b = x_in;
      else                op_b = ind.s[c-1];
    end
    prod  = op_a * op_b;
    y_new = sat16((acc + 40'sd8192) >>> FRAC);
    err_sum = {1'b0, err} + {16'd0, prod[30:14]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      ind   <= '0;
      tag   <= '0;
      n     <= '0;
      c     <= '0;
      acc   <= '0;
      err   <= '0;
      e     <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          ind   <= job.ind;
          tag   <= job.tag;
          n     <= '0;
          c     <= '0;
          acc   <= '0;
          err   <= '0;
          state <= S_MAC;
        end
        S_MAC: begin
          acc <= acc + 40'(prod);
          if (c == ($clog2(NC+1))'(NC - 1)) state <= S_OUT;
          else                               c <= c + 1'b1;
        end
        S_OUT: begin
          e <= sat16(40'(d_in) - 40'(y_new));
          for (int i = N_AR - 1; i > 0; i--) ind.s[i] <= ind.s[i-1];
          ind.s[0] <= y_new;
          for (int i = N_AR + M_MA - 1; i > N_AR; i--) ind.s[i] <= ind.s[i-1];
          if (M_MA > 0) ind.s[N_AR] <= x_in;
          state <= S_ERR;
        end
        S_ERR: begin
          // prod = e*e >= 0 here; bits [30:14] are e^2 in Q14
          err <= err_sum[32] ? 32'h7fff_ffff : (err_sum[31] ? 32'h7fff_ffff : err_sum[31:0]);
          acc <= '0;
          c   <= '0;
          if (n == AW'(T0 - 1)) state <= S_DONE;
          else begin
            n     <= n + 1'b1;
            state <= S_MAC;
          end
        end
        S_DONE: if (ack) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy      = (state != S_IDLE);
  assign done      = (state == S_DONE);
  assign smp_addr  = n;
  assign ybuf_we   = (state == S_OUT);
  assign ybuf_addr = n;
  assign ybuf_data = y_new;

  always_comb begin
    result.ind = ind;
    result.fit = -$signed(err);
    result.tag = tag;
  end

endmodule
