// ffc_control: the FFC's control module with its individual input buffer.
//
// Individuals I = [W, S] (with their tag) arrive from the RS module over a
// valid/ready handshake and are held in a one-entry input buffer. As soon as
// one of the Q SFMs is idle, the buffered individual is handed to the idle
// SFM with the lowest index by a one-cycle `start` pulse, with the job on the
// shared `job_out` bus. The document names these parts; the one-entry buffer
// and the lowest-index choice are this design's own.
//
// Timing: in_ready is high while the buffer is empty; an accepted job can be
// dispatched in the next cycle, so a stream of jobs to free SFMs runs at one
// job every two cycles. sfm_busy must rise the cycle after `start`.
module ffc_control
  import edf_pkg::*;
#(
  parameter int unsigned Q = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  job_t         in_job,
  input  logic [Q-1:0] sfm_busy,
  output logic [Q-1:0] sfm_start,
  output job_t         job_out
);

  logic hold_valid;
  job_t hold;
  logic found;

  always_comb begin
    sfm_start = '0;
    found     = 1'b0;
    for (int q = 0; q < Q; q++) begin
      if (hold_valid && !found && !sfm_busy[q]) begin
        sfm_start[q] = 1'b1;
        found        = 1'b1;
      end
    end
  end

  assign in_ready = !hold_valid;
  assign job_out  = hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_valid <= 1'b0;
      hold       <= '0;
    end else begin
      if (in_valid && in_ready) begin
        hold_valid <= 1'b1;
        hold       <= in_job;
      end else if (found) begin
        hold_valid <= 1'b0;
      end
    end
  end

  // At most one SFM is started per cycle, and never a busy one.
  a_one_start: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(sfm_start) && ((sfm_start & sfm_busy) == '0));

endmodule
