// edf_top: hardware evolutionary digital filter (EDF).
//
// An adaptive filter whose coefficients are found by evolution instead of by
// a gradient rule. A population of IIR inner filters all process the same
// input x(k); each is scored by how closely its output follows the desired
// signal d(k) over a generation of T0 samples. Good filters are cloned with
// small Gaussian perturbations (local search), weaker ones are paired and
// their midpoint perturbed (global search), and the best of each family
// survives. The EDF's output y(k) is the output of the fittest inner filter
// of the generation.
//
// Three parts, as in the document's block diagram: the FFC module (filtering
// and fitness calculation, with Q parallel single filtering modules), the
// RS module (reproduction and selection) and the common memory that holds
// the outputs of all A*T0 inner-filter samples of a generation until the
// fittest filter is known. Defaults are the document's configuration:
// Nap = Nac = Nsp = 32, T0 = 10, one SFM (as on the fabricated chip), giving
// A = 1104 evaluations per generation and an 11,040-word common memory.
//
// Interface:
//   in_valid, x_in, d_in   one sample per in_valid cycle (Q14)
//   r_fluct, s_fluct       cloning and mating fluctuations r and s (Q14)
//   y_valid, y_out         the T0 outputs of a generation, in a burst, after
//                          that generation has been evaluated
//   overrun                pulse: a sample was dropped (input faster than
//                          one generation per T0 sample periods)
//   init_gen, mate_mode, gen_count, best_fit   status: initial generation
//                          flag, reproduction mode (0 cloning, 1 mating), number
//                          of finished generations, fitness (minus the Q14
//                          summed squared error) of the last output filter
// Latency: a generation's outputs appear after its T0-th sample has arrived
// and all A individuals have been evaluated, about A*(T0*(NC+2)+T0+3)/Q
// cycles later.
module edf_top
  import edf_pkg::*;
#(
  parameter int unsigned Q   = 1,
  parameter int unsigned NAP = 32,
  parameter int unsigned NAC = 32,
  parameter int unsigned NSP = 32,
  parameter int unsigned T0  = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  sample_t     x_in,
  input  sample_t     d_in,
  input  sample_t     r_fluct,
  input  sample_t     s_fluct,
  output logic        y_valid,
  output sample_t     y_out,
  output logic        overrun,
  output logic        init_gen,
  output logic        mate_mode,
  output logic [15:0] gen_count,
  output fitness_t    best_fit
);

  localparam int unsigned A     = NAP * (NAC + 1) + 3 * NSP / 2;
  localparam int unsigned DEPTH = A * T0;
  localparam int unsigned CM_AW = $clog2(DEPTH);

  logic             gen_ready, release_bank;
  logic             job_valid, job_ready, res_valid, res_ready;
  job_t             job;
  result_t          res;
  logic             cm_we, cm_rd_en;
  logic [CM_AW-1:0] cm_waddr, cm_raddr;
  sample_t          cm_wdata, cm_rdata;

  ffc #(.Q(Q), .T0(T0), .CM_AW(CM_AW)) u_ffc (
    .clk, .rst_n, .in_valid, .x_in, .d_in, .gen_ready, .release_bank, .overrun,
    .job_valid, .job_ready, .job, .res_valid, .res_ready, .res,
    .cm_we, .cm_addr(cm_waddr), .cm_data(cm_wdata)
  );

  rs #(.NAP(NAP), .NAC(NAC), .NSP(NSP), .T0(T0), .CM_AW(CM_AW)) u_rs (
    .clk, .rst_n, .r_fluct, .s_fluct, .gen_ready, .release_bank,
    .job_valid, .job_ready, .job, .res_valid, .res_ready, .res,
    .cm_rd_en, .cm_rd_addr(cm_raddr), .cm_rd_data(cm_rdata),
    .y_valid, .y_out, .init_gen, .mate_mode, .best_fit, .gen_count
  );

  common_memory #(.DEPTH(DEPTH), .AW(CM_AW)) u_cm (
    .clk, .wr_en(cm_we), .wr_addr(cm_waddr), .wr_data(cm_wdata),
    .rd_en(cm_rd_en), .rd_addr(cm_raddr), .rd_data(cm_rdata)
  );

endmodule
