// ffc: filtering and fitness calculation module.
//
// Runs the inner filters of the individuals the RS module sends and returns
// their fitness. It holds a signal input buffer with the T0 samples x(k), d(k)
// of the current generation, Q single filtering modules (SFMs) that work in
// parallel on different individuals, an output buffer per SFM, a control
// module with an individual input buffer that hands individuals to free
// SFMs, and a signal/individual output unit that copies each finished SFM's
// outputs to the common memory and returns [S, f] to the RS module. The
// structure follows the document's FFC block diagram. The chip described
// there has one SFM (Q = 1, the default); the document estimates that 21
// SFMs would balance the FFC against the RS module.
//
// Interface:
//   in_valid/x_in/d_in      samples, one per in_valid cycle
//   gen_ready               a full generation of samples is buffered
//   release_bank            pulse: that generation is finished
//   overrun                 pulse: a sample was dropped (both banks full)
//   job_valid/ready/job     individuals to evaluate (from RS)
//   res_valid/ready/res     evaluated individuals (to RS); W is echoed back
//   cm_we/cm_addr/cm_data   writes of y into the common memory
// Results may return in a different order from the jobs when Q > 1.
module ffc
  import edf_pkg::*;
#(
  parameter int unsigned Q     = 1,
  parameter int unsigned T0    = 10,
  parameter int unsigned CM_AW = 14
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  sample_t          x_in,
  input  sample_t          d_in,
  output logic             gen_ready,
  input  logic             release_bank,
  output logic             overrun,
  input  logic             job_valid,
  output logic             job_ready,
  input  job_t             job,
  output logic             res_valid,
  input  logic             res_ready,
  output result_t          res,
  output logic             cm_we,
  output logic [CM_AW-1:0] cm_addr,
  output sample_t          cm_data
);

  localparam int unsigned AW = (T0 > 1) ? $clog2(T0) : 1;

  logic [AW-1:0] smp_addr [Q];
  sample_t       x_rd [Q], d_rd [Q];
  logic [Q-1:0]  busy, start, done, ack;
  job_t          job_bus;
  result_t       sfm_res [Q];
  logic [Q-1:0]  yb_we;
  logic [AW-1:0] yb_waddr [Q];
  sample_t       yb_wdata [Q];
  logic [AW-1:0] yb_raddr;
  sample_t       yb_rdata [Q];

  signal_input_buffer #(.T0(T0), .Q(Q)) u_sib (
    .clk, .rst_n, .in_valid, .x_in, .d_in, .gen_ready, .release_bank, .overrun,
    .rd_addr(smp_addr), .x_rd, .d_rd
  );

  ffc_control #(.Q(Q)) u_ctrl (
    .clk, .rst_n, .in_valid(job_valid), .in_ready(job_ready), .in_job(job),
    .sfm_busy(busy), .sfm_start(start), .job_out(job_bus)
  );

  for (genvar q = 0; q < Q; q++) begin : g_sfm
    sfm #(.T0(T0)) u_sfm (
      .clk, .rst_n, .start(start[q]), .job(job_bus), .busy(busy[q]),
      .smp_addr(smp_addr[q]), .x_in(x_rd[q]), .d_in(d_rd[q]),
      .ybuf_we(yb_we[q]), .ybuf_addr(yb_waddr[q]), .ybuf_data(yb_wdata[q]),
      .done(done[q]), .result(sfm_res[q]), .ack(ack[q])
    );
    sfm_output_buffer #(.T0(T0)) u_obuf (
      .clk, .wr_en(yb_we[q]), .wr_addr(yb_waddr[q]), .wr_data(yb_wdata[q]),
      .rd_addr(yb_raddr), .rd_data(yb_rdata[q])
    );
  end

  ffc_output #(.Q(Q), .T0(T0), .CM_AW(CM_AW)) u_out (
    .clk, .rst_n, .sfm_done(done), .sfm_result(sfm_res), .sfm_ack(ack),
    .ybuf_rd_addr(yb_raddr), .ybuf_rd_data(yb_rdata),
    .cm_we, .cm_addr, .cm_data, .res_valid, .res_ready, .res
  );

endmodule
