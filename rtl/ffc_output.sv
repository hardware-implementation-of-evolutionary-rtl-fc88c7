// ffc_output: the FFC's signal output module and individual output module.
//
// When SFMs have finished an individual, one of them is chosen round-robin.
// The signal output part copies its T0 outputs y(0..T0-1) from its output
// buffer into the common memory at rows id*T0 + n, where id is the
// evaluation index carried in the tag. The individual output part then
// offers the result (the individual with its advanced state S, its fitness f
// and the tag) to the RS module over a valid/ready handshake; on acceptance
// the SFM is released (`sfm_ack`). The document names both modules; the
// round-robin order and the serial copy are this design's choice.
//
// Timing: T0 cycles of copying, then res_valid until res_ready, then one
// cycle to pick the next finished SFM: T0+2 cycles per individual when the
// RS accepts at once.
module ffc_output
  import edf_pkg::*;
#(
  parameter int unsigned Q     = 1,
  parameter int unsigned T0    = 10,
  parameter int unsigned AW    = (T0 > 1) ? $clog2(T0) : 1,
  parameter int unsigned CM_AW = 14
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [Q-1:0]     sfm_done,
  input  result_t          sfm_result [Q],
  output logic [Q-1:0]     sfm_ack,
  output logic [AW-1:0]    ybuf_rd_addr,
  input  sample_t          ybuf_rd_data [Q],
  output logic             cm_we,
  output logic [CM_AW-1:0] cm_addr,
  output sample_t          cm_data,
  output logic             res_valid,
  input  logic             res_ready,
  output result_t          res
);

  typedef enum logic [1:0] {O_PICK, O_COPY, O_RES} ostate_t;
  ostate_t state;

  localparam int unsigned QW = (Q > 1) ? $clog2(Q) : 1;
  logic [QW-1:0] sel, ptr, pick;
  logic          any;
  logic [AW-1:0] n;

  // Round-robin search starting at ptr.
  always_comb begin
    any  = 1'b0;
    pick = ptr;
    for (int i = Q - 1; i >= 0; i--) begin
      int unsigned idx;
      idx = (int'(ptr) + i) % Q;
      if (sfm_done[idx]) begin
        any  = 1'b1;
        pick = QW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= O_PICK;
      sel   <= '0;
      ptr   <= '0;
      n     <= '0;
    end else begin
      unique case (state)
        O_PICK: if (any) begin
          sel   <= pick;
          n     <= '0;
          state <= O_COPY;
        end
        O_COPY: begin
          if (n == AW'(T0 - 1)) state <= O_RES;
          else                  n     <= n + 1'b1;
        end
        O_RES: if (res_ready) begin
          ptr   <= (int'(sel) == Q - 1) ? '0 : sel + 1'b1;
          state <= O_PICK;
        end
        default: state <= O_PICK;
      endcase
    end
  end

  assign ybuf_rd_addr = n;
  assign cm_we        = (state == O_COPY);
  assign cm_addr      = CM_AW'(sfm_result[sel].tag.id * T0 + n);
  assign cm_data      = ybuf_rd_data[sel];
  assign res_valid    = (state == O_RES);
  assign res          = sfm_result[sel];

  always_comb begin
    sfm_ack = '0;
    if (state == O_RES && res_ready) sfm_ack[sel] = 1'b1;
  end

  // Handshake rule: an offered result stays unchanged until taken.
  a_res_stable: assert property (@(posedge clk) disable iff (!rst_n)
    res_valid && !res_ready |=> res_valid && $stable(res));

endmodule
