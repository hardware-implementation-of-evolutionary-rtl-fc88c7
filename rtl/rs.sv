// rs: reproduction and selection module.
//
// Runs the adaptive algorithm of the evolutionary digital filter, one
// generation of T0 samples at a time, against the FFC module that evaluates
// individuals. The population of P = Nap + Nsp individuals is kept in the
// individual memory in fitness order (through the rank table `order`): the
// Nap fittest are cloning parents, the Nsp others mating parents.
//
// One generation:
//  1. Initial generation (initial generation flag set): P random individuals
//     are evaluated and kept as the first population.
//     Otherwise the mating parents are first shuffled (Fisher-Yates with a
//     xorshift generator) so that the Nsp/2 pairs k(m), l(m) are random and
//     disjoint. Then the reproduction counter walks the parents. While the
//     counter is at most Nap-1 (the comparator of the block diagram) the
//     mode is cloning: parent i is sent to the FFC followed by its Nac clones
//     W + r*n. Above Nap-1 the mode is mating: parents k and l of pair m are
//     sent, then their offspring (W_k + W_l)/2 + s*n. That is
//     A = Nap*(Nac+1) + 3*Nsp/2 evaluations (1104 by default).
//  2. Each returned [W, S, f] is selected as it arrives: the fittest member
//     of each cloning family, the fitter parent of each mating family and
//     every mating offspring are written to the survivor bank of the
//     individual memory. The fittest of all evaluations is remembered.
//  3. When all results are in, the survivors are ranked by fitness (one per
//     cycle, P comparators, ties by slot), the banks are swapped, and the
//     T0 outputs of the fittest evaluation are read from the common memory
//     and sent out as y(k). The input bank is then released.
// The document gives the algorithm, the block names (SRS control module,
// reproduction counter, initial generation flag, SRS, individual memory) and
// the three steps; the ranking, the shuffle and the tag carried with each
// individual are this design's own way of realising them.
//
// Interface: valid/ready towards the FFC for jobs, results always accepted
// (res_ready = 1). y_out is the common memory's read data itself, valid in
// the cycles y_valid marks. r_fluct and s_fluct are the cloning and mating
// fluctuations in Q14. y_valid/y_out carry T0 consecutive outputs per
// generation. Common-memory reads are synchronous (one cycle).
module rs
  import edf_pkg::*;
#(
  parameter int unsigned NAP   = 32,
  parameter int unsigned NAC   = 32,
  parameter int unsigned NSP   = 32,
  parameter int unsigned T0    = 10,
  parameter int unsigned CM_AW = 14
) (
  input  logic             clk,
  input  logic             rst_n,
  input  sample_t          r_fluct,
  input  sample_t          s_fluct,
  input  logic             gen_ready,
  output logic             release_bank,
  output logic             job_valid,
  input  logic             job_ready,
  output job_t             job,
  input  logic             res_valid,
  output logic             res_ready,
  input  result_t          res,
  output logic             cm_rd_en,
  output logic [CM_AW-1:0] cm_rd_addr,
  input  sample_t          cm_rd_data,
  output logic             y_valid,
  output sample_t          y_out,
  output logic             init_gen,
  output logic             mate_mode,
  output fitness_t         best_fit,
  output logic [15:0]      gen_count
);

  localparam int unsigned P   = NAP + NSP;
  localparam int unsigned PW  = $clog2(P);
  localparam int unsigned SW  = (NSP > 1) ? $clog2(NSP) : 1;
  localparam int unsigned A   = NAP * (NAC + 1) + 3 * NSP / 2;
  localparam int unsigned CW  = $clog2(NAC + 2);
  localparam int unsigned AW  = (T0 > 1) ? $clog2(T0) : 1;

  typedef enum logic [2:0] {G_IDLE, G_SHUF, G_ISSUE, G_WAIT, G_RANK, G_OUT, G_REL} gstate_t;
  gstate_t state;

  logic              cur_sel;
  logic              init_flag;
  logic [PW-1:0]     order [P];     // order[rank] = slot in the current bank
  logic [SW-1:0]     perm  [NSP];   // mating shuffle of ranks Nap..P-1
  fitness_t          fitn  [P];     // fitness of the survivors (next bank)
  logic [P-1:0]      vld;
  logic [PW:0]       rc;            // reproduction counter
  logic [CW-1:0]     sub;           // member within a family
  logic [ID_W-1:0]   id_cnt;
  logic [ID_W-1:0]   res_cnt;
  logic [ID_W-1:0]   best_id;
  logic              best_vld;
  logic [PW:0]       ri;            // ranking / shuffle index
  logic [AW:0]       on;            // output sample index
  logic [31:0]       urnd;          // uniform generator for the shuffle
  logic              rd_q;

  // ---------------- reproduction ------------------------------------------
  logic [PW-1:0]     pa_addr, pb_addr;
  indiv_t            pa, pb, child;
  logic signed [15:0] noise [NC];
  rep_mode_t         rmode;
  tag_t              jtag;
  logic              job_fire, last_job;
  logic              keep;
  logic [ID_W-1:0]   total;

  assign mate_mode = (rc > (PW+1)'(NAP - 1));
  assign job_fire  = job_valid && job_ready;
  assign total     = init_flag ? ID_W'(P) : ID_W'(A);

  always_comb begin
    logic [PW-1:0] k_rank, l_rank;
    int unsigned   m2;
    m2      = int'(rc) - NAP;
    k_rank  = PW'(NAP + int'(perm[SW'(m2)]));
    l_rank  = PW'(NAP + int'(perm[SW'(m2 + 1)]));
    pa_addr = order[PW'(rc)];
    pb_addr = order[l_rank];
    rmode   = REP_PASS;
    jtag.id   = id_cnt;
    jtag.slot = SLOT_W'(rc);
    jtag.role = ROLE_CLONE;
    last_job  = 1'b0;
    if (init_flag) begin
      rmode     = REP_INIT;
      jtag.role = ROLE_INIT;
      last_job  = (rc == (PW+1)'(P - 1));
    end else if (!mate_mode) begin
      rmode     = (sub == '0) ? REP_PASS : REP_CLONE;
      last_job  = (NSP == 0) && (rc == (PW+1)'(NAP - 1)) && (sub == CW'(NAC));
    end else begin
      pa_addr   = (sub == CW'(1)) ? order[l_rank] : order[k_rank];
      rmode     = (sub == CW'(2)) ? REP_MATE : REP_PASS;
      jtag.role = (sub == CW'(2)) ? ROLE_MATE_CHILD : ROLE_MATE_PARENT;
      jtag.slot = (sub == CW'(2)) ? SLOT_W'(rc + 1'b1) : SLOT_W'(rc);
      last_job  = (rc == (PW+1)'(P - 2)) && (sub == CW'(2));
    end
  end

  individual_memory #(.P(P)) u_imem (
    .clk, .cur_sel,
    .rd_a_addr(pa_addr), .rd_a_data(pa),
    .rd_b_addr(pb_addr), .rd_b_data(pb),
    .wr_en(res_valid && keep), .wr_addr(PW'(res.tag.slot)), .wr_data(res.ind)
  );

  for (genvar i = 0; i < NC; i++) begin : g_rng
    gauss_rng #(.SEED(32'h9e37_79b9 ^ (32'(i + 1) * 32'h0101_3c6d))) u_rng (
      .clk, .rst_n, .step(job_fire), .n(noise[i])
    );
  end

  srs u_srs (
    .mode(rmode), .parent_a(pa), .parent_b(pb), .noise,
    .r_fluct, .s_fluct, .child
  );

  assign job_valid = (state == G_ISSUE);
  assign job.ind   = child;
  assign job.tag   = jtag;

  // ---------------- selection ---------------------------------------------
  always_comb begin
    logic [PW-1:0] s;
    s    = PW'(res.tag.slot);
    keep = (res.tag.role == ROLE_MATE_CHILD) || !vld[s] || (res.fit > fitn[s]);
  end
  assign res_ready = 1'b1;

  // ---------------- ranking -----------------------------------------------
  logic [PW-1:0] rank;
  always_comb begin
    int unsigned cnt;
    cnt = 0;
    for (int j = 0; j < P; j++)
      if ((fitn[j] > fitn[PW'(ri)]) || ((fitn[j] == fitn[PW'(ri)]) && (j < int'(ri))))
        cnt++;
    rank = PW'(cnt);
  end

  // ---------------- shuffle random index ----------------------------------
  logic [31:0] urnd_nxt;
  logic [SW-1:0] sj;
  always_comb begin
    logic [31:0] prod;  // only the upper half is used
    urnd_nxt = urnd ^ (urnd << 13);
    urnd_nxt = urnd_nxt ^ (urnd_nxt >> 17);
    urnd_nxt = urnd_nxt ^ (urnd_nxt << 5);
    prod     = {16'd0, urnd[15:0]} * 32'(ri + 1'b1);
    sj       = SW'(prod[31:16]);     // uniform in 0..ri
  end

  // ---------------- control FSM -------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= G_IDLE;
      cur_sel      <= 1'b0;
      init_flag    <= 1'b1;
      rc           <= '0;
      sub          <= '0;
      id_cnt       <= '0;
      res_cnt      <= '0;
      best_id      <= '0;
      best_vld     <= 1'b0;
      best_fit     <= '0;
      vld          <= '0;
      ri           <= '0;
      on           <= '0;
      urnd         <= 32'h1234_5679;
      gen_count    <= '0;
      release_bank <= 1'b0;
      rd_q         <= 1'b0;
      for (int i = 0; i < P; i++)   order[i] <= PW'(i);
      for (int i = 0; i < P; i++)   fitn[i]  <= '0;
      for (int i = 0; i < NSP; i++) perm[i]  <= SW'(i);
    end else begin
      release_bank <= 1'b0;
      rd_q         <= cm_rd_en;

      // results are taken in every state
      if (res_valid) begin
        res_cnt <= res_cnt + 1'b1;
        if (keep) begin
          fitn[PW'(res.tag.slot)] <= res.fit;
          vld[PW'(res.tag.slot)]  <= 1'b1;
        end
        if (!best_vld || res.fit > best_fit) begin
          best_vld <= 1'b1;
          best_fit <= res.fit;
          best_id  <= res.tag.id;
        end
      end

      unique case (state)
        G_IDLE: if (gen_ready) begin
          rc     <= '0;
          sub    <= '0;
          id_cnt <= '0;
          if (init_flag || NSP < 2) state <= G_ISSUE;
          else begin
            for (int i = 0; i < NSP; i++) perm[i] <= SW'(i);
            ri    <= (PW+1)'(NSP - 1);
            state <= G_SHUF;
          end
        end
        G_SHUF: begin
          perm[SW'(ri)] <= perm[sj];
          perm[sj]      <= perm[SW'(ri)];
          urnd          <= urnd_nxt;
          if (ri == (PW+1)'(1)) state <= G_ISSUE;
          else                  ri    <= ri - 1'b1;
        end
        G_ISSUE: if (job_fire) begin
          id_cnt <= id_cnt + 1'b1;
          if (last_job) state <= G_WAIT;
          if (init_flag) rc <= rc + 1'b1;
          else if (!mate_mode) begin
            if (sub == CW'(NAC)) begin
              sub <= '0;
              rc  <= rc + 1'b1;
            end else sub <= sub + 1'b1;
          end else begin
            if (sub == CW'(2)) begin
              sub <= '0;
              rc  <= rc + (PW+1)'(2);
            end else sub <= sub + 1'b1;
          end
        end
        G_WAIT: if (res_cnt == total) begin
          ri    <= '0;
          state <= G_RANK;
        end
        G_RANK: begin
          order[rank] <= PW'(ri);
          if (ri == (PW+1)'(P - 1)) begin
            cur_sel   <= ~cur_sel;
            init_flag <= 1'b0;
            on        <= '0;
            state     <= G_OUT;
          end else ri <= ri + 1'b1;
        end
        G_OUT: begin
          if (on == (AW+1)'(T0 - 1)) state <= G_REL;
          on <= on + 1'b1;
        end
        G_REL: if (!rd_q) begin
          release_bank <= 1'b1;
          gen_count    <= gen_count + 1'b1;
          res_cnt      <= '0;
          best_vld     <= 1'b0;
          vld          <= '0;
          state        <= G_IDLE;
        end
        default: state <= G_IDLE;
      endcase
    end
  end

  assign cm_rd_en   = (state == G_OUT);
  assign cm_rd_addr = CM_AW'(best_id * T0 + on);
  assign y_valid    = rd_q;
  assign y_out      = cm_rd_data;
  assign init_gen   = init_flag;

  // Handshake rule: a job offered to the FFC stays unchanged until taken.
  a_job_stable: assert property (@(posedge clk) disable iff (!rst_n)
    job_valid && !job_ready |=> job_valid && $stable(job));

  // The evaluation index must fit the tag and the common-memory address.
  initial begin
    assert (A < (1 << ID_W)) else $error("rs: A does not fit ID_W");
    assert (A * T0 <= (1 << CM_AW)) else $error("rs: common memory address too narrow");
  end

endmodule
