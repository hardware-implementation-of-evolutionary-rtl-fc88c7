// srs: single reproduction and selection datapath - the reproduction part.
//
// Forms the coefficient vector of one individual to be evaluated, following
// the adaptive algorithm of the EDF:
//   REP_PASS   the parent itself (parents are re-evaluated with the
//              offspring of their family)
//   REP_CLONE  cloning:  W = W_a + r*n                       (eq. 2)
//   REP_MATE   mating:   W = (W_a + W_b)/2 + s*n             (eq. 3)
//   REP_INIT   initial generation: W = s*n, filter state cleared
// n is a vector of NC approximately Gaussian numbers (Q11, unit variance)
// and r, s are the cloning and mating fluctuations (Q14). Every sum is
// saturated to 16 bits; (W_a+W_b)/2 uses an arithmetic shift. An offspring
// takes over the filter state S of parent a; the document does not say which
// state an offspring starts from, so this is this design's choice, as is the
// random initial population. The selection half of the SRS (keeping the
// fittest of each family) is in the rs module, where the fitness values are.
//
// Purely combinational.
module srs
  import edf_pkg::*;
(
  input  rep_mode_t           mode,
  input  indiv_t              parent_a,
  input  indiv_t              parent_b,
  input  logic signed [15:0]  noise [NC],
  input  sample_t             r_fluct,
  input  sample_t             s_fluct,
  output indiv_t              child
);

  always_comb begin
    child = parent_a;
    for (int i = 0; i < NC; i++) begin
      logic signed [31:0] rn, sn;
      logic signed [16:0] mid;
      rn  = (r_fluct * noise[i]) >>> 11;
      sn  = (s_fluct * noise[i]) >>> 11;
      mid = 17'((18'(parent_a.w[i]) + 18'(parent_b.w[i])) >>> 1);
      unique case (mode)
        REP_PASS:  child.w[i] = parent_a.w[i];
        REP_CLONE: child.w[i] = sat16(40'(parent_a.w[i]) + 40'(rn));
        REP_MATE:  child.w[i] = sat16(40'(mid) + 40'(sn));
        REP_INIT:  child.w[i] = sat16(40'(sn));
        default:   child.w[i] = parent_a.w[i];
      endcase
    end
    if (mode == REP_INIT) child.s = '0;
  end

endmodule
