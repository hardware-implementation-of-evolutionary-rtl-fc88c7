// edf_pkg: types and constants shared by the evolutionary digital filter.
//
// Signals and coefficients are 16-bit Q14 numbers (2 integer bits including
// the sign, 14 fraction bits), as the design specifies. Each individual is an
// IIR inner filter with N_AR feedback ("regressive") coefficients and
// M_MA+1 feed-forward ("moving average") coefficients, plus its N_AR+M_MA
// delay-line values (the filter state S). An individual I = [W, S] travels
// between the reproduction/selection side and the filtering side as one
// packed struct, together with a tag that tells the selection logic where
// the result belongs. The tag and the fitness format are this design's own
// choices.
package edf_pkg;

  localparam int unsigned DW   = 16;          // data word width
  localparam int unsigned FRAC = 14;          // Q14 fraction bits

  localparam int unsigned N_AR = 3;           // order of the regressive part
  localparam int unsigned M_MA = 2;           // order of the moving-average part
  localparam int unsigned NC   = N_AR + M_MA + 1; // coefficients per individual
  localparam int unsigned NS   = N_AR + M_MA;     // state words per individual

  localparam int unsigned ID_W   = 12;        // evaluation index in a generation
  localparam int unsigned SLOT_W = 6;         // population slot (<= 64 individuals)

  typedef logic signed [DW-1:0] sample_t;
  typedef logic signed [31:0]   fitness_t;    // minus the summed squared error

  // How the selection logic treats a returned evaluation.
  typedef enum logic [1:0] {
    ROLE_INIT        = 2'd0,  // member of the initial generation, kept as is
    ROLE_CLONE       = 2'd1,  // cloning family member: best of family survives
    ROLE_MATE_PARENT = 2'd2,  // mating parent: better of the two survives
    ROLE_MATE_CHILD  = 2'd3   // mating offspring: always survives
  } role_t;

  // What the reproduction datapath (srs) makes of its parents.
  typedef enum logic [1:0] {
    REP_PASS  = 2'd0,  // the parent itself
    REP_CLONE = 2'd1,  // W_a + r*n
    REP_MATE  = 2'd2,  // (W_a + W_b)/2 + s*n
    REP_INIT  = 2'd3   // s*n with cleared state (initial generation)
  } rep_mode_t;

  typedef struct packed {
    logic [ID_W-1:0]   id;    // evaluation index, selects the common-memory row
    logic [SLOT_W-1:0] slot;  // survivor slot in the next population
    role_t             role;
  } tag_t;

  // w[0..N_AR-1] = a_1..a_N (feedback), w[N_AR..N_AR+M_MA] = b_0..b_M.
  // s[0..N_AR-1] = y(k-1)..y(k-N), s[N_AR..N_AR+M_MA-1] = x(k-1)..x(k-M).
  typedef struct packed {
    sample_t [NC-1:0] w;
    sample_t [NS-1:0] s;
  } indiv_t;

  typedef struct packed {
    indiv_t ind;
    tag_t   tag;
  } job_t;

  typedef struct packed {
    indiv_t   ind;   // W unchanged, S advanced by T0 samples
    fitness_t fit;
    tag_t     tag;
  } result_t;

  function automatic sample_t sat16(input logic signed [39:0] v);
    if (v > 40'sd32767)       return sample_t'(16'sh7fff);
    else if (v < -40'sd32768) return sample_t'(16'sh8000);
    else                      return sample_t'(v[15:0]);
  endfunction

endpackage
