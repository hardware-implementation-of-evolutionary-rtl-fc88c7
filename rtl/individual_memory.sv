// individual_memory: the population I = [W, S] of the RS module.
//
// Two banks of P entries, each entry one whole individual (NC coefficients
// and NS state words, 11 words of 16 bits for N = 3, M = 2). One bank holds
// the current population, read through two combinational ports (two parents
// are needed at once for mating); the survivors of the generation being
// evaluated are written into the other bank. `cur_sel` chooses which bank is
// current; the RS control flips it at the end of a generation. The document
// gives the individual memory as 1,024 x 16 bits and the implemented memory
// cell of the RS module as 2,048 x 16 bits, which matches two such banks;
// the wide-word organisation is this design's choice.
//
// Timing: write at the clock edge, reads combinational. Not reset.
module individual_memory
  import edf_pkg::*;
#(
  parameter int unsigned P  = 64,
  parameter int unsigned PW = $clog2(P)
) (
  input  logic          clk,
  input  logic          cur_sel,
  input  logic [PW-1:0] rd_a_addr,
  output indiv_t        rd_a_data,
  input  logic [PW-1:0] rd_b_addr,
  output indiv_t        rd_b_data,
  input  logic          wr_en,
  input  logic [PW-1:0] wr_addr,
  input  indiv_t        wr_data
);

  indiv_t bank [2][P];

  always_ff @(posedge clk)
    if (wr_en) bank[~cur_sel][wr_addr] <= wr_data;

  assign rd_a_data = bank[cur_sel][rd_a_addr];
  assign rd_b_data = bank[cur_sel][rd_b_addr];

endmodule
