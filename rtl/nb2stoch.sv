// nb2stoch: non-binary to stochastic converter for one GF(4) symbol.
//
// The channel information for a symbol is given as one probability per bit
// of its binary representation, g[b] = P(bit b = 1), as an unsigned fraction
// of W bits (g = 2^W means certainty, so the value 0 means "never 1"). Every
// enabled clock the converter draws one uniform W-bit random number per bit
// and sets bit b of the output symbol when rand[b] < g[b]. The symbols of the
// stream therefore occur with probability f(a) = prod_b g[b]^(a_b)
// (1-g[b])^(1-a_b), the product form the decoder's initialisation uses.
//
// Interface: prob[b] and rand[b] (W bits each, b = 0..SYM_W-1), en, sym.
// Timing: the symbol is registered; it appears one cycle after the enabled
// edge that sampled the random numbers.
//
// The document names the converter and the LFSR that feeds it; the per-bit
// comparison is this design's way of producing the stated product form.
module nb2stoch
  import nb_ldpc_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic [W-1:0]        prob [SYM_W],
  input  logic [W-1:0]        rand_in [SYM_W],
  output sym_t                sym
);

  sym_t sym_d;

  always_comb
    for (int unsigned b = 0; b < SYM_W; b++)
      sym_d[b] = (rand_in[b] < prob[b]);

  always_ff @(posedge clk) begin
    if (rst)     sym <= '0;
    else if (en) sym <= sym_d;
  end

endmodule
