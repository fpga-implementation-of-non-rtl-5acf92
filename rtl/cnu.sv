// cnu: check node unit of the stochastic GF(4) decoder.
//
// A check node of degree DC receives one stochastic GF(4) symbol per edge per
// clock. GF(4) addition is the bitwise XOR of the symbols, so the message
// sent back on edge j is the XOR of the symbols on all other edges, which
// makes the sum over all edges zero (the parity check). In probability terms
// a two-input XOR gives p_c = p_a(1-p_b) + p_b(1-p_a) per bit. The outputs
// are stored in flip-flops.
//
// Interface: in_sym[DC] (from the variable nodes), en, out_sym[DC].
// Timing: out_sym is registered, one cycle after an enabled edge.
//
// The XOR addition and the output flip-flops follow the document; the
// parity check coefficients are all one (the document's check node does
// addition only), and the degree is this design's choice.
module cnu
  import nb_ldpc_pkg::*;
#(
  parameter int unsigned DC = 6
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  sym_t in_sym  [DC],
  output sym_t out_sym [DC]
);

  sym_t total;

  always_comb begin
    total = '0;
    for (int unsigned j = 0; j < DC; j++)
      total ^= in_sym[j];
  end

  // Removing one edge from the total leaves the XOR of the others.
  always_ff @(posedge clk) begin
    for (int unsigned j = 0; j < DC; j++) begin
      if (rst)     out_sym[j] <= '0;
      else if (en) out_sym[j] <= total ^ in_sym[j];
    end
  end

endmodule
