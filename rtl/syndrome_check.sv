// syndrome_check: parity test H x = 0 over GF(4) for the tentative decisions.
//
// For each of the DV*Z check nodes, the decided symbols of its DC variable
// nodes (wiring from nb_ldpc_pkg) are added in GF(4), i.e. XORed. The word is
// a codeword when every such sum is zero. The module also reports how many
// checks are unsatisfied.
//
// Interface: x[N] (decided symbols, N = DC*Z), ok, n_unsat.
// Timing: purely combinational.
//
// The stopping test H x = 0 is the document's; the parity check matrix
// structure is this design's (see nb_ldpc_pkg).
module syndrome_check
  import nb_ldpc_pkg::*;
#(
  parameter int unsigned Z  = 84,
  parameter int unsigned DV = 3,
  parameter int unsigned DC = 6,
  localparam int unsigned N = DC * Z,
  localparam int unsigned M = DV * Z
) (
  input  sym_t                   x [N],
  output logic                   ok,
  output logic [$clog2(M+1)-1:0] n_unsat
);

  logic [M-1:0] unsat;

  for (genvar c = 0; c < M; c++) begin : g_chk
    sym_t s;
    always_comb begin
      s = '0;
      for (int unsigned j = 0; j < DC; j++)
        s ^= x[vn_of_cn(c, j, Z)];
    end
    assign unsat[c] = (s != '0);
  end

  always_comb begin
    n_unsat = '0;
    for (int unsigned c = 0; c < M; c++)
      n_unsat += ($clog2(M+1))'(unsat[c]);
  end

  assign ok = ~|unsat;

endmodule
