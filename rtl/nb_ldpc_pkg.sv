// nb_ldpc_pkg: types, constants and the Tanner-graph wiring shared by the
// stochastic GF(4) LDPC decoder.
//
// A GF(4) symbol is two bits; GF(4) addition is the bitwise XOR of the two
// bit patterns, which is what the check node unit uses.
//
// Wiring: the parity check matrix H is a DV x DC array of Z x Z circulant
// permutation blocks (a quasi-cyclic array code). Block (i, j) is the
// identity shifted by s(i, j) = (i * j) mod Z. Variable node v = j*Z + k sits
// in block column j; its i-th edge goes to check node c = i*Z + r with
// r = (k - s(i, j)) mod Z, and arrives there on check socket j. Every check
// node therefore has one edge in every block column (degree DC) and every
// variable node one edge in every block row (degree DV). For DV <= 3 and
// DC <= 6 with Z = 84 the product (i1-i2)(j1-j2) never reaches Z, so the
// graph has no 4-cycles. The document gives the code length (504 symbols)
// but not its parity check matrix; this construction and the degrees are
// this design's own choice.
package nb_ldpc_pkg;

  localparam int unsigned Q     = 4;          // field size, GF(4)
  localparam int unsigned SYM_W = $clog2(Q);  // bits per symbol

  typedef logic [SYM_W-1:0] sym_t;

  // Circulant shift of block (i, j).
  function automatic int unsigned qc_shift(int unsigned i, int unsigned j,
                                           int unsigned z);
    return (i * j) % z;
  endfunction

  // Check node reached by edge i of variable node v.
  function automatic int unsigned cn_of_vn(int unsigned v, int unsigned i,
                                           int unsigned z);
    int unsigned j, k;
    j = v / z;
    k = v % z;
    return i * z + ((k + z - qc_shift(i, j, z)) % z);
  endfunction

  // Variable node reached by socket j of check node c.
  function automatic int unsigned vn_of_cn(int unsigned c, int unsigned j,
                                           int unsigned z);
    int unsigned i, r;
    i = c / z;
    r = c % z;
    return j * z + ((r + qc_shift(i, j, z)) % z);
  endfunction

endpackage
