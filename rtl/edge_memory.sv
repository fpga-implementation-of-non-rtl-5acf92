// edge_memory: finite-depth buffer of regenerative symbols on one edge.
//
// A shift register of DEPTH GF(4) symbols. A write pushes the new symbol in
// at address 0 and drops the oldest one, so the memory always holds the
// DEPTH most recent symbols that the variable node produced while its
// inputs agreed. A read returns the symbol at rd_addr; the variable node
// drives rd_addr with a random number, which picks one of the recent
// regenerative symbols at random.
//
// Interface: wr_en, wr_sym, rd_addr, rd_sym.
// Timing: writes take effect at the clock edge; the read is combinational.
// Reset clears all entries to symbol 0 (the variable node refills the memory
// from the channel before decoding starts).
//
// The document defines edge memories as finite-depth buffers read at a
// random address; the shift-register organisation and the depth are this
// design's choices.
module edge_memory
  import nb_ldpc_pkg::*;
#(
  parameter int unsigned DEPTH = 32,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          wr_en,
  input  sym_t          wr_sym,
  input  logic [AW-1:0] rd_addr,
  output sym_t          rd_sym
);

  sym_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned d = 0; d < DEPTH; d++) mem[d] <= '0;
    end else if (wr_en) begin
      mem[0] <= wr_sym;
      for (int unsigned d = 1; d < DEPTH; d++) mem[d] <= mem[d-1];
    end
  end

  assign rd_sym = mem[rd_addr];

  initial assert (DEPTH == (1 << AW))
    else $error("edge_memory: DEPTH must be a power of two");

endmodule
