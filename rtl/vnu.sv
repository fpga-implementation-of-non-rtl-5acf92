// vnu: variable node unit of the stochastic GF(4) decoder, with one edge
// memory per edge.
//
// Each clock the node sees the channel symbol ch_sym (from the non-binary to
// stochastic converter) and one symbol chk_sym[i] from each of its DV check
// nodes. The message for edge i is built from the channel symbol and the
// other DV-1 check symbols. An equality test (bitwise XNOR of the symbols,
// combined by AND) decides whether they all carry the same symbol:
//   - all equal (regenerative): the common symbol is sent on edge i and
//     written into edge memory i;
//   - otherwise: edge memory i is read at a random address rd_addr[i] and
//     that stored symbol is sent instead.
// The stochastic product of the incoming distributions (the variable node
// update) is thus formed by keeping only samples on which the inputs agree,
// and the edge memory keeps the node from being held in a fixed state by
// correlated messages (latching).
// While init is high the node sends the channel symbol on every edge and
// writes it into every edge memory, so decoding starts from filled memories.
// The decision stream for the tentative decoding uses all DV check symbols
// and the channel symbol: dec_valid is high when they all agree, and dec_sym
// is that symbol; its distribution is the normalised product f * prod R.
//
// Interface: ch_sym, chk_sym[DV], rd_addr[DV], init, en; out_sym[DV],
// dec_valid, dec_sym.
// Timing: out_sym, dec_valid and dec_sym are registered (one cycle).
//
// The XNOR/AND equality gates, the memory and its random address follow the
// document; the initial fill and the form of the decision stream are this
// design's choices.
module vnu
  import nb_ldpc_pkg::*;
#(
  parameter int unsigned DV       = 3,
  parameter int unsigned EM_DEPTH = 32,
  localparam int unsigned AW      = (EM_DEPTH > 1) ? $clog2(EM_DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic          init,
  input  sym_t          ch_sym,
  input  sym_t          chk_sym [DV],
  input  logic [AW-1:0] rd_addr [DV],
  output sym_t          out_sym [DV],
  output logic          dec_valid,
  output sym_t          dec_sym
);

  logic [DV-1:0] eq;        // check message i equals the channel symbol
  logic [DV-1:0] agree;     // all inputs of edge i agree
  sym_t          em_sym [DV];
  logic [DV-1:0] em_wr;

  always_comb begin
    for (int unsigned i = 0; i < DV; i++)
      eq[i] = &(~(chk_sym[i] ^ ch_sym));        // XNOR per bit, then AND
    for (int unsigned i = 0; i < DV; i++) begin
      agree[i] = 1'b1;
      for (int unsigned k = 0; k < DV; k++)
        if (k != i) agree[i] &= eq[k];
      em_wr[i] = en & (init | agree[i]);
    end
  end

  for (genvar i = 0; i < DV; i++) begin : g_em
    edge_memory #(.DEPTH(EM_DEPTH)) u_em (
      .clk    (clk),
      .rst    (rst),
      .wr_en  (em_wr[i]),
      .wr_sym (ch_sym),
      .rd_addr(rd_addr[i]),
      .rd_sym (em_sym[i])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned i = 0; i < DV; i++) out_sym[i] <= '0;
      dec_valid <= 1'b0;
      dec_sym   <= '0;
    end else if (en) begin
      for (int unsigned i = 0; i < DV; i++)
        out_sym[i] <= (init || agree[i]) ? ch_sym : em_sym[i];
      dec_valid <= ~init & (&eq);
      dec_sym   <= ch_sym;
    end else begin
      dec_valid <= 1'b0;
    end
  end

endmodule
