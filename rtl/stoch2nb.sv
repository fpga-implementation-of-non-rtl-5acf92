// stoch2nb: stochastic to non-binary converter (decision counter) for one
// variable node.
//
// One counter per GF(4) symbol counts how often that symbol appears on the
// decision stream (samples with valid high) during a decoding window. At the
// end of the window (win_end) the symbol with the highest count becomes the
// decoded symbol (lowest symbol on a tie) and the counters restart, with the
// sample of the win_end cycle as the first of the new window. A window with
// no sample at all keeps the previous decision. load sets the decision
// directly (the channel hard decision before decoding) and clears the
// counters. Counters saturate at 2^CNT_W - 1.
//
// Interface: valid, sym (decision stream), win_end, load, load_sym; dec
// (decoded symbol), cnt[Q] (counts of the running window).
// Timing: dec changes on the clock edge of win_end or load.
//
// The document converts the stream back by counting with a counter; the
// per-symbol counters, the argmax (the tentative decoding rule) and the
// window are this design's way of doing that for a GF(4) stream.
module stoch2nb
  import nb_ldpc_pkg::*;
#(
  parameter int unsigned CNT_W = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             valid,
  input  sym_t             sym,
  input  logic             win_end,
  input  logic             load,
  input  sym_t             load_sym,
  output sym_t             dec,
  output logic [CNT_W-1:0] cnt [Q]
);

  sym_t             best;
  logic             any;

  // Argmax over the counters of the finished window.
  always_comb begin
    best = '0;
    any  = 1'b0;
    for (int unsigned a = 0; a < Q; a++) begin
      if (cnt[a] != '0) any = 1'b1;
      if (cnt[a] > cnt[best]) best = sym_t'(a);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dec <= '0;
      for (int unsigned a = 0; a < Q; a++) cnt[a] <= '0;
    end else if (load) begin
      dec <= load_sym;
      for (int unsigned a = 0; a < Q; a++) cnt[a] <= '0;
    end else if (win_end) begin
      if (any) dec <= best;
      for (int unsigned a = 0; a < Q; a++)
        cnt[a] <= (valid && sym == sym_t'(a)) ? CNT_W'(1) : '0;
    end else if (valid && cnt[sym] != '1) begin
      cnt[sym] <= cnt[sym] + 1'b1;
    end
  end

endmodule
