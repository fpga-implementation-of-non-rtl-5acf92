// nb_ldpc_decoder: fully parallel stochastic decoder for a GF(4) LDPC code
// of length N = DC*Z symbols (504 by default) and M = DV*Z checks (252).
//
// Data path (one slice per variable node v, one check node unit per check):
//   lfsr      -> random numbers for the converter and the edge memories
//   nb2stoch  -> turns the channel bit probabilities of symbol v into a
//                stream of random GF(4) symbols
//   vnu       -> variable node unit with DV edge memories
//   cnu       -> check node units (GF(4) addition by XOR), reached through
//                the fixed Tanner-graph wiring of nb_ldpc_pkg
//   stoch2nb  -> counts the symbols of the node's decision stream and
//                outputs the most frequent one as the decoded symbol
// syndrome_check tests H x = 0 on the decoded word and dec_ctrl sequences a
// run: load, fill the edge memories, then decoding windows of WINDOW cycles
// each followed by a syndrome test, until success or MAX_ITER windows.
//
// Interface: chan_prob[v][b] is P(bit b of symbol v = 1) as a W-bit
// fraction; it must stay stable from start until done. start begins a run;
// done (level) reports the end, success whether H x = 0 was reached, iters
// the number of windows used, n_unsat the unsatisfied checks of dec.
// Timing: 2 + EM_DEPTH + iters*(WINDOW+1) cycles from start to done. Every
// edge carries one 2-bit symbol per clock in each direction; the loop
// VN -> CN -> VN is two register stages.
//
// The block structure (converter, VNU with edge memory, CNU, counter) and
// the code length follow the document; the parity check matrix, node
// degrees, widths, window and limits are this design's choices.
// Lint notes: the top bit of each 32-bit random number is not needed at the
// default sizes (31 bits are used), and the per-node running counts of
// stoch2nb are left unread here; both are reported as unused signals.
module nb_ldpc_decoder
  import nb_ldpc_pkg::*;
#(
  parameter int unsigned Z        = 84,
  parameter int unsigned DV       = 3,
  parameter int unsigned DC       = 6,
  parameter int unsigned W        = 8,
  parameter int unsigned EM_DEPTH = 32,
  parameter int unsigned WINDOW   = 64,
  parameter int unsigned MAX_ITER = 64,
  parameter int unsigned CNT_W    = 8,
  localparam int unsigned N  = DC * Z,
  localparam int unsigned M  = DV * Z,
  localparam int unsigned AW = (EM_DEPTH > 1) ? $clog2(EM_DEPTH) : 1,
  localparam int unsigned IW = $clog2(MAX_ITER + 1),
  localparam int unsigned RW = 32
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   start,
  input  logic [W-1:0]           chan_prob [N][SYM_W],
  output sym_t                   dec [N],
  output logic                   busy,
  output logic                   done,
  output logic                   success,
  output logic [IW-1:0]          iters,
  output logic [$clog2(M+1)-1:0] n_unsat
);

  if (SYM_W * W + DV * AW > RW) begin : g_rw_check
    $error("nb_ldpc_decoder: random bits per node exceed the LFSR width");
  end

  logic en, init, load, win_end, syn_ok;

  sym_t vn_out [N][DV];   // variable node v, edge i -> check node
  sym_t vn_in  [N][DV];   // check node -> variable node v, edge i
  sym_t cn_in  [M][DC];
  sym_t cn_out [M][DC];

  // ------------------------------------------------------------ variable nodes
  for (genvar v = 0; v < N; v++) begin : g_vn
    logic [RW-1:0]   rnd;
    logic [W-1:0]    rbits [SYM_W];
    logic [AW-1:0]   raddr [DV];
    sym_t            ch_sym;
    logic            dvalid;
    sym_t            dsym;
    sym_t            hard;
    logic [CNT_W-1:0] cnt [Q];

    lfsr #(.WIDTH(RW), .TAPS(32'h8020_0003)) u_rng (
      .clk(clk), .rst(rst), .en(1'b1),
      .seed(RW'((v + 1) * 32'h9E37_79B9) | RW'(1)), .rnd(rnd)
    );

    for (genvar b = 0; b < SYM_W; b++) begin : g_rb
      assign rbits[b] = rnd[b*W +: W];
      assign hard[b]  = chan_prob[v][b][W-1];   // P(bit = 1) >= 1/2
    end
    for (genvar i = 0; i < DV; i++) begin : g_ra
      assign raddr[i] = rnd[SYM_W*W + i*AW +: AW];
    end

    nb2stoch #(.W(W)) u_conv (
      .clk(clk), .rst(rst), .en(en),
      .prob(chan_prob[v]), .rand_in(rbits), .sym(ch_sym)
    );

    vnu #(.DV(DV), .EM_DEPTH(EM_DEPTH)) u_vnu (
      .clk(clk), .rst(rst), .en(en), .init(init),
      .ch_sym(ch_sym), .chk_sym(vn_in[v]), .rd_addr(raddr),
      .out_sym(vn_out[v]), .dec_valid(dvalid), .dec_sym(dsym)
    );

    stoch2nb #(.CNT_W(CNT_W)) u_cnt (
      .clk(clk), .rst(rst), .valid(dvalid), .sym(dsym),
      .win_end(win_end), .load(load), .load_sym(hard),
      .dec(dec[v]), .cnt(cnt)
    );

    for (genvar i = 0; i < DV; i++) begin : g_edge
      assign vn_in[v][i] = cn_out[cn_of_vn(v, i, Z)][v / Z];
    end
  end

  // --------------------------------------------------------------- check nodes
  for (genvar c = 0; c < M; c++) begin : g_cn
    for (genvar j = 0; j < DC; j++) begin : g_edge
      assign cn_in[c][j] = vn_out[vn_of_cn(c, j, Z)][c / Z];
    end

    cnu #(.DC(DC)) u_cnu (
      .clk(clk), .rst(rst), .en(en),
      .in_sym(cn_in[c]), .out_sym(cn_out[c])
    );
  end

  // ---------------------------------------------------- stopping test, control
  syndrome_check #(.Z(Z), .DV(DV), .DC(DC)) u_syn (
    .x(dec), .ok(syn_ok), .n_unsat(n_unsat)
  );

  dec_ctrl #(.EM_DEPTH(EM_DEPTH), .WINDOW(WINDOW), .MAX_ITER(MAX_ITER)) u_ctrl (
    .clk(clk), .rst(rst), .start(start), .syn_ok(syn_ok),
    .en(en), .init(init), .load(load), .win_end(win_end),
    .busy(busy), .done(done), .success(success), .iters(iters)
  );

endmodule
