// tb_nb_ldpc_decoder: end-to-end test of the stochastic GF(4) decoder on a
// reduced instance (Z = 12, so 72 symbols and 36 checks, and at most 6
// windows) that builds and runs quickly; tb_nb_ldpc_decoder_full runs the
// same test on the 504-symbol default instance.
//
// Codewords are generated with the structure of the parity check matrix: a
// constant GF(4) symbol per block column, with the six constants summing to
// zero, satisfies every check. The testbench turns each codeword into
// channel bit probabilities (reliable bits at 0.80..0.98, and a fraction of
// symbols with one bit pushed to the wrong side of 1/2, so the hard decision
// is wrong there) and checks that the decoder returns the codeword with
// success, that the cycle count from start to done is
// 2 + EM_DEPTH + iters*(WINDOW+1), and that the syndrome reported is zero.
// A last frame of pure noise must end as a failure after MAX_ITER windows.
// It counts, and requires at least once each: edge-memory fill, regenerative
// (agreeing) edge outputs, edge-memory reads, decision samples, channel hard
// decision errors corrected, stop on a zero syndrome, stop at the iteration
// limit.
module tb_nb_ldpc_decoder;
  import nb_ldpc_pkg::*;
  localparam int Z = 12, DV = 3, DC = 6, N = DC * Z, M = DV * Z, W = 8;
  localparam int EM_DEPTH = 32, WINDOW = 64, MAX_ITER = 6;
  localparam int IW = $clog2(MAX_ITER + 1);

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [W-1:0]           chan_prob [N][SYM_W];
  sym_t                   dec [N];
  logic                   busy, done, success;
  logic [IW-1:0]          iters;
  logic [$clog2(M+1)-1:0] n_unsat;

  nb_ldpc_decoder #(.Z(Z), .MAX_ITER(MAX_ITER)) dut (
    .clk(clk), .rst(rst), .start(start), .chan_prob(chan_prob), .dec(dec),
    .busy(busy), .done(done), .success(success), .iters(iters), .n_unsat(n_unsat));

  // ------------------------------------------------ mechanism counters
  longint n_fill = 0, n_regen = 0, n_emread = 0, n_decs = 0;
  int     n_corrected = 0, n_stop_ok = 0, n_stop_limit = 0;

  for (genvar v = 0; v < N; v += 1) begin : g_probe
    always @(posedge clk) begin
      if (dut.en && dut.init) n_fill++;
      if (dut.en && !dut.init) begin
        if (dut.g_vn[v].u_vnu.agree[0]) n_regen++;
        else                            n_emread++;
      end
      if (dut.g_vn[v].dvalid) n_decs++;
    end
  end

  // ------------------------------------------------ frame generation
  sym_t cw [N];
  int   n_hard_err;

  task automatic make_codeword();
    sym_t cst [DC];
    cst[DC-1] = '0;
    for (int j = 0; j < DC - 1; j++) begin
      cst[j] = sym_t'($urandom_range(0, 3));
      cst[DC-1] ^= cst[j];
    end
    for (int v = 0; v < N; v++) cw[v] = cst[v / Z];
  endtask

  // err_permille: share of symbols with one bit on the wrong side
  task automatic make_channel(input int err_permille);
    int r, bbad;
    logic t, hard;
    n_hard_err = 0;
    for (int v = 0; v < N; v++) begin
      bbad = ($urandom_range(0, 999) < err_permille) ? $urandom_range(0, SYM_W - 1) : -1;
      for (int b = 0; b < SYM_W; b++) begin
        t = cw[v][b];
        if (b == bbad) r = $urandom_range(80, 115);    // 0.31 .. 0.45 towards the truth
        else           r = $urandom_range(205, 250);   // 0.80 .. 0.98 towards the truth
        chan_prob[v][b] = t ? W'(r) : W'(256 - r);
      end
      hard = 1'b0;
      for (int b = 0; b < SYM_W; b++) if (chan_prob[v][b][W-1] != cw[v][b]) hard = 1'b1;
      if (hard) n_hard_err++;
    end
  endtask

  task automatic make_noise();
    for (int v = 0; v < N; v++)
      for (int b = 0; b < SYM_W; b++) chan_prob[v][b] = W'($urandom_range(96, 160));
  endtask

  int cyc;

  task automatic run_frame(output int cycles);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cycles = 1;
    #1;
    do begin
      @(posedge clk); #1;
      cycles++;
    end while (!done && cycles < 10000);
  endtask

  task automatic decode_codeword(input int err_permille, input string name);
    int errs;
    make_codeword();
    make_channel(err_permille);
    run_frame(cyc);
    errs = 0;
    for (int v = 0; v < N; v++) if (dec[v] != cw[v]) errs++;
    $display("%s: %0d hard-decision symbol errors, %0d windows, %0d cycles, success=%0b, %0d symbol errors after decoding",
             name, n_hard_err, iters, cyc, success, errs);
    checks++;
    if (!done || !success || errs != 0 || n_unsat != 0) begin
      failures++; $display("FAIL %s not decoded", name);
    end
    checks++;
    if (cyc != 2 + EM_DEPTH + int'(iters) * (WINDOW + 1)) begin
      failures++; $display("FAIL %s latency %0d cycles for %0d windows", name, cyc, iters);
    end
    if (success) n_stop_ok++;
    if (success && errs == 0) n_corrected += n_hard_err;
  endtask

  initial begin
    for (int v = 0; v < N; v++) for (int b = 0; b < SYM_W; b++) chan_prob[v][b] = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (2) @(posedge clk);

    decode_codeword(0,  "clean frame");
    decode_codeword(20, "frame 1 (2% weak symbols)");
    decode_codeword(40, "frame 2 (4% weak symbols)");
    decode_codeword(60, "frame 3 (6% weak symbols)");

    make_noise();
    run_frame(cyc);
    $display("noise frame: %0d windows, success=%0b, %0d unsatisfied checks", iters, success, n_unsat);
    checks++;
    if (!done || success || int'(iters) != MAX_ITER || n_unsat == 0) begin
      failures++; $display("FAIL noise frame should stop at the iteration limit");
    end
    checks++;
    if (cyc != 2 + EM_DEPTH + MAX_ITER * (WINDOW + 1)) begin
      failures++; $display("FAIL noise frame latency %0d", cyc);
    end
    if (done && !success) n_stop_limit++;

    $display("mechanisms: fill=%0d regenerative=%0d edge-memory reads=%0d decision samples=%0d corrected=%0d stop-ok=%0d stop-limit=%0d",
             n_fill, n_regen, n_emread, n_decs, n_corrected, n_stop_ok, n_stop_limit);
    checks += 7;
    if (n_fill == 0)       begin failures++; $display("FAIL no edge-memory fill"); end
    if (n_regen == 0)      begin failures++; $display("FAIL no regenerative output"); end
    if (n_emread == 0)     begin failures++; $display("FAIL no edge-memory read"); end
    if (n_decs == 0)       begin failures++; $display("FAIL no decision samples"); end
    if (n_corrected == 0)  begin failures++; $display("FAIL no channel error corrected"); end
    if (n_stop_ok == 0)    begin failures++; $display("FAIL no stop on zero syndrome"); end
    if (n_stop_limit == 0) begin failures++; $display("FAIL no stop at the iteration limit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
