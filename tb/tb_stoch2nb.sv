// tb_stoch2nb: feeds biased random decision streams in windows of random
// length and checks, against counts kept here, the running counters, the
// decision taken at each window end (most frequent symbol, lowest on a tie,
// previous decision kept after an empty window), the load of a hard
// decision, and saturation of 4-bit counters.
module tb_stoch2nb;
  import nb_ldpc_pkg::*;
  localparam int CW = 4;
  logic clk = 1'b0, rst = 1'b1;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic          valid, win_end, load;
  sym_t          sym, load_sym, dec;
  logic [CW-1:0] cnt [Q];

  stoch2nb #(.CNT_W(CW)) dut (.clk(clk), .rst(rst), .valid(valid), .sym(sym), .win_end(win_end),
                              .load(load), .load_sym(load_sym), .dec(dec), .cnt(cnt));

  int   mc [4];
  sym_t mdec;
  int   len, fav, best;
  int   n_empty = 0, n_sat = 0;

  task automatic tick();
    @(posedge clk); #1;
  endtask

  initial begin
    valid = 0; win_end = 0; load = 0; sym = '0; load_sym = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    load = 1; load_sym = sym_t'(2);
    tick();
    load = 0;
    mdec = 2;
    for (int a = 0; a < 4; a++) mc[a] = 0;
    checks++; if (dec !== 2) begin failures++; $display("FAIL load"); end
    for (int w = 0; w < 300; w++) begin
      len = $urandom_range(1, 30);
      fav = $urandom_range(0, 3);
      for (int t = 0; t < len; t++) begin
        valid   = (w % 17 == 4 || w % 17 == 5) ? 1'b0 : ($urandom_range(0, 3) != 0);
        sym     = ($urandom_range(0, 1) == 0) ? sym_t'(fav) : sym_t'($urandom_range(0, 3));
        win_end = (t == len - 1);
        if (win_end) begin
          best = 0;
          for (int a = 1; a < 4; a++) if (mc[a] > mc[best]) best = a;
          if (mc[0] + mc[1] + mc[2] + mc[3] > 0) mdec = sym_t'(best);
          else n_empty++;
          for (int a = 0; a < 4; a++) mc[a] = 0;
          if (valid) mc[sym] = 1;
        end else if (valid) begin
          if (mc[sym] < 15) mc[sym]++;
          else n_sat++;
        end
        tick();
        for (int a = 0; a < 4; a++) begin
          checks++;
          if (int'(cnt[a]) != mc[a]) begin
            failures++;
            if (failures < 6) $display("FAIL w=%0d cnt[%0d]=%0d exp %0d", w, a, cnt[a], mc[a]);
          end
        end
        checks++;
        if (dec !== mdec) begin
          failures++;
          if (failures < 6) $display("FAIL w=%0d dec=%0d exp %0d", w, dec, mdec);
        end
      end
    end
    win_end = 0; valid = 0;
    checks++;
    if (n_empty == 0 || n_sat == 0) begin
      failures++; $display("FAIL empty windows %0d saturations %0d", n_empty, n_sat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
