// tb_dec_ctrl: runs the controller with EM_DEPTH = 4, WINDOW = 5 and
// MAX_ITER = 3. A run whose syndrome test passes at the end of window k must
// end with success after exactly k windows; a run whose test never passes
// must stop as a failure after MAX_ITER windows. For each run the testbench
// counts the cycles with load, init, en and win_end high and the cycles from
// start to done, and compares them with the expected sequence
// (1 load, 1 + EM_DEPTH init, WINDOW en cycles and one win_end per window,
// 2 + EM_DEPTH + k*(WINDOW+1) cycles in total).
module tb_dec_ctrl;
  localparam int ED = 4, WIN = 5, MI = 3;
  logic clk = 1'b0, rst = 1'b1;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic start, syn_ok;
  logic en, init, load, win_end, busy, done, success;
  logic [1:0] iters;

  dec_ctrl #(.EM_DEPTH(ED), .WINDOW(WIN), .MAX_ITER(MI)) dut (
    .clk(clk), .rst(rst), .start(start), .syn_ok(syn_ok), .en(en), .init(init), .load(load),
    .win_end(win_end), .busy(busy), .done(done), .success(success), .iters(iters));

  int n_load, n_init, n_en, n_win, n_cyc;

  task automatic run(input int ok_after, input int exp_iters, input logic exp_success);
    int wins;
    n_load = 0; n_init = 0; n_en = 0; n_win = 0; n_cyc = 0; wins = 0;
    syn_ok = 1'b0;
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    n_cyc = 1;
    while (!done && n_cyc < 200) begin
      n_load += int'(load); n_init += int'(init); n_en += int'(en);
      if (win_end) begin n_win++; wins++; end
      // the syndrome seen in the check cycle after window ok_after is zero
      syn_ok = (ok_after > 0 && wins >= ok_after);
      @(posedge clk); #1;
      n_cyc++;
    end
    checks += 6;
    if (n_load != 1)                  begin failures++; $display("FAIL load cycles %0d", n_load); end
    if (n_init != 1 + ED)             begin failures++; $display("FAIL init cycles %0d", n_init); end
    if (n_en != 1 + ED + exp_iters * WIN) begin failures++; $display("FAIL en cycles %0d", n_en); end
    if (n_win != exp_iters)           begin failures++; $display("FAIL windows %0d", n_win); end
    if (int'(iters) != exp_iters || success !== exp_success) begin
      failures++; $display("FAIL iters=%0d success=%0b", iters, success);
    end
    if (n_cyc != 2 + ED + exp_iters * (WIN + 1)) begin
      failures++; $display("FAIL latency %0d cycles, expected %0d", n_cyc, 2 + ED + exp_iters * (WIN + 1));
    end
    // done holds
    repeat (3) @(posedge clk);
    #1 checks++;
    if (!done || busy) begin failures++; $display("FAIL done not held"); end
  endtask

  initial begin
    start = 1'b0; syn_ok = 1'b0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk); #1;
    checks++; if (busy || done) begin failures++; $display("FAIL not idle after reset"); end
    run(2, 2, 1'b1);
    run(1, 1, 1'b1);
    run(0, MI, 1'b0);
    run(3, 3, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
