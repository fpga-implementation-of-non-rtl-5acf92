// tb_nb2stoch: drives the converter with random numbers and bit probabilities
// and checks (1) every output symbol against the comparison rule, one cycle
// later, and (2) that the symbol frequencies over 8000 draws match the
// product form f(a) = prod_b g_b^(a_b) (1-g_b)^(1-a_b) for g = (0.25, 0.75),
// and that probabilities 0 and 255/256 give the expected extremes.
module tb_nb2stoch;
  import nb_ldpc_pkg::*;
  localparam int W = 8;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [W-1:0] prob [SYM_W];
  logic [W-1:0] rnd  [SYM_W];
  sym_t         sym;

  nb2stoch #(.W(W)) dut (.clk(clk), .rst(rst), .en(en), .prob(prob), .rand_in(rnd), .sym(sym));

  int   hist [4];
  sym_t expv;
  int   expect_cnt [4];

  task automatic run(input int n, input logic [W-1:0] p0, input logic [W-1:0] p1);
    for (int a = 0; a < 4; a++) hist[a] = 0;
    prob[0] = p0; prob[1] = p1;
    for (int t = 0; t < n; t++) begin
      rnd[0] = W'($urandom); rnd[1] = W'($urandom);
      expv[0] = (int'(rnd[0]) < int'(p0));
      expv[1] = (int'(rnd[1]) < int'(p1));
      @(posedge clk); #1;
      checks++;
      if (sym !== expv) begin
        failures++;
        if (failures < 5) $display("FAIL got %0d exp %0d", sym, expv);
      end
      hist[sym]++;
    end
  endtask

  initial begin
    prob[0] = '0; prob[1] = '0; rnd[0] = '0; rnd[1] = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0; en <= 1'b1;
    run(8000, 8'd64, 8'd192);
    // expected counts 1500, 500, 4500, 1500 (bit 0 is the low bit)
    expect_cnt = '{1500, 500, 4500, 1500};
    for (int a = 0; a < 4; a++) begin
      checks++;
      if (hist[a] < expect_cnt[a] - 200 || hist[a] > expect_cnt[a] + 200) begin
        failures++; $display("FAIL symbol %0d seen %0d times, expected about %0d", a, hist[a], expect_cnt[a]);
      end
    end
    run(500, 8'd0, 8'd255);
    checks++;
    if (hist[2] < 490) begin failures++; $display("FAIL extreme probabilities: %0d", hist[2]); end
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
