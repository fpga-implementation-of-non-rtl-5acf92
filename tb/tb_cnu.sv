// tb_cnu: drives random GF(4) symbols into a degree-6 check node and checks
// that each registered output is the GF(4) sum of the other five inputs
// (computed here with an explicit addition table), that outputs hold while
// en is low, and that the sum of an output with its own input equals the sum
// of all inputs. A second part checks the XOR probability rule
// p_c = p_a(1-p_b) + p_b(1-p_a) on random bit streams through a degree-3 node.
module tb_cnu;
  import nb_ldpc_pkg::*;
  localparam int DC = 6;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  sym_t in_sym [DC];
  sym_t out_sym [DC];
  cnu #(.DC(DC)) dut (.clk(clk), .rst(rst), .en(en), .in_sym(in_sym), .out_sym(out_sym));

  sym_t a3 [3];
  sym_t o3 [3];
  cnu #(.DC(3)) dut3 (.clk(clk), .rst(rst), .en(en), .in_sym(a3), .out_sym(o3));

  // GF(4) addition table, elements 0, 1, w, w^2 coded as 0..3
  function automatic sym_t gf4_add(sym_t x, sym_t y);
    sym_t tbl [4][4] = '{'{0, 1, 2, 3}, '{1, 0, 3, 2}, '{2, 3, 0, 1}, '{3, 2, 1, 0}};
    return tbl[x][y];
  endfunction

  sym_t exp_out [DC];
  sym_t held [DC];
  int   n_ones, n_samp;

  initial begin
    for (int j = 0; j < DC; j++) in_sym[j] = '0;
    for (int j = 0; j < 3; j++) a3[j] = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    en  <= 1'b1;
    for (int t = 0; t < 500; t++) begin
      for (int j = 0; j < DC; j++) in_sym[j] = sym_t'($urandom_range(0, 3));
      for (int j = 0; j < DC; j++) begin
        exp_out[j] = '0;
        for (int k = 0; k < DC; k++) if (k != j) exp_out[j] = gf4_add(exp_out[j], in_sym[k]);
      end
      @(posedge clk); #1;
      for (int j = 0; j < DC; j++) begin
        checks++;
        if (out_sym[j] !== exp_out[j]) begin
          failures++;
          if (failures < 6) $display("FAIL t=%0d edge %0d got %0d exp %0d", t, j, out_sym[j], exp_out[j]);
        end
      end
    end
    // hold when disabled
    for (int j = 0; j < DC; j++) held[j] = out_sym[j];
    en <= 1'b0;
    for (int t = 0; t < 5; t++) begin
      for (int j = 0; j < DC; j++) in_sym[j] = sym_t'($urandom_range(0, 3));
      @(posedge clk); #1;
      for (int j = 0; j < DC; j++) begin
        checks++; if (out_sym[j] !== held[j]) failures++;
      end
    end
    // probability rule on bit 0 with p_a = 0.25, p_b = 0.5: p_c = 0.5
    // and with p_a = 0.25, p_b = 0.125: p_c = 0.34375
    en <= 1'b1;
    n_ones = 0; n_samp = 4000;
    for (int t = 0; t < n_samp; t++) begin
      a3[0] = '0;
      a3[1] = sym_t'($urandom_range(0, 3) == 0);
      a3[2] = sym_t'($urandom_range(0, 7) == 0);
      @(posedge clk); #1;
      n_ones += int'(o3[0][0]);
    end
    checks++;
    if (n_ones < 1200 || n_ones > 1550) begin
      failures++; $display("FAIL XOR probability: %0d ones in %0d, expected about 1375", n_ones, n_samp);
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
