// tb_edge_memory: writes random symbols, keeps a reference queue of the
// DEPTH most recent writes and checks every address read against it; also
// checks that nothing changes without a write and that random addresses pick
// the stored symbols with the expected frequencies.
module tb_edge_memory;
  import nb_ldpc_pkg::*;
  localparam int DEPTH = 8;
  localparam int AW = 3;
  logic clk = 1'b0, rst = 1'b1;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic          wr_en;
  sym_t          wr_sym, rd_sym;
  logic [AW-1:0] rd_addr;

  edge_memory #(.DEPTH(DEPTH)) dut (.clk(clk), .rst(rst), .wr_en(wr_en), .wr_sym(wr_sym),
                                    .rd_addr(rd_addr), .rd_sym(rd_sym));

  sym_t ref_q [$];
  int   hist [4];

  initial begin
    wr_en = 1'b0; wr_sym = '0; rd_addr = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk); #1;
    for (int d = 0; d < DEPTH; d++) ref_q.push_back(sym_t'(0));
    for (int t = 0; t < 400; t++) begin
      wr_en  = ($urandom_range(0, 3) != 0);
      wr_sym = sym_t'($urandom_range(0, 3));
      @(posedge clk); #1;
      if (wr_en) begin
        ref_q.push_front(wr_sym);
        void'(ref_q.pop_back());
      end
      wr_en = 1'b0;
      for (int d = 0; d < DEPTH; d++) begin
        rd_addr = AW'(d);
        #1;
        checks++;
        if (rd_sym !== ref_q[d]) begin
          failures++;
          if (failures < 5) $display("FAIL t=%0d addr %0d got %0d exp %0d", t, d, rd_sym, ref_q[d]);
        end
      end
    end
    // fill with 6 x symbol 3 and 2 x symbol 1; random reads give about 3:1
    wr_en = 1'b1;
    for (int d = 0; d < DEPTH; d++) begin
      wr_sym = (d < 2) ? sym_t'(1) : sym_t'(3);
      @(posedge clk); #1;
    end
    wr_en = 1'b0;
    for (int a = 0; a < 4; a++) hist[a] = 0;
    for (int t = 0; t < 4000; t++) begin
      rd_addr = AW'($urandom);
      #1 hist[rd_sym]++;
    end
    checks++;
    if (hist[3] < 2800 || hist[3] > 3200 || hist[1] + hist[3] != 4000) begin
      failures++; $display("FAIL random read frequencies %0d %0d", hist[1], hist[3]);
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
