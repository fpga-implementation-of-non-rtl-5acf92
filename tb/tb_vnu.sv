// tb_vnu: runs a degree-3 variable node with 8-deep edge memories against a
// reference model kept in this testbench (one queue of recent regenerative
// symbols per edge). Checks every edge output, the decision stream, the
// initial fill while init is high, and that both the regenerative path and
// the edge-memory path were exercised.
module tb_vnu;
  import nb_ldpc_pkg::*;
  localparam int DV = 3;
  localparam int D  = 8;
  localparam int AW = 3;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0, init = 1'b0;
  int   checks = 0, failures = 0;
  int   n_regen = 0, n_em = 0, n_dec = 0;
  always #5 clk = ~clk;

  sym_t          ch_sym;
  sym_t          chk_sym [DV];
  logic [AW-1:0] rd_addr [DV];
  sym_t          out_sym [DV];
  logic          dec_valid;
  sym_t          dec_sym;

  vnu #(.DV(DV), .EM_DEPTH(D)) dut (
    .clk(clk), .rst(rst), .en(en), .init(init), .ch_sym(ch_sym), .chk_sym(chk_sym),
    .rd_addr(rd_addr), .out_sym(out_sym), .dec_valid(dec_valid), .dec_sym(dec_sym));

  sym_t em [DV][$];
  sym_t exp_out [DV];
  logic exp_dv;
  logic same;

  task automatic drive_random();
    ch_sym = sym_t'($urandom_range(0, 3));
    for (int i = 0; i < DV; i++) begin
      // mostly agree with the channel so the regenerative path is common
      chk_sym[i] = ($urandom_range(0, 9) < 7) ? ch_sym : sym_t'($urandom_range(0, 3));
      rd_addr[i] = AW'($urandom);
    end
  endtask

  task automatic step_model();
    exp_dv = !init;
    for (int i = 0; i < DV; i++) if (chk_sym[i] != ch_sym) exp_dv = 1'b0;
    for (int i = 0; i < DV; i++) begin
      same = 1'b1;
      for (int k = 0; k < DV; k++) if (k != i && chk_sym[k] != ch_sym) same = 1'b0;
      if (init || same) begin
        exp_out[i] = ch_sym;
        em[i].push_front(ch_sym);
        void'(em[i].pop_back());
        if (!init) n_regen++;
      end else begin
        exp_out[i] = em[i][rd_addr[i]];
        n_em++;
      end
    end
  endtask

  initial begin
    ch_sym = '0;
    for (int i = 0; i < DV; i++) begin chk_sym[i] = '0; rd_addr[i] = '0; end
    for (int i = 0; i < DV; i++) for (int d = 0; d < D; d++) em[i].push_back(sym_t'(0));
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    en = 1'b1;
    for (int t = 0; t < 1500; t++) begin
      init = (t < D);
      drive_random();
      step_model();
      @(posedge clk); #1;
      for (int i = 0; i < DV; i++) begin
        checks++;
        if (out_sym[i] !== exp_out[i]) begin
          failures++;
          if (failures < 6) $display("FAIL t=%0d edge %0d got %0d exp %0d", t, i, out_sym[i], exp_out[i]);
        end
      end
      checks++;
      if (dec_valid !== exp_dv || (exp_dv && dec_sym !== ch_sym)) begin
        failures++;
        if (failures < 6) $display("FAIL t=%0d decision %0b/%0d exp %0b/%0d", t, dec_valid, dec_sym, exp_dv, ch_sym);
      end
      if (exp_dv) n_dec++;
    end
    checks++;
    if (n_regen == 0 || n_em == 0 || n_dec == 0) begin
      failures++; $display("FAIL paths not exercised regen=%0d em=%0d dec=%0d", n_regen, n_em, n_dec);
    end
    $display("regenerative=%0d edge-memory=%0d decisions=%0d", n_regen, n_em, n_dec);
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
