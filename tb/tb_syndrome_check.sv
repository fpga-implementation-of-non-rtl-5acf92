// tb_syndrome_check: builds the parity check matrix explicitly (circulant
// block (i, j) = identity shifted by i*j mod Z) and compares the number of
// unsatisfied checks and the ok flag with the module for random words, words
// that are codewords by construction (one constant symbol per block column,
// the constants summing to zero), and single symbol errors, on a small
// instance (Z = 7) and on the default 504-symbol instance.
module tb_syndrome_check;
  import nb_ldpc_pkg::*;
  localparam int Z = 7, DV = 3, DC = 6, N = DC * Z, M = DV * Z;
  localparam int ZF = 84, NF = DC * ZF, MF = DV * ZF;
  int checks = 0, failures = 0;

  sym_t x [N];
  logic ok;
  logic [$clog2(M+1)-1:0] n_unsat;
  syndrome_check #(.Z(Z), .DV(DV), .DC(DC)) dut (.x(x), .ok(ok), .n_unsat(n_unsat));

  sym_t xf [NF];
  logic okf;
  logic [$clog2(MF+1)-1:0] n_unsat_f;
  syndrome_check dutf (.x(xf), .ok(okf), .n_unsat(n_unsat_f));

  function automatic int ref_unsat(input sym_t w [N]);
    int cnt = 0;
    sym_t s;
    for (int i = 0; i < DV; i++)
      for (int r = 0; r < Z; r++) begin
        s = '0;
        for (int j = 0; j < DC; j++)
          for (int k = 0; k < Z; k++)
            if (k == (r + i * j) % Z) s ^= w[j * Z + k];
        if (s != 0) cnt++;
      end
    return cnt;
  endfunction

  task automatic compare(input string what);
    int e;
    #1;
    e = ref_unsat(x);
    checks++;
    if (int'(n_unsat) != e || ok !== (e == 0)) begin
      failures++;
      if (failures < 6) $display("FAIL %s: n_unsat=%0d ok=%0b exp %0d", what, n_unsat, ok, e);
    end
  endtask

  sym_t cst [DC];
  int   pos;

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int v = 0; v < N; v++) x[v] = sym_t'($urandom_range(0, 3));
      compare("random");
    end
    for (int t = 0; t < 50; t++) begin
      cst[DC-1] = '0;
      for (int j = 0; j < DC - 1; j++) begin
        cst[j] = sym_t'($urandom_range(0, 3));
        cst[DC-1] ^= cst[j];
      end
      for (int v = 0; v < N; v++) x[v] = cst[v / Z];
      compare("codeword");
      checks++; if (!ok) failures++;
      pos = $urandom_range(0, N - 1);
      x[pos] ^= sym_t'($urandom_range(1, 3));
      compare("single error");
    end
    // default size: zero word, then one error hits DV distinct checks
    for (int v = 0; v < NF; v++) xf[v] = '0;
    #1 checks++;
    if (!okf || n_unsat_f != 0) begin failures++; $display("FAIL full-size zero word"); end
    for (int t = 0; t < 20; t++) begin
      pos = $urandom_range(0, NF - 1);
      xf[pos] = sym_t'($urandom_range(1, 3));
      #1 checks++;
      if (okf || int'(n_unsat_f) != DV) begin
        failures++; $display("FAIL full-size single error at %0d: %0d unsatisfied", pos, n_unsat_f);
      end
      xf[pos] = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
