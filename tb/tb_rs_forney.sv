// tb_rs_forney: for random patterns of 1..8 errors the reference model builds
// Lambda = prod(1 + X_k x) and Omega = S(x)Lambda(x) mod x^8 from the
// syndromes of the error pattern. Omega is loaded into the error evaluator,
// which is stepped through the 255 positions while the testbench supplies
// root and Lambda_odd for each position (the locator's outputs). Checks that
// err equals the injected error value at every error position and is zero
// everywhere else.
module tb_rs_forney;
  import rs_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, step = 0, root = 0;
  logic [7:0] lam_odd = 0, err;
  gf256_pkg::gf_eval_t omega;

  rs_forney dut (.clk, .rst_n, .load, .omega, .step, .root, .lam_odd, .err);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    init();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      automatic int nerr = 1 + t % 8;
      automatic int pos [$];
      automatic cw_t e;
      automatic sym_t lam [9];
      automatic sym_t s [16];
      for (int p = 0; p < 255; p++) e[p] = 0;
      while (pos.size() < nerr) begin
        automatic int p = $urandom_range(0, 254);
        if (e[p] == 0) begin e[p] = 8'($urandom_range(1, 255)); pos.push_back(p); end
      end
      locator(pos, lam);
      for (int i = 0; i < 16; i++) s[i] = syndrome(e, i);
      for (int k = 0; k < 8; k++) begin
        omega[k] = 0;
        for (int j = 0; j <= k; j++) omega[k] ^= mul(lam[j], s[k-j]);
      end
      load = 1;
      @(negedge clk);
      load = 0;
      for (int p = 0; p < 255; p++) begin
        automatic sym_t x = apow(p + 1);
        automatic sym_t lv = 0, lo = 0;
        for (int k = 0; k < 9; k++) begin
          lv ^= mul(lam[k], apow(k * (p + 1)));
          if (k % 2 == 1) lo ^= mul(lam[k], apow(k * (p + 1)));
        end
        root = (lv == 0);
        lam_odd = lo;
        #1;
        check(err == e[p], $sformatf("t%0d pos %0d err %h exp %h (x=%h)", t, p, err, e[p], x));
        step = 1;
        @(negedge clk);
        step = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
