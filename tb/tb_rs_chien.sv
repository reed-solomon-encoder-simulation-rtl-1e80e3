// tb_rs_chien: error locator polynomials for 0..8 random error positions are
// built by the reference model as prod(1 + X_k x), scaled by a random non-zero
// constant, and loaded into the Chien search. It is stepped through the 255
// positions with random idle cycles. Checks: root is high exactly at the
// error positions, lam_odd equals the odd part of Lambda evaluated at
// alpha^(p+1), and root_cnt equals the number of errors at the end.
module tb_rs_chien;
  import rs_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  gf256_pkg::gf_loc_t lambda;
  logic root;
  logic [7:0] lam_odd, root_cnt;

  rs_chien dut (.clk, .rst_n, .load, .lambda, .step, .root, .lam_odd, .root_cnt);
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
      automatic int nerr = t % 9;
      automatic int pos [$];
      automatic bit is_err [255];
      automatic sym_t lam [9];
      automatic sym_t sc = 8'($urandom_range(1, 255));
      for (int p = 0; p < 255; p++) is_err[p] = 0;
      while (pos.size() < nerr) begin
        automatic int p = $urandom_range(0, 254);
        if (!is_err[p]) begin is_err[p] = 1; pos.push_back(p); end
      end
      locator(pos, lam);
      for (int k = 0; k < 9; k++) lambda[k] = mul(lam[k], sc);
      load = 1;
      @(negedge clk);
      load = 0;
      for (int p = 0; p < 255; p++) begin
        automatic sym_t lo = 0;
        for (int k = 1; k < 9; k += 2) lo ^= mul(lambda[k], apow(k * (p + 1)));
        while ($urandom % 4 == 0) @(negedge clk);
        check(root == is_err[p], $sformatf("t%0d root at %0d", t, p));
        check(lam_odd == lo, $sformatf("t%0d lam_odd at %0d", t, p));
        step = 1;
        @(negedge clk);
        step = 0;
      end
      check(root_cnt == 8'(nerr), $sformatf("t%0d root count %0d", t, root_cnt));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
