// tb_rs_bm: random error patterns of 0..8 symbol errors in a 255-symbol
// codeword; their 16 syndromes (reference model) drive the key equation
// solver. Checks: deg equals the number of errors and fail is low; Lambda
// vanishes at X^-1 of every error location and Lambda_0 is non-zero; the
// Forney ratio Omega(X^-1)/Lambda_odd(X^-1) computed from the outputs gives
// back each error value; done arrives exactly 25 cycles after start. Patterns
// of 9..12 errors are also run and how often fail is raised is reported.
module tb_rs_bm;
  import rs_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  gf256_pkg::gf_vec_par_t synd;
  logic busy, done, fail;
  gf256_pkg::gf_loc_t  lambda;
  gf256_pkg::gf_eval_t omega;
  logic [4:0] deg;
  int n_fail_big = 0, n_big = 0;

  rs_bm dut (.clk, .rst_n, .start, .synd, .busy, .done, .lambda, .omega, .deg, .fail);
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

  function automatic sym_t ev(sym_t x, bit odd_only, bit use_omega);
    sym_t acc = 0;
    int n = use_omega ? 8 : 9;
    for (int k = 0; k < n; k++)
      if (!odd_only || (k % 2 == 1))
        acc ^= mul(use_omega ? omega[k] : lambda[k], apow(k * (log_t[x])));
    return acc;
  endfunction

  initial begin
    init();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      automatic int nerr = (t < 270) ? (t % 9) : $urandom_range(9, 12);
      automatic int pos [$];
      automatic cw_t e;
      automatic int cyc = 0;
      for (int p = 0; p < 255; p++) e[p] = 0;
      while (pos.size() < nerr) begin
        automatic int p = $urandom_range(0, 254);
        if (e[p] == 0) begin
          e[p] = 8'($urandom_range(1, 255));
          pos.push_back(p);
        end
      end
      for (int i = 0; i < 16; i++) synd[i] = syndrome(e, i);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      if (nerr <= 8) begin
        check(cyc == 25, $sformatf("latency %0d", cyc));
        check(deg == 5'(nerr) && !fail, $sformatf("t%0d deg %0d exp %0d", t, deg, nerr));
        check(lambda[0] != 0, "Lambda_0 non-zero");
        foreach (pos[j]) begin
          automatic sym_t xi = apow(pos[j] + 1);   // X^-1
          automatic sym_t lo = ev(xi, 1, 0);
          check(ev(xi, 0, 0) == 0, $sformatf("t%0d root at %0d", t, pos[j]));
          check(lo != 0 && mul(ev(xi, 0, 1), inv(lo)) == e[pos[j]],
                $sformatf("t%0d value at %0d", t, pos[j]));
        end
      end else begin
        n_big++;
        if (fail) n_fail_big++;
      end
      @(negedge clk);
    end
    $display("beyond t: %0d of %0d patterns give deg > 8", n_fail_big, n_big);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
