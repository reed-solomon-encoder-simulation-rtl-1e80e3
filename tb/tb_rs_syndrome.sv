// tb_rs_syndrome: random RS(255,239) codewords with 0..10 random symbol
// errors are fed, with random gaps, to the syndrome calculator; back-to-back
// codewords check that start restarts the accumulation. All 16 syndromes are
// compared with direct evaluation r(alpha^i) by the reference model, and the
// zero flag with "no errors". Each codeword takes 255 enabled cycles.
module tb_rs_syndrome;
  import rs_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, start = 0;
  logic [7:0] din = 0;
  gf256_pkg::gf_vec_par_t synd;
  logic zero;

  rs_syndrome dut (.clk, .rst_n, .en, .start, .din, .synd, .zero);
  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sym_t msg [239];
    cw_t cw;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int w = 0; w < 30; w++) begin
      automatic int nerr = (w % 3 == 0) ? 0 : $urandom_range(1, 10);
      for (int i = 0; i < 239; i++) msg[i] = 8'($urandom);
      make_cw(msg, cw);
      for (int e = 0; e < nerr; e++) cw[$urandom_range(0, 254)] ^= 8'($urandom_range(1, 255));
      for (int p = 0; p < 255; p++) begin
        en = 0;
        while ($urandom % 6 == 0) @(negedge clk);
        en = 1; start = (p == 0); din = cw[p];
        @(negedge clk);
      end
      en = 0;
      begin
        automatic bit allz = 1;
        for (int i = 0; i < 16; i++) begin
          automatic sym_t s = syndrome(cw, i);
          if (s != 0) allz = 0;
          checks++;
          if (synd[i] != s) begin failures++; $display("FAIL w%0d S%0d got %h exp %h", w, i, synd[i], s); end
        end
        checks++;
        if (zero != allz) begin failures++; $display("FAIL zero flag w%0d", w); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
