// tb_rs_encoder: random messages through one RS(255,239) encoder.
// Checks that the 239 data symbols pass unchanged, that the 16 parity
// symbols equal the reference long-division result, that every syndrome of
// the produced codeword is zero, and that parity_phase rises after exactly
// 239 symbols and falls after 255. Enables are random to check that the
// encoder only advances on en.
module tb_rs_encoder;
  import rs_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0] din = 0, dout;
  logic parity_phase;

  rs_encoder dut (.clk, .rst_n, .en, .din, .dout, .parity_phase);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    sym_t msg [239];
    par_t par;
    cw_t  cw;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int w = 0; w < 6; w++) begin
      for (int i = 0; i < 239; i++) msg[i] = (w == 0) ? 8'(i + 1) : 8'($urandom);
      par = encode(msg);
      for (int p = 0; p < 255; p++) begin
        // random idle cycles
        while ($urandom % 4 == 0) begin
          @(negedge clk); en = 0;
        end
        @(negedge clk);
        en  = 1;
        din = (p < 239) ? msg[p] : 8'($urandom);
        #1;
        check(parity_phase == (p >= 239), $sformatf("parity_phase at %0d", p));
        if (p < 239) check(dout == msg[p], $sformatf("data %0d", p));
        else         check(dout == par[p-239], $sformatf("w%0d parity %0d got %h exp %h", w, p-239, dout, par[p-239]));
        cw[p] = dout;
      end
      @(negedge clk); en = 0;
      for (int i = 0; i < 16; i++) check(syndrome(cw, i) == 0, $sformatf("syndrome %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
