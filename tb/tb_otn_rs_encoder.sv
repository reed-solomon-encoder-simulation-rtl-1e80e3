// tb_otn_rs_encoder: three OTU rows of random information bytes, offered with
// random gaps, through the 16-lane row encoder. Each 4080-byte output row is
// checked: bytes 0..3823 equal the input, bytes 3824..4079 are the parity of
// the 16 interleaved codewords from the reference encoder, in interleaved
// order; out_sor and out_parity mark the right bytes; and in_ready is low for
// exactly 256 cycles per row (the parity stall).
module tb_otn_rs_encoder;
  import rs_ref_pkg::*;
  localparam int ROWS = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic [7:0] in_data = 0, out_data;
  logic out_valid, out_sor, out_parity;
  sym_t info [ROWS][3824];
  sym_t got [$];
  logic got_sor [$], got_par [$];
  int stall_cycles = 0;

  otn_rs_encoder dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid,
                      .out_data, .out_sor, .out_parity);
  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && !in_ready) stall_cycles++;
    if (out_valid) begin
      got.push_back(out_data);
      got_sor.push_back(out_sor);
      got_par.push_back(out_parity);
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int r = 0; r < ROWS; r++)
      for (int j = 0; j < 3824; j++) info[r][j] = 8'($urandom);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int r = 0; r < ROWS; r++)
      for (int j = 0; j < 3824; j++) begin
        in_valid = 0;
        while ($urandom % 5 == 0) @(negedge clk);
        in_valid = 1;
        in_data  = info[r][j];
        // in_ready only changes at clock edges: sample it before the edge
        forever begin
          automatic bit rdy = in_ready;
          @(posedge clk);
          if (rdy) break;
          @(negedge clk);
        end
        @(negedge clk);
        in_valid = 0;
      end
    repeat (400) @(negedge clk);
    check(got.size() == ROWS * 4080, $sformatf("output bytes %0d", got.size()));
    check(stall_cycles == ROWS * 256, $sformatf("stall cycles %0d", stall_cycles));
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < 16; c++) begin
        sym_t msg [239];
        par_t p;
        for (int i = 0; i < 239; i++) msg[i] = info[r][16*i + c];
        p = encode(msg);
        for (int k = 0; k < 16; k++) begin
          automatic int idx = r*4080 + 3824 + 16*k + c;
          if (idx < got.size()) begin
            check(got[idx] == p[k], $sformatf("row %0d lane %0d parity %0d", r, c, k));
            check(got_par[idx], "parity flag");
          end
        end
      end
      for (int j = 0; j < 3824; j++) begin
        automatic int idx = r*4080 + j;
        if (idx < got.size()) begin
          check(got[idx] == info[r][j], $sformatf("row %0d byte %0d", r, j));
          check(got_sor[idx] == (j == 0) && !got_par[idx], $sformatf("flags row %0d byte %0d", r, j));
        end
      end
    end
    $display("stall cycles: %0d", stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
