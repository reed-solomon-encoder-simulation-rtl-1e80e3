// tb_otn_rs_decoder_paced: the same six-row error scenario as
// tb_otn_rs_decoder, but the line delivers two bytes in every 8 clock cycles
// (two consecutive bytes, then 6 idle cycles), the input rate of the
// reference system at 166 MHz. Errors injected:
//   rows 0 and 3: no errors (bypass expected),
//   rows 1 and 4: 0..8 errors in every codeword, 8 in lanes 0 and 15,
//   row 2:        lane 5 gets 12 errors (uncorrectable), the others 0..4,
//   row 5:        lane 9 gets 9 errors (uncorrectable), the others 0..8.
// Checks: 3824 output bytes per row equal to the transmitted information
// (bytes of uncorrectable lanes excepted), out_sor on each first byte,
// row_uncorr / row_bypass / row_nfix as expected, overrun never set, and
// row_done seen at most 3868 clock edges after the edge that took the row's
// last byte (3867 cycles of read-side work plus the output register).
module tb_otn_rs_decoder_paced;
  import rs_ref_pkg::*;
  localparam int ROWS = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [7:0] in_data = 0, out_data;
  logic out_valid, out_sor, row_done, row_bypass, overrun;
  logic [15:0] row_uncorr, row_nfix;

  sym_t info [ROWS][3824];
  sym_t line [ROWS][4080];
  logic [15:0] exp_unc [ROWS];
  int exp_fix [ROWS];
  int row_out = 0, byte_out = 0, rows_done = 0;
  longint last_in_cyc [ROWS];
  longint cyc = 0;
  int n_bypass = 0, n_unc = 0, n_fixed = 0;

  otn_rs_decoder dut (.clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data, .out_sor,
                      .row_done, .row_uncorr, .row_bypass, .row_nfix, .overrun);
  always #5 clk = ~clk;

  initial begin
    repeat (110000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      automatic int lane = byte_out % 16;
      if (!exp_unc[row_out][lane])
        check(out_data == info[row_out][byte_out],
              $sformatf("row %0d byte %0d got %h exp %h", row_out, byte_out, out_data, info[row_out][byte_out]));
      check(out_sor == (byte_out == 0), "out_sor");
      byte_out++;
      if (byte_out == 3824) begin byte_out = 0; row_out++; end
    end
    if (row_done) begin
      check(row_uncorr == exp_unc[rows_done], $sformatf("row %0d uncorr %h exp %h", rows_done, row_uncorr, exp_unc[rows_done]));
      check(row_bypass == (rows_done % 3 == 0), $sformatf("row %0d bypass", rows_done));
      if (exp_unc[rows_done] == 0)
        check(int'(row_nfix) == exp_fix[rows_done], $sformatf("row %0d nfix %0d exp %0d", rows_done, row_nfix, exp_fix[rows_done]));
      check(cyc - last_in_cyc[rows_done] <= 3868, $sformatf("row %0d latency %0d", rows_done, cyc - last_in_cyc[rows_done]));
      if (row_bypass) n_bypass++;
      if (row_uncorr != 0) n_unc++;
      n_fixed += int'(row_nfix);
      rows_done++;
    end
    check(!overrun, "overrun");
  end

  initial begin
    init();
    for (int r = 0; r < ROWS; r++) begin
      exp_unc[r] = 0;
      exp_fix[r] = 0;
      for (int j = 0; j < 3824; j++) info[r][j] = 8'($urandom);
      for (int c = 0; c < 16; c++) begin
        automatic sym_t msg [239];
        automatic cw_t cw;
        automatic int nerr;
        automatic bit hit [255];
        for (int i = 0; i < 239; i++) msg[i] = info[r][16*i + c];
        make_cw(msg, cw);
        case (r)
          0, 3:    nerr = 0;
          1, 4:    nerr = (c == 0 || c == 15) ? 8 : $urandom_range(0, 8);
          2:       nerr = (c == 5) ? 12 : $urandom_range(0, 4);
          default: nerr = (c == 9) ? 9 : $urandom_range(0, 8);
        endcase
        if (nerr > 8) exp_unc[r][c] = 1'b1;
        for (int p = 0; p < 255; p++) hit[p] = 0;
        for (int k = 0; k < nerr; k++) begin
          automatic int p;
          do p = $urandom_range(0, 254); while (hit[p]);
          hit[p] = 1;
          cw[p] ^= 8'($urandom_range(1, 255));
          if (p < 239) exp_fix[r]++;
        end
        for (int p = 0; p < 255; p++) line[r][16*p + c] = cw[p];
      end
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int r = 0; r < ROWS; r++) begin
      for (int j = 0; j < 4080; j++) begin
        in_valid = 1;
        in_data  = line[r][j];
        @(negedge clk);
        if (j % 2 == 1) begin
          in_valid = 0;
          repeat (6) @(negedge clk);
        end
      end
      last_in_cyc[r] = cyc;
    end
    in_valid = 0;
    repeat (4500) @(negedge clk);
    check(rows_done == ROWS, $sformatf("rows done %0d", rows_done));
    check(row_out == ROWS && byte_out == 0, "all output bytes seen");
    $display("rows bypassed %0d, rows with an uncorrectable codeword %0d, bytes corrected %0d",
             n_bypass, n_unc, n_fixed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
