// tb_rs_g709_top: end-to-end test of the G.709 FEC at full size (16 lanes,
// 4080-byte rows). Random information bytes go into the transmit encoder
// with random gaps; its 4080-byte rows pass through a channel model that
// XORs in symbol errors and go straight into the receive decoder. Five rows:
//   row 0: no errors                         -> decoder bypass
//   row 1: 8 errors in every codeword        -> all corrected
//   row 2: 1..6 errors per codeword, lane 7 gets 10 -> lane 7 uncorrectable
//   row 3: no errors                         -> bypass (other bank)
//   row 4: 0..8 errors per codeword, some in the parity bytes
// Checks every decoded information byte against the transmitted one (except
// in codewords with more than 8 errors), the per-row status, and the
// transmit stall. Each mechanism must occur at least once: transmit stall,
// bypass, correction, uncorrectable codeword, and use of both receive banks.
module tb_rs_g709_top;
  import rs_ref_pkg::*;
  localparam int ROWS = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic tx_in_valid = 0, tx_in_ready, tx_out_valid, tx_out_sor, tx_out_parity;
  logic [7:0] tx_in_data = 0, tx_out_data;
  logic rx_in_valid = 0;
  logic [7:0] rx_in_data = 0, rx_out_data;
  logic rx_out_valid, rx_out_sor, rx_row_done, rx_row_bypass, rx_overrun;
  logic [15:0] rx_row_uncorr, rx_row_nfix;

  sym_t info [ROWS][3824];
  sym_t errv [ROWS][4080];
  logic [15:0] exp_unc [ROWS];
  int exp_fix [ROWS];
  int tx_row = 0, tx_byte = 0, rx_row = 0, rx_byte = 0, rows_done = 0;
  int n_stall = 0, n_bypass = 0, n_fixed = 0, n_unc = 0, n_bank [2] = '{0, 0};

  rs_g709_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // channel: transmitted row bytes plus injected errors, one cycle later
  always @(posedge clk) begin
    rx_in_valid <= 1'b0;
    if (rst_n && !tx_in_ready) n_stall++;
    if (tx_out_valid && tx_row < ROWS) begin
      check(tx_out_sor == (tx_byte == 0), "tx start of row");
      if (tx_byte < 3824) check(tx_out_data == info[tx_row][tx_byte], "tx information byte");
      rx_in_valid <= 1'b1;
      rx_in_data  <= tx_out_data ^ errv[tx_row][tx_byte];
      tx_byte++;
      if (tx_byte == 4080) begin tx_byte = 0; tx_row++; end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (rx_out_valid) begin
      if (!exp_unc[rx_row][rx_byte % 16])
        check(rx_out_data == info[rx_row][rx_byte],
              $sformatf("row %0d byte %0d got %h exp %h", rx_row, rx_byte, rx_out_data, info[rx_row][rx_byte]));
      check(rx_out_sor == (rx_byte == 0), "rx start of row");
      rx_byte++;
      if (rx_byte == 3824) begin rx_byte = 0; rx_row++; end
    end
    if (rx_row_done) begin
      check(rx_row_uncorr == exp_unc[rows_done], $sformatf("row %0d uncorr %h", rows_done, rx_row_uncorr));
      check(rx_row_bypass == (rows_done == 0 || rows_done == 3), $sformatf("row %0d bypass", rows_done));
      if (exp_unc[rows_done] == 0)
        check(int'(rx_row_nfix) == exp_fix[rows_done], $sformatf("row %0d nfix %0d exp %0d", rows_done, rx_row_nfix, exp_fix[rows_done]));
      if (rx_row_bypass) n_bypass++;
      if (rx_row_uncorr != 0) n_unc++;
      n_fixed += int'(rx_row_nfix);
      n_bank[rows_done % 2]++;
      rows_done++;
    end
    check(!rx_overrun, "overrun");
  end

  initial begin
    init();
    for (int r = 0; r < ROWS; r++) begin
      exp_unc[r] = 0;
      exp_fix[r] = 0;
      for (int j = 0; j < 3824; j++) info[r][j] = 8'($urandom);
      for (int j = 0; j < 4080; j++) errv[r][j] = 0;
      for (int c = 0; c < 16; c++) begin
        automatic int nerr;
        case (r)
          0, 3:    nerr = 0;
          1:       nerr = 8;
          2:       nerr = (c == 7) ? 10 : $urandom_range(1, 6);
          default: nerr = $urandom_range(0, 8);
        endcase
        if (nerr > 8) exp_unc[r][c] = 1'b1;
        for (int k = 0; k < nerr; k++) begin
          automatic int p;
          do p = (r == 4 && k == 0) ? $urandom_range(239, 254) : $urandom_range(0, 254);
          while (errv[r][16*p + c] != 0);
          errv[r][16*p + c] = 8'($urandom_range(1, 255));
          if (p < 239) exp_fix[r]++;
        end
      end
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int r = 0; r < ROWS; r++)
      for (int j = 0; j < 3824; j++) begin
        tx_in_valid = 0;
        while ($urandom % 16 == 0) @(negedge clk);
        tx_in_valid = 1;
        tx_in_data  = info[r][j];
        forever begin
          automatic bit rdy = tx_in_ready;
          @(posedge clk);
          if (rdy) break;
          @(negedge clk);
        end
        @(negedge clk);
        tx_in_valid = 0;
      end
    repeat (5000) @(negedge clk);
    check(rows_done == ROWS, $sformatf("rows done %0d", rows_done));
    check(rx_row == ROWS && rx_byte == 0, "all decoded bytes seen");
    $display("mechanisms: tx stall cycles %0d, bypassed rows %0d, corrected bytes %0d, rows with uncorrectable codeword %0d, rows via bank A %0d / bank B %0d",
             n_stall, n_bypass, n_fixed, n_unc, n_bank[0], n_bank[1]);
    check(n_stall > 0, "transmit stall happened");
    check(n_bypass > 0, "bypass happened");
    check(n_fixed > 0, "correction happened");
    check(n_unc > 0, "uncorrectable codeword reported");
    check(n_bank[0] > 0 && n_bank[1] > 0, "both receive banks used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
