// tb_otn_lane_counter: steps the row sequencer through two full rows with
// random idle cycles and compares lane, position and all flags with the byte
// index j of the row (lane = j mod 16, position = j div 16). Also checks that
// clear returns to byte 0.
module tb_otn_lane_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, step = 0;
  logic [3:0] lane;
  logic [7:0] pos;
  logic first, last_info, is_parity, last;

  otn_lane_counter dut (.clk, .rst_n, .clear, .step, .lane, .pos, .first,
                        .last_info, .is_parity, .last);
  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_byte(int j);
    checks++;
    if (lane != 4'(j % 16) || pos != 8'(j / 16) || first != (j == 0) ||
        last_info != (j == 3823) || is_parity != (j >= 3824) || last != (j == 4079)) begin
      failures++;
      $display("FAIL j=%0d lane=%0d pos=%0d f=%b li=%b p=%b l=%b", j, lane, pos, first,
               last_info, is_parity, last);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int r = 0; r < 2; r++)
      for (int j = 0; j < 4080; j++) begin
        step = 0;
        while ($urandom % 8 == 0) begin
          @(negedge clk);
        end
        expect_byte(j);
        step = 1;
        @(negedge clk);
        step = 0;
      end
    expect_byte(0);
    for (int j = 0; j < 100; j++) begin step = 1; @(negedge clk); end
    step = 0;
    expect_byte(100);
    clear = 1; @(negedge clk); clear = 0;
    expect_byte(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
