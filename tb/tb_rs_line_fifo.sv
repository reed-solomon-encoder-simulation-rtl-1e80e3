// tb_rs_line_fifo: fills the 4080-byte row FIFO completely with random data
// (full must rise exactly then), reads it back in order (one-cycle read
// latency, rvalid), then mixes random pushes and pops against a queue model,
// and checks that clear empties the buffer.
module tb_rs_line_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, push = 0, pop = 0;
  logic [7:0] wdata = 0, rdata;
  logic rvalid, full, empty;
  logic [12:0] count;
  logic [7:0] model [$];
  logic [7:0] exp_q [$];

  rs_line_fifo dut (.clk, .rst_n, .clear, .push, .wdata, .pop, .rdata, .rvalid,
                    .count, .full, .empty);
  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // compare read data one cycle after each pop
  always @(posedge clk) begin
    if (rvalid) begin
      check(exp_q.size() > 0 && rdata == exp_q[0], "read data");
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
  end

  task automatic cycle(bit ps, bit pp);
    @(negedge clk);
    push = ps && !full;
    pop  = pp && !empty;
    wdata = 8'($urandom);
    if (pop) exp_q.push_back(model.pop_front());
    if (push) model.push_back(wdata);
    @(posedge clk);
    #1;
    push = 0; pop = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    check(empty && count == 0, "empty after reset");
    for (int i = 0; i < 4080; i++) begin
      check(!full, "not full before 4080");
      cycle(1, 0);
    end
    check(full && count == 4080, "full at 4080");
    for (int i = 0; i < 4080; i++) cycle(0, 1);
    @(negedge clk);
    check(empty, "empty after draining");
    for (int i = 0; i < 6000; i++) cycle($urandom % 2, $urandom % 3 == 0);
    check(count == 13'(model.size()), "count matches model");
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    model.delete();
    check(empty && count == 0, "empty after clear");
    for (int i = 0; i < 50; i++) cycle(1, 0);
    for (int i = 0; i < 50; i++) cycle(0, 1);
    repeat (3) @(negedge clk);
    check(exp_q.size() == 0, "all reads seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
