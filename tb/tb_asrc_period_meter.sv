// Testbench of asrc_period_meter: word clock edges with known periods
// (constant, then alternating) must give the exact accumulated period and
// count, the partial period before the first edge and the first full
// period being discarded; clear must zero both and
// nothing may accumulate while en is low.
module tb_asrc_period_meter;
  logic        clk = 1'b0, rst = 1'b1, clear = 1'b0, en = 1'b0, rise = 1'b0;
  logic [31:0] t_acc, t_cnt;
  int checks = 0, failures = 0;

  asrc_period_meter #(.ACC_W(32)) dut (.clk, .rst, .clear, .en, .wclk_rise(rise),
                                       .t_acc, .t_cnt);

  always #5 clk = ~clk;

  task automatic edges(input int n, input int p0, input int p1);
    for (int i = 0; i < n; i++) begin
      @(negedge clk) rise = 1'b1;
      @(negedge clk) rise = 1'b0;
      repeat (((i % 2) ? p1 : p0) - 2) @(negedge clk);
    end
  endtask

  task automatic expect_vals(input longint acc, input longint cnt);
    checks += 2;
    if (t_acc != 32'(acc)) begin failures++; $display("t_acc %0d expected %0d", t_acc, acc); end
    if (t_cnt != 32'(cnt)) begin failures++; $display("t_cnt %0d expected %0d", t_cnt, cnt); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    repeat (17) @(negedge clk);       // partial period before the first edge
    en = 1'b1;
    edges(12, 40, 40);                // 11 full periods, the first dropped
    @(negedge clk);
    expect_vals(400, 10);
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    expect_vals(0, 0);
    edges(21, 33, 34);                // 20 periods: 10 of 33, 10 of 34
    @(negedge clk);
    expect_vals(637, 19);
    en = 1'b0;
    edges(5, 50, 50);
    expect_vals(637, 19);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
