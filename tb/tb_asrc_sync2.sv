// Testbench of asrc_sync2: the output must equal the input delayed by
// exactly two clk cycles, and be 0 during reset.
module tb_asrc_sync2;
  logic clk = 1'b0, rst = 1'b1, d = 1'b0, q;
  int   checks = 0, failures = 0;
  logic [1:0] hist;

  asrc_sync2 dut (.clk, .rst, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    if (q !== 1'b0) failures++;
    checks++;
    rst <= 1'b0;
    hist = '0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      if (i >= 2) begin
        checks++;
        if (q !== hist[1]) begin
          failures++;
          $display("mismatch at %0d: q=%0b expected %0b", i, q, hist[1]);
        end
      end
      d = 1'($urandom_range(0, 1));
      hist = {hist[0], d};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
