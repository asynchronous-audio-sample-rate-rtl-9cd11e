// Testbench of asrc_serial_mul: random and corner operands are multiplied
// and compared with the exact product; the time from start to ready must be
// W+1 clk cycles (load plus one cycle per multiplier bit).
module tb_asrc_serial_mul;
  localparam int unsigned W = 32;
  logic           clk = 1'b0, rst = 1'b1, start = 1'b0, ready;
  logic [W-1:0]   a, b;
  logic [2*W-1:0] p;
  int checks = 0, failures = 0;

  asrc_serial_mul #(.W(W)) dut (.clk, .rst, .start, .multiplicand(a), .multiplier(b),
                                .ready, .product(p));

  always #5 clk = ~clk;

  task automatic run(input logic [W-1:0] x, input logic [W-1:0] y);
    int cyc;
    @(negedge clk);
    a = x; b = y; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    a = '0; b = '0;
    cyc = 1;
    while (!ready) begin
      @(negedge clk);
      cyc++;
    end
    checks += 2;
    if (p !== (2*W)'(x) * (2*W)'(y)) begin
      failures++;
      $display("product %0d*%0d = %0d, got %0d", x, y, (2*W)'(x) * (2*W)'(y), p);
    end
    if (cyc != W + 1) begin
      failures++;
      $display("latency %0d, expected %0d", cyc, W + 1);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    run('0, '0);
    run('1, '1);
    run(32'd1, '1);
    run('1, 32'd1);
    run(32'd123456, 32'd7890);
    for (int i = 0; i < 200; i++) run($urandom, $urandom);
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
