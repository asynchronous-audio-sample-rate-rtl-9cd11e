// Testbench of asrc_serial_div at its ratio-estimator width (94 bits):
// unsigned divisions of the kind used for rho (64-bit product shifted by
// 30 bits over a 64-bit product), signed divisions with both signs, and
// corner cases, compared with the language's own division. The time from
// start to ready must be W+1 cycles.
module tb_asrc_serial_div;
  localparam int unsigned W = 94;
  logic         clk = 1'b0, rst = 1'b1, start = 1'b0, sign = 1'b0, ready;
  logic [W-1:0] a, b, q;
  int checks = 0, failures = 0;

  asrc_serial_div #(.W(W)) dut (.clk, .rst, .start, .sign, .dividend(a), .divisor(b),
                                .ready, .quotient(q));

  always #5 clk = ~clk;

  task automatic run(input logic [W-1:0] x, input logic [W-1:0] y, input logic sg);
    int cyc;
    logic [W-1:0] expq;
    if (sg) expq = W'($signed(x) / $signed(y));
    else    expq = x / y;
    @(negedge clk);
    a = x; b = y; sign = sg; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!ready) begin
      @(negedge clk);
      cyc++;
    end
    checks += 2;
    if (q !== expq) begin
      failures++;
      $display("div %0h / %0h sign=%0b: expected %0h got %0h", x, y, sg, expq, q);
    end
    if (cyc != W + 1) begin
      failures++;
      $display("latency %0d, expected %0d", cyc, W + 1);
    end
  endtask

  function automatic logic [W-1:0] rnd();
    return {$urandom, $urandom, $urandom};
  endfunction

  initial begin
    logic [63:0] p1, p2;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    run(W'(100), W'(7), 1'b0);
    run(W'(7), W'(100), 1'b0);
    run(W'(-100), W'(7), 1'b1);
    run(W'(100), W'(-7), 1'b1);
    run(W'(-100), W'(-7), 1'b1);
    for (int i = 0; i < 60; i++) begin
      p1 = {$urandom_range(0, 2**20), $urandom};
      p2 = p1 + 64'($urandom_range(0, 2**16)) - 64'(2**15);
      run({p1, 30'b0}, W'(p2), 1'b0);
      run(rnd(), W'($urandom_range(1, 2**30)), 1'b0);
      run(rnd(), W'($urandom_range(1, 5000)), 1'b1);
      run(W'($signed(-(64'($urandom)))), W'($urandom_range(1, 5000)), 1'b1);
    end
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
