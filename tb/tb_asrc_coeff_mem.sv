// Testbench of asrc_coeff_mem: the interpolated coefficient for random and
// special addresses must match a reference built here from the closed form
// of the Kaiser-windowed sinc (own Bessel series, evaluated independently of
// the ROM), to within a few LSB of the 24-bit table; the peak must be
// 2**23-1, zero crossings must be near zero, and the result must appear two
// cycles after the address.
module tb_asrc_coeff_mem;
  logic               clk = 1'b0;
  logic [33:0]        addr = '0;
  logic signed [33:0] coeff;
  int checks = 0, failures = 0;

  asrc_coeff_mem dut (.clk, .coeff_addr(addr), .coeff);

  always #5 clk = ~clk;

  function automatic real i0(input real x);
    real s = 1.0, t = 1.0;
    for (int m = 1; m < 80; m++) begin
      t = t * (x * x) / (4.0 * m * m);
      s = s + t;
    end
    return s;
  endfunction

  function automatic real href(input int k);
    real x = 3.141592653589793 * k / 1024.0;
    real r = k / 16383.0;
    real sn = (k == 0) ? 1.0 : $sin(x) / x;
    return $floor(8388607.0 * sn * i0(14.4 * $sqrt(1.0 - r * r)) / i0(14.4) + 0.5);
  endfunction

  // expected coefficient (in units of 2**-33) for a Q4.30 address
  function automatic real cref(input logic [33:0] a);
    int  i = int'(a[33:20]);
    real d = real'(a[19:0]) / 1048576.0;
    real h0 = href(i), h1 = href(i + 1);
    return (h0 + d * (h1 - h0)) * 1024.0;
  endfunction

  task automatic check_addr(input logic [33:0] a, input real tol);
    real e;
    @(negedge clk) addr = a;
    @(negedge clk) addr = '0;
    @(negedge clk);
    e = cref(a);
    checks++;
    if ((real'(coeff) - e) > tol || (e - real'(coeff)) > tol) begin
      failures++;
      $display("addr %0h: coeff %0d expected %f", a, coeff, e);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    check_addr('0, 0.5);
    checks++;
    if (coeff !== 34'(8388607) <<< 10) begin failures++; $display("peak %0d", coeff); end
    // zero crossings of the sinc: table entries 1024*n
    for (int n = 1; n < 16; n++) begin
      check_addr(34'(n * 1024) << 20, 2048.0);
      checks++;
      if (coeff > 34'sd2048 || coeff < -34'sd2048) begin
        failures++;
        $display("zero %0d not near zero: %0d", n, coeff);
      end
    end
    for (int i = 0; i < 400; i++)
      check_addr({4'($urandom_range(0, 15)), 10'($urandom), 20'($urandom)} & 34'h3_FFEF_FFFF, 2048.0);
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
