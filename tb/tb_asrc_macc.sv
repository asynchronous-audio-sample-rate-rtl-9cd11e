// Testbench of asrc_macc: bursts of random samples and coefficients with
// first/valid flags, closed by a done flag, must give
//   round(h_step * sum(sample*coeff) / 2**63), saturated to 24 bits,
// computed here with wide integer arithmetic; y_valid must pulse exactly two
// cycles after done, and the output must not change between dones. Bursts
// include bubbles (cycles without valid), a large-gain case that saturates,
// and h_step values below and at 0.875.
module tb_asrc_macc;
  logic               clk = 1'b0, rst = 1'b1;
  logic signed [23:0] s_data = '0, y;
  logic signed [33:0] coeff = '0;
  logic               first = 1'b0, valid = 1'b0, done = 1'b0, y_valid;
  logic [30:0]        h_step = '0;
  int checks = 0, failures = 0, nsat = 0;

  asrc_macc dut (.clk, .rst, .s_data, .coeff, .first_addr(first), .addr_valid(valid),
                 .addr_done(done), .h_step, .audio_out(y), .y_valid);

  always #5 clk = ~clk;

  task automatic burst(input int n, input logic [30:0] hs, input bit big);
    logic signed [127:0] acc, expv;
    int wait_cyc;
    acc = '0;
    h_step = hs;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      s_data = big ? 24'sh7F_0000 : 24'($urandom);
      coeff  = big ? 34'sh1_0000_0000 : 34'($signed(32'($urandom)));
      first  = (i == 0);
      valid  = 1'b1;
      acc    = acc + 128'(s_data) * 128'(coeff);
      if ($urandom_range(0, 4) == 0) begin
        @(negedge clk);
        first = 1'b0; valid = 1'b0;
      end
    end
    @(negedge clk);
    first = 1'b0; valid = 1'b0; done = 1'b1;
    @(negedge clk);
    done = 1'b0;
    expv = (64'(acc) * $signed({97'b0, hs}) + (128'sd1 <<< 62)) >>> 63;
    if (expv > 128'sd8388607)       begin expv = 128'sd8388607;  nsat++; end
    else if (expv < -128'sd8388608) begin expv = -128'sd8388608; nsat++; end
    wait_cyc = 1;
    while (!y_valid) begin
      @(negedge clk);
      wait_cyc++;
    end
    checks += 2;
    if (y !== 24'(expv)) begin
      failures++;
      $display("output %0d expected %0d", y, expv);
    end
    if (wait_cyc != 2) begin
      failures++;
      $display("y_valid %0d cycles after done", wait_cyc);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (y !== 24'(expv)) begin failures++; $display("output changed without done"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int i = 0; i < 100; i++)
      burst($urandom_range(1, 40), (i % 2) ? 31'h3800_0000 : 31'($urandom_range(1 << 24, 31'h3800_0000)), 1'b0);
    burst(64, 31'h3800_0000, 1'b1);
    checks++;
    if (nsat == 0) begin failures++; $display("saturation never exercised"); end
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
