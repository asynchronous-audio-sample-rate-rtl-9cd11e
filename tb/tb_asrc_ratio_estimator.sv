// Testbench of asrc_ratio_estimator. Word clocks are generated as clk-cycle
// counts with fractional periods (an accumulator decides each edge), so
// the true ratio is known exactly: input period 160.37 cycles, output period
// 147.0 cycles. Checks:
//   * sync rises after sync_cycles plus the multiply/divide sequence, and the
//     time from the end of measurement to sync matches two (W+1)-cycle
//     multiplications and two (DIV_W+1)-cycle divisions plus state overhead;
//   * conv_ratio and inv_conv_ratio agree with 160.37/147 to 2e-3;
//   * the frequency tracker applies corrections (window shortened to 64
//     output periods) and keeps the input/output phase difference bounded:
//     after many windows inv_conv_ratio is within 2e-5 of the truth;
//   * with an output clock that stops, ptr_diff_err is raised.
module tb_asrc_ratio_estimator;
  logic        clk = 1'b0, rst = 1'b1, in_w = 1'b0, out_w = 1'b0;
  logic [31:0] sync_cycles = 32'd30000;
  logic [7:0]  nc = 8'd1;
  logic        sync, ptr_err, corr;
  logic [34:0] ro, inv_ro;
  int checks = 0, failures = 0, ncorr = 0;
  real tin = 160.37, tout = 147.0, ph_in = 0.0, ph_out = 0.0;
  bit  out_run = 1;
  longint cyc = 0, t_sync = 0;

  asrc_ratio_estimator #(.N_OUT_LOG2(6)) dut (
    .clk, .rst, .sync_cycles, .nc, .in_wclk_s(in_w), .out_wclk_s(out_w), .sync,
    .conv_ratio(ro), .inv_conv_ratio(inv_ro), .ptr_diff_err(ptr_err),
    .correction_applied(corr));

  always #5 clk = ~clk;

  // fractional-period word clocks, 50% duty
  always @(posedge clk) begin
    cyc <= cyc + 1;
    ph_in = ph_in + 1.0;
    if (ph_in >= tin) ph_in = ph_in - tin;
    in_w <= (ph_in < tin / 2.0);
    if (out_run) begin
      ph_out = ph_out + 1.0;
      if (ph_out >= tout) ph_out = ph_out - tout;
      out_w <= (ph_out < tout / 2.0);
    end
    if (corr) ncorr++;
  end

  function automatic real relerr(input logic [34:0] v, input real ref_v);
    real r = real'(v) / 1073741824.0;
    return (r > ref_v) ? (r - ref_v) / ref_v : (ref_v - r) / ref_v;
  endfunction

  initial begin
    real e0, e1;
    longint overhead;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    wait (sync);
    t_sync = cyc;
    // measurement: 1 init + sync_cycles+1; compute: 2*(1+33) + 2*(1+95)
    overhead = t_sync - 64'(sync_cycles);
    checks++;
    if (overhead < 2 * 34 + 2 * 96 || overhead > 2 * 34 + 2 * 96 + 10) begin
      failures++;
      $display("sync after %0d cycles beyond measurement", overhead);
    end
    e0 = relerr(inv_ro, tout / tin);
    checks += 2;
    if (relerr(ro, tin / tout) > 2e-3) begin failures++; $display("ro err %g", relerr(ro, tin / tout)); end
    if (e0 > 2e-3) begin failures++; $display("inv err %g", e0); end
    $display("initial estimate: rho %f (true %f), inv err %g", real'(ro) / 1073741824.0, tin / tout, e0);
    // let the tracker run for many windows
    repeat (64 * 147 * 60) @(posedge clk);
    e1 = relerr(inv_ro, tout / tin);
    $display("after tracking: inv err %g, corrections %0d", e1, ncorr);
    checks += 3;
    if (ncorr < 20) begin failures++; $display("too few corrections: %0d", ncorr); end
    if (e1 > 2e-5) begin failures++; $display("tracked inv err %g", e1); end
    if (ptr_err)   begin failures++; $display("pointer error while tracking"); end
    // stop the output clock: the phase difference grows, error must rise
    out_run = 0;
    repeat (160 * 140) @(posedge clk);
    checks++;
    if (!ptr_err) begin failures++; $display("pointer error not raised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
