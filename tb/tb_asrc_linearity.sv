// Linearity testbench of the ASRC core at its default parameters. For four
// conversions of the evaluation's linearity table (down, up, equal rates and
// 2:1), one channel carries a 1 kHz sine whose level is stepped through -1,
// -30, -60, -90 and -120 dBFS without a reset. After each step the testbench
// waits until the reads only see samples of the new level (512 frames of
// read offset plus half the filter), then fits a*cos(wn) + b*sin(wn) to 600
// output samples by least squares and takes sqrt(a^2 + b^2) as the output
// amplitude. Checks per conversion: each amplitude within 0.5% + 0.5 LSB of
// the input, the regression gain beta = sum(XY)/sum(X^2) within 1e-3 of 1,
// and R^2 above 99.99%. Word clocks are generated at the exact rates.
module tb_asrc_linearity;
  timeunit 1ns;
  timeprecision 1ps;
  localparam real PI = 3.141592653589793;
  localparam real FS = 8388607.0;
  localparam int  NCONV = 4;
  localparam int  NLEV = 5;
  localparam int  NFIT = 600;
  localparam real FIN [NCONV] = '{192012.0, 44132.0, 48003.0, 96006.0};
  localparam real FOUT[NCONV] = '{44132.0, 192012.0, 48003.0, 48003.0};
  localparam real LEV [NLEV]  = '{-1.0, -30.0, -60.0, -90.0, -120.0};
  localparam real FTEST = 1000.0;
  logic        clk = 1'b0, rst = 1'b1;
  logic [7:0]  nc = 8'd1;
  logic [31:0] sync_cycles = 32'd2000000;
  logic        sync, in_ready, out_ready, out_empty;
  logic [34:0] ro, inv_ro;
  logic [23:0] audio_in = '0, audio_out;
  logic        in_valid = 1'b0, out_valid = 1'b0;
  logic        in_mclk = 1'b0, out_mclk = 1'b0, in_wclk = 1'b0, out_wclk = 1'b0;
  logic [2:0]  error;
  int checks = 0, failures = 0;
  real fs_in = 48000.0, fs_out = 48000.0;
  real amp = 0.0;

  asrc dut (
    .clk, .rst, .nc, .sync_cycles, .sync, .conv_ratio(ro), .inv_conv_ratio(inv_ro),
    .audio_in, .audio_in_valid(in_valid), .audio_in_ready(in_ready),
    .audio_in_mclk(in_mclk), .audio_in_wclk(in_wclk),
    .audio_out, .audio_out_ready(out_ready), .audio_out_wclk(out_wclk),
    .audio_out_mclk(out_mclk), .audio_out_valid(out_valid),
    .audio_out_empty(out_empty), .error);

  always #5    clk = ~clk;
  always #10   in_mclk = ~in_mclk;
  always #10.5 out_mclk = ~out_mclk;
  always #(0.5e9 / fs_in)  in_wclk  = ~in_wclk;
  always #(0.5e9 / fs_out) out_wclk = ~out_wclk;

  // input writer: one sample, rounded to nearest, after each input word clock edge
  longint n_in = 0;
  logic in_wclk_q = 1'b0;
  always @(posedge in_mclk) begin
    in_valid <= in_wclk && !in_wclk_q;
    if (in_wclk && !in_wclk_q) begin
      audio_in <= 24'($rtoi($floor(amp * $sin(2.0 * PI * FTEST * real'(n_in) / fs_in) + 0.5)));
      n_in++;
    end
    in_wclk_q <= in_wclk;
  end

  // output reader on the falling edge, where the FIFO outputs are stable
  bit  rd_q = 0;
  real ybuf[$];
  always @(negedge out_mclk) begin
    if (rd_q) ybuf.push_back(real'($signed(audio_out)));
    out_valid = !rst && !out_empty;
    rd_q = out_valid;
  end

  // least-squares amplitude of a sine of known frequency in the last NFIT samples
  function automatic real fit_amplitude(input real w);
    real scc, sss, ssc, syc, sys, c, s, det, a, b;
    int  n0;
    scc = 0.0; sss = 0.0; ssc = 0.0; syc = 0.0; sys = 0.0;
    n0 = ybuf.size() - NFIT;
    for (int i = 0; i < NFIT; i++) begin
      c = $cos(w * real'(i));
      s = $sin(w * real'(i));
      scc += c * c; sss += s * s; ssc += s * c;
      syc += ybuf[n0 + i] * c; sys += ybuf[n0 + i] * s;
    end
    det = scc * sss - ssc * ssc;
    a = (syc * sss - sys * ssc) / det;
    b = (sys * scc - syc * ssc) / det;
    return $sqrt(a * a + b * b);
  endfunction

  initial begin
    for (int k = 0; k < NCONV; k++) begin
      real x[NLEV], y[NLEV];
      real sxy, sxx, syy, beta, sres, r2, rho, settle_s;
      int  ntaps;
      @(negedge clk);
      rst = 1'b1;
      fs_in = FIN[k];
      fs_out = FOUT[k];
      amp = FS * $pow(10.0, LEV[0] / 20.0);
      repeat (50) @(negedge clk);
      rst = 1'b0;
      wait (sync);
      rho = fs_out / fs_in;
      ntaps = int'($ceil(32.0 / (rho < 0.875 ? rho : 0.875)));
      settle_s = (512.0 + real'(ntaps) / 2.0 + 8.0) / fs_in;
      $display("%0.0f -> %0.0f Hz:", fs_in, fs_out);
      for (int l = 0; l < NLEV; l++) begin
        amp = FS * $pow(10.0, LEV[l] / 20.0);
        #(settle_s * 1.0e9);
        ybuf.delete();
        wait (ybuf.size() >= NFIT);
        x[l] = amp;
        y[l] = fit_amplitude(2.0 * PI * FTEST / fs_out);
        $display("  %6.1f dBFS: input %12.3f output %12.3f", LEV[l], x[l], y[l]);
        checks++;
        if (y[l] - x[l] > 0.005 * x[l] + 0.5 || x[l] - y[l] > 0.005 * x[l] + 0.5) begin
          failures++;
          $display("  amplitude wrong");
        end
      end
      sxy = 0.0; sxx = 0.0; syy = 0.0; sres = 0.0;
      for (int l = 0; l < NLEV; l++) begin
        sxy += x[l] * y[l]; sxx += x[l] * x[l]; syy += y[l] * y[l];
      end
      beta = sxy / sxx;
      for (int l = 0; l < NLEV; l++) sres += (y[l] - beta * x[l]) * (y[l] - beta * x[l]);
      r2 = 1.0 - sres / syy;
      $display("  beta %f, R^2 %f%%", beta, 100.0 * r2);
      checks += 3;
      if (beta > 1.001 || beta < 0.999) begin failures++; $display("  beta wrong"); end
      if (r2 < 0.9999) begin failures++; $display("  R^2 too small"); end
      if (error != 3'b000) begin failures++; $display("  error %b", error); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
