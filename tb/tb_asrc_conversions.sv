// Conversion testbench of the ASRC core at its default parameters: runs the
// conversions of the evaluation's sample table one after another, with a
// reset and a new 20 ms ratio measurement (2e6 cycles at 100 MHz) before each.
//
// Word clocks are generated at the exact rates (input and output master
// clocks 20 ns and 21 ns only time the sample writes and FIFO reads). Two
// channels carry 1 kHz and 1.5 kHz sines at -1 dBFS; 192012 -> 11022 Hz runs
// with one channel, since its 558-tap filter needs more than the 256 frames
// that two channels leave on each side in the 1024-sample memory. For each
// conversion: rho must match the clocks to 2e-4, and after the memory has
// filled, 300 output frames of each channel must be a clean sine (three-point
// residual below 2**-12 of full scale) of the input amplitude (within 1%);
// no error bit may be set. The number of resampler products per output frame
// is checked against 32/min(0.875, rho) per side pair.
module tb_asrc_conversions;
  timeunit 1ns;
  timeprecision 1ps;
  localparam real PI  = 3.141592653589793;
  localparam real AMP = 0.891 * 8388607.0;
  localparam int  NCONV = 8;
  localparam real FIN [NCONV] = '{8000.0, 11022.0, 44132.0, 177242.0, 192012.0, 87912.0, 48003.0, 11022.0};
  localparam real FOUT[NCONV] = '{177242.0, 96006.0, 48003.0, 192012.0, 11022.0, 8000.0, 32002.0, 8000.0};
  localparam int  NCS [NCONV] = '{2, 2, 2, 2, 1, 2, 2, 2};
  logic        clk = 1'b0, rst = 1'b1;
  logic [7:0]  nc = 8'd2;
  logic [31:0] sync_cycles = 32'd2000000;
  logic        sync, in_ready, out_ready, out_empty;
  logic [34:0] ro, inv_ro;
  logic [23:0] audio_in = '0, audio_out;
  logic        in_valid = 1'b0, out_valid = 1'b0;
  logic        in_mclk = 1'b0, out_mclk = 1'b0, in_wclk = 1'b0, out_wclk = 1'b0;
  logic [2:0]  error;
  int checks = 0, failures = 0;
  real fs_in = 8000.0, fs_out = 8000.0;
  real ftest[2] = '{1000.0, 1500.0};

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

  // input writer: Nc samples after each input word clock edge
  longint n_in = 0;
  int  slot = 2;
  logic in_wclk_q = 1'b0;
  always @(posedge in_mclk) begin
    if (in_wclk && !in_wclk_q) slot = 0;
    in_wclk_q <= in_wclk;
    if (slot < int'(nc)) begin
      in_valid <= 1'b1;
      audio_in <= 24'($rtoi(AMP * $sin(2.0 * PI * ftest[slot] * real'(n_in) / fs_in)));
      slot++;
      if (slot == int'(nc)) n_in++;
    end else begin
      in_valid <= 1'b0;
    end
  end

  // output reader on the falling edge, where the FIFO outputs are stable
  bit  rd_q = 0;
  int  n_out = 0;
  real ybuf[2][$];
  always @(negedge out_mclk) begin
    if (rd_q) begin
      ybuf[n_out % int'(nc)].push_back(real'($signed(audio_out)));
      n_out++;
    end
    out_valid = !rst && !out_empty;
    rd_q = out_valid;
  end

  // products per output frame and channel
  int n_prod = 0, max_prod = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.u_resampler.u_macc.p_valid) n_prod++;
    if (dut.u_resampler.u_macc.p_done) begin
      if (n_prod > max_prod) max_prod = n_prod;
      n_prod = 0;
    end
  end

  task automatic check_streams(input int nch, input int nchk);
    for (int c = 0; c < nch; c++) begin
      real w, r, rmax, a;
      int  n;
      w = 2.0 * PI * ftest[c] / fs_out;
      rmax = 0.0;
      a = 0.0;
      n = ybuf[c].size();
      checks += 2;
      for (int i = n - nchk; i < n - 1; i++) begin
        r = ybuf[c][i + 1] + ybuf[c][i - 1] - 2.0 * $cos(w) * ybuf[c][i];
        if (r < 0) r = -r;
        if (r > rmax) rmax = r;
        a += $sqrt(ybuf[c][i] * ybuf[c][i] - ybuf[c][i - 1] * ybuf[c][i + 1] + 1.0) / $sin(w) / real'(nchk - 1);
      end
      $display("  channel %0d: residual %0.1f LSB, amplitude %0.0f (input %0.0f)", c, rmax, a, AMP);
      if (rmax > 2048.0) begin failures++; $display("  residual too large"); end
      if (a < 0.99 * AMP || a > 1.01 * AMP) begin failures++; $display("  amplitude wrong"); end
    end
  endtask

  initial begin
    for (int k = 0; k < NCONV; k++) begin
      real rho, rho_hw, fill_s;
      int  ntaps;
      @(negedge clk);
      rst = 1'b1;
      nc = 8'(NCS[k]);
      fs_in = FIN[k];
      fs_out = FOUT[k];
      repeat (50) @(negedge clk);
      rst = 1'b0;
      wait (sync);
      rho = fs_out / fs_in;
      rho_hw = real'(ro) / 1073741824.0;
      $display("%0.0f -> %0.0f Hz, Nc %0d: rho %f (clocks give %f)", fs_in, fs_out, NCS[k], rho_hw, rho);
      checks++;
      if (rho_hw / rho > 1.0002 || rho_hw / rho < 0.9998) begin failures++; $display("  rho wrong"); end
      // wait until the reads only see samples written after the reset
      ntaps = int'($ceil(32.0 / (rho < 0.875 ? rho : 0.875)));
      fill_s = (512.0 / real'(NCS[k]) + real'(ntaps) / 2.0 + 8.0) / fs_in;
      #(fill_s * 1.0e9);
      ybuf[0].delete();
      ybuf[1].delete();
      max_prod = 0;
      wait (ybuf[NCS[k] - 1].size() >= 300);
      check_streams(NCS[k], 298);
      checks += 2;
      $display("  products per output sample %0d (expected about %0d)", max_prod, ntaps);
      if (max_prod < ntaps - 2 || max_prod > ntaps + 2) begin failures++; $display("  product count wrong"); end
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
