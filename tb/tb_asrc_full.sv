// Full-size testbench of the ASRC core: every parameter at its default
// (24-bit samples, 1024-word input memory, 4096-period tracker window) and
// the measurement time of the reference firmware, 2,000,000 clk cycles
// (20 ms at 100 MHz). Two channels are converted from 44132 Hz to 48003 Hz
// (91 ns x 249 and 42 ns x 496 word clocks). The run lasts until the
// frequency tracker has applied two corrections (about 190 ms of audio);
// the last 2000 output samples of each channel must be clean sines of the
// right frequency (three-point residual below 2**-13 of full scale), with
// the input amplitude within 1%, and no error bit may be set.
module tb_asrc_full;
  timeunit 1ns;
  timeprecision 1ps;
  localparam real PI = 3.141592653589793;
  localparam int  NCH = 2;
  logic        clk = 1'b0, rst = 1'b1;
  logic [7:0]  nc = 8'(NCH);
  logic [31:0] sync_cycles = 32'd2000000;
  logic        sync, in_ready, out_ready, out_empty;
  logic [34:0] ro, inv_ro;
  logic [23:0] audio_in = '0, audio_out;
  logic        in_valid = 1'b0, out_valid = 1'b0;
  logic        in_mclk = 1'b0, out_mclk = 1'b0, in_wclk = 1'b0, out_wclk = 1'b0;
  logic [2:0]  error;
  int checks = 0, failures = 0, n_corr = 0;

  asrc dut (
    .clk, .rst, .nc, .sync_cycles, .sync, .conv_ratio(ro), .inv_conv_ratio(inv_ro),
    .audio_in, .audio_in_valid(in_valid), .audio_in_ready(in_ready),
    .audio_in_mclk(in_mclk), .audio_in_wclk(in_wclk),
    .audio_out, .audio_out_ready(out_ready), .audio_out_wclk(out_wclk),
    .audio_out_mclk(out_mclk), .audio_out_valid(out_valid),
    .audio_out_empty(out_empty), .error);

  always #5    clk = ~clk;
  always #45.5 in_mclk = ~in_mclk;
  always #21   out_mclk = ~out_mclk;

  int in_cnt = 0, out_cnt = 0;
  always @(posedge in_mclk) begin
    in_cnt  = (in_cnt + 1 >= 249) ? 0 : in_cnt + 1;
    in_wclk <= (in_cnt < 124);
  end
  always @(posedge out_mclk) begin
    out_cnt  = (out_cnt + 1 >= 496) ? 0 : out_cnt + 1;
    out_wclk <= (out_cnt < 248);
  end

  real fs_in  = 1.0e9 / (91.0 * 249.0);
  real fs_out = 1.0e9 / (42.0 * 496.0);
  real amp = 0.891 * 8388607.0;
  real ftest[2] = '{1000.0, 1500.0};
  longint n_in = 0;
  int  slot = NCH;
  logic in_wclk_q = 1'b0;
  always @(posedge in_mclk) begin
    if (in_wclk && !in_wclk_q) slot = 0;
    in_wclk_q <= in_wclk;
    if (slot < NCH) begin
      in_valid <= 1'b1;
      audio_in <= 24'($rtoi(amp * $sin(2.0 * PI * ftest[slot] * real'(n_in) / fs_in)));
      slot++;
      if (slot == NCH) n_in++;
    end else begin
      in_valid <= 1'b0;
    end
  end

  bit  rd_q = 0;
  int  n_out = 0;
  real ybuf[2][$];
  // reader, on the falling edge where the FIFO outputs are stable: a read
  // requested here pops on the next rising edge, and its word is collected
  // on the falling edge after that
  always @(negedge out_mclk) begin
    if (rd_q) begin
      int ch;
      ch = n_out % NCH;
      ybuf[ch].push_back(real'($signed(audio_out)));
      if (ybuf[ch].size() > 4000) ybuf[ch].delete(0);
      n_out++;
    end
    out_valid = !rst && !out_empty;
    rd_q = out_valid;
  end

  always @(posedge clk) if (!rst && dut.correction_applied) n_corr++;

  initial begin
    repeat (50) @(posedge clk);
    rst = 1'b0;
    wait (sync);
    $display("sync at %0t: rho %f (clocks give %f)", $time, real'(ro) / 1073741824.0, fs_out / fs_in);
    checks++;
    if ((real'(ro) / 1073741824.0 - fs_out / fs_in) > 1e-4 ||
        (fs_out / fs_in - real'(ro) / 1073741824.0) > 1e-4) begin
      failures++;
      $display("ratio estimate off");
    end
    wait (n_corr >= 2);
    repeat (20000) @(posedge clk);
    $display("corrections %0d, 1/rho %f (clocks give %f)", n_corr,
             real'(inv_ro) / 1073741824.0, fs_in / fs_out);
    for (int c = 0; c < NCH; c++) begin
      real w, r, rmax, pk;
      int  n;
      w = 2.0 * PI * ftest[c] / fs_out;
      rmax = 0.0;
      pk = 0.0;
      n = ybuf[c].size();
      checks += 2;
      for (int i = n - 2000; i < n - 1; i++) begin
        r = ybuf[c][i + 1] + ybuf[c][i - 1] - 2.0 * $cos(w) * ybuf[c][i];
        if (r < 0) r = -r;
        if (r > rmax) rmax = r;
        pk += $sqrt(ybuf[c][i] * ybuf[c][i] - ybuf[c][i - 1] * ybuf[c][i + 1] + 1.0) / $sin(w) / 1999.0;
      end
      $display("channel %0d: residual %0.1f LSB, amplitude %0.0f (input %0.0f)", c, rmax, pk, amp);
      if (rmax > 1024.0) begin failures++; $display("residual too large"); end
      if (pk < 0.99 * amp || pk > 1.01 * amp) begin failures++; $display("amplitude wrong"); end
    end
    checks++;
    if (error != 3'b000) begin failures++; $display("error %b", error); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
