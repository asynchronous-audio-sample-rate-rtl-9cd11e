// End-to-end testbench of the ASRC core (asrc) with two TDM channels.
//
// Clocks: clk 100 MHz; audio master clocks of 91 ns and 42 ns, divided into
// word clocks as the test system does (44132 Hz = 91 ns x 249, 48003 Hz =
// 42 ns x 496, 16001 Hz = 42 ns x 1488). The testbench writes Nc samples
// after each input word clock edge (1 kHz and 1.5 kHz sines, -1 dBFS) and
// pops the output FIFO whenever it is not empty.
// Phases:
//   A  44132 -> 48003 Hz (upsampling, h_step clamped): after the ring has
//      filled, every output stream must be a clean sine of the right
//      frequency: y[n+1] + y[n-1] - 2cos(w)y[n] stays below 2**-12 of full
//      scale, and its amplitude (from three consecutive samples: A^2 =
//      (y[n]^2 - y[n-1]y[n+1]) / sin^2(w)) is within 1% of the input;
//   B  reset in mid-stream, then 44132 -> 16001 Hz (downsampling, h_step =
//      rho): re-synchronization and the same checks;
//   C  the reader stops: the output buffer overflows, error[2] must rise;
//   D  Nc = 3: error[0] must be high; Nc back to 2: low;
//   E  the output word clock stops: error[1] (pointer distance) must rise.
// Mechanisms counted (each must happen): synchronization, start pulses,
// frequency tracker corrections, h_step clamping, h_step below 0.875,
// re-sync after reset, overflow, channel-count error, pointer error.
// The delay window of the tracker is shortened to 64 output periods and the
// measurement time to 2 ms to keep the run short.
module tb_asrc;
  timeunit 1ns;
  timeprecision 1ps;
  localparam real PI = 3.141592653589793;
  localparam int  NCH = 2;
  logic        clk = 1'b0, rst = 1'b1;
  logic [7:0]  nc = 8'(NCH);
  logic [31:0] sync_cycles = 32'd200000;
  logic        sync, in_ready, out_ready, out_empty;
  logic [34:0] ro, inv_ro;
  logic [23:0] audio_in = '0, audio_out;
  logic        in_valid = 1'b0, out_valid = 1'b0;
  logic        in_mclk = 1'b0, out_mclk = 1'b0, in_wclk = 1'b0, out_wclk = 1'b0;
  logic [2:0]  error;
  int checks = 0, failures = 0;
  int n_sync = 0, n_start = 0, n_corr = 0, n_clamp = 0, n_down = 0, n_resync = 0;
  int n_ovf = 0, n_ncerr = 0, n_ptrerr = 0;

  asrc #(.N_OUT_LOG2(6)) dut (
    .clk, .rst, .nc, .sync_cycles, .sync, .conv_ratio(ro), .inv_conv_ratio(inv_ro),
    .audio_in, .audio_in_valid(in_valid), .audio_in_ready(in_ready),
    .audio_in_mclk(in_mclk), .audio_in_wclk(in_wclk),
    .audio_out, .audio_out_ready(out_ready), .audio_out_wclk(out_wclk),
    .audio_out_mclk(out_mclk), .audio_out_valid(out_valid),
    .audio_out_empty(out_empty), .error);

  always #5    clk = ~clk;
  always #45.5 in_mclk = ~in_mclk;
  always #21   out_mclk = ~out_mclk;

  // word clock dividers
  int in_div = 249, out_div = 496, in_cnt = 0, out_cnt = 0;
  bit out_wclk_run = 1;
  always @(posedge in_mclk) begin
    in_cnt  = (in_cnt + 1 >= in_div) ? 0 : in_cnt + 1;
    in_wclk <= (in_cnt < in_div / 2);
  end
  always @(posedge out_mclk) begin
    if (out_wclk_run) begin
      out_cnt  = (out_cnt + 1 >= out_div) ? 0 : out_cnt + 1;
      out_wclk <= (out_cnt < out_div / 2);
    end
  end

  // input writer: Nc samples after each word clock edge
  real fs_in = 1.0e9 / (91.0 * 249.0);
  real amp = 0.891 * 8388607.0;       // -1 dBFS
  real ftest[2] = '{1000.0, 1500.0};
  longint n_in = 0;
  int  slot = NCH;
  logic in_wclk_q = 1'b0;
  always @(posedge in_mclk) begin
    if (in_wclk && !in_wclk_q) slot = 0;
    in_wclk_q <= in_wclk;
    if (slot < int'(nc)) begin
      in_valid <= 1'b1;
      audio_in <= 24'($rtoi(amp * $sin(2.0 * PI * ftest[slot % 2] * real'(n_in) / fs_in)));
      slot++;
      if (slot == int'(nc)) n_in++;
    end else begin
      in_valid <= 1'b0;
    end
  end

  // output reader
  bit   reader_on = 1;
  bit   rd_q = 0;
  int   n_out = 0;
  real  ybuf[2][$];
  // reader, on the falling edge where the FIFO outputs are stable: a read
  // requested here pops on the next rising edge, and its word is collected
  // on the falling edge after that
  always @(negedge out_mclk) begin
    if (rd_q) begin
      ybuf[n_out % NCH].push_back(real'($signed(audio_out)));
      n_out++;
    end
    out_valid = reader_on && !rst && !out_empty;
    rd_q = out_valid;
  end

  // mechanism counters
  logic sync_q = 1'b0;
  always @(posedge clk) if (!rst) begin
    sync_q <= sync;
    if (sync && !sync_q) n_sync++;
    if (dut.start_sync) begin
      n_start++;
      if (dut.u_resampler.h_step == 31'h3800_0000) n_clamp++;
      else n_down++;
    end
    if (dut.correction_applied) n_corr++;
    if (dut.fifo_overflow) n_ovf++;
  end

  // sine purity and amplitude of the last nchk samples of each channel
  task automatic check_streams(input real fs_out, input int nchk);
    for (int c = 0; c < NCH; c++) begin
      real w = 2.0 * PI * ftest[c] / fs_out, r, rmax = 0.0, pk = 0.0;
      int  n = ybuf[c].size();
      checks += 3;
      if (n < nchk + 2) begin
        failures++;
        $display("channel %0d: only %0d samples", c, n);
        continue;
      end
      for (int i = n - nchk; i < n - 1; i++) begin
        r = ybuf[c][i + 1] + ybuf[c][i - 1] - 2.0 * $cos(w) * ybuf[c][i];
        if (r < 0) r = -r;
        if (r > rmax) rmax = r;
        pk += $sqrt(ybuf[c][i] * ybuf[c][i] - ybuf[c][i - 1] * ybuf[c][i + 1] + 1.0) / $sin(w) / real'(nchk - 1);
      end
      $display("fs_out %0.0f channel %0d: residual %0.1f LSB, amplitude %0.0f (input %0.0f)",
               fs_out, c, rmax, pk, amp);
      if (rmax > 2048.0) begin failures++; $display("residual too large"); end
      if (pk < 0.99 * amp || pk > 1.01 * amp) begin failures++; $display("amplitude wrong"); end
    end
  endtask

  task automatic clear_streams();
    ybuf[0].delete();
    ybuf[1].delete();
  endtask

  initial begin
    repeat (50) @(posedge clk);
    rst = 1'b0;
    // ---- A: upsampling
    wait (sync);
    $display("A: sync at %0t, rho %f", $time, real'(ro) / 1073741824.0);
    checks++;
    if (in_ready !== 1'b1) begin
      repeat (10) @(posedge in_mclk);
      if (in_ready !== 1'b1) begin failures++; $display("audio_in_ready low after sync"); end
    end
    wait (n_out >= 2 * 700);
    check_streams(1.0e9 / (42.0 * 496.0), 300);
    checks++;
    if (error != 3'b000) begin failures++; $display("error %b in phase A", error); end
    // ---- B: reset, downsampling
    @(negedge clk) rst = 1'b1;
    out_div = 1488;
    repeat (20) @(negedge clk);
    rst = 1'b0;
    clear_streams();
    @(posedge out_mclk);
    n_out = 0;
    wait (sync);
    n_resync++;
    $display("B: sync at %0t, rho %f", $time, real'(ro) / 1073741824.0);
    wait (n_out >= 2 * 400);
    check_streams(1.0e9 / (42.0 * 1488.0), 250);
    checks++;
    if (error != 3'b000) begin failures++; $display("error %b in phase B", error); end
    // ---- C: overflow
    reader_on = 0;
    wait (error[2]);
    checks++;
    reader_on = 1;
    // ---- D: channel-count error
    @(negedge clk) nc = 8'd3;
    #1;
    checks++;
    if (!error[0]) begin failures++; $display("nc=3 not flagged"); end
    else n_ncerr++;
    @(negedge clk) nc = 8'(NCH);
    #1;
    checks++;
    if (error[0]) begin failures++; $display("nc=2 flagged"); end
    // ---- E: pointer error
    out_wclk_run = 0;
    wait (error[1]);
    n_ptrerr++;
    // ---- mechanisms
    $display("sync %0d start %0d corrections %0d clamp %0d below0.875 %0d resync %0d overflow %0d ncerr %0d ptrerr %0d",
             n_sync, n_start, n_corr, n_clamp, n_down, n_resync, n_ovf, n_ncerr, n_ptrerr);
    checks += 9;
    if (n_sync < 2)   begin failures++; $display("sync count"); end
    if (n_start == 0) begin failures++; $display("no start"); end
    if (n_corr == 0)  begin failures++; $display("no tracker correction"); end
    if (n_clamp == 0) begin failures++; $display("no clamped h_step"); end
    if (n_down == 0)  begin failures++; $display("no downsampling h_step"); end
    if (n_resync == 0) begin failures++; $display("no resync"); end
    if (n_ovf == 0)   begin failures++; $display("no overflow"); end
    if (n_ncerr == 0) begin failures++; $display("no nc error"); end
    if (n_ptrerr == 0) begin failures++; $display("no pointer error"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
