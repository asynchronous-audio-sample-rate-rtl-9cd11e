// End-to-end testbench of the ASRC test wrapper with every parameter at its
// default (including the 4096-period delay window of the frequency tracker).
//
// The testbench plays the processor: it configures the converter through the
// memory-mapped registers and then keeps the input buffer fed and the output
// buffer drained with single register accesses. Two channels (Nc = 2) carry
// sines at fs_in/48 and fs_in/32. To keep the run short the audio clocks are
// fast: audio_mclk_0 = 20 ns and audio_mclk_1 = 22 ns, divided by 64 and 56
// (rho = 1280/1232 = 1.0390) in phase A and by 64 and 96 (rho = 0.6061) in
// phase B. Checks:
//   * register initial values, word clock periods made by the dividers;
//   * A: sync, rho and 1/rho against the clock periods, at least two
//     frequency tracker corrections, then each output channel must be a clean
//     sine (y[n+1] + y[n-1] - 2cos(w)y[n] small) of the input amplitude;
//   * B: soft reset, re-synchronization, downsampling, the same checks;
//   * C: the processor stops reading: both output buffers fill and error[2]
//     rises; D: Nc = 3 raises error[0]; E: the output word clock is slowed
//     down 40 times and error[1] (pointer distance) rises;
//   * DMA control registers drive their ports, RUN gives one pulse.
// Mechanisms counted: sync, start pulses, corrections, h_step clamping,
// h_step below 0.875, re-sync, soft reset, write switch off, overflow,
// channel error, pointer error, DMA run pulse.
module tb_asrc_wrapper;
  timeunit 1ns;
  timeprecision 1ps;
  localparam real PI = 3.141592653589793;
  localparam int  NCH = 2;
  localparam real AMP = 7474249.0;   // -1 dBFS
  logic clk = 1'b0, rst = 1'b1, mclk0 = 1'b0, mclk1 = 1'b0;
  logic        iob_valid = 1'b0, iob_ready;
  logic [7:0]  iob_addr = '0;
  logic [31:0] iob_wdata = '0, iob_rdata;
  logic [3:0]  iob_wstrb = '0;
  logic        dma_in_wr = 1'b0, dma_out_rd = 1'b0;
  logic [23:0] dma_in_data = '0, dma_out_data;
  logic [29:0] indma_addr, outdma_addr;
  logic [7:0]  indma_len, outdma_len;
  logic        indma_run, outdma_run;
  logic        indma_ready = 1'b1, outdma_ready = 1'b0;
  int checks = 0, failures = 0;
  int n_sync = 0, n_start = 0, n_corr = 0, n_clamp = 0, n_down = 0, n_resync = 0;
  int n_soft = 0, n_switch = 0, n_ovf = 0, n_ncerr = 0, n_ptrerr = 0, n_dmarun = 0;
  int  n_in = 0;
  real ftest[NCH] = '{1.0 / 48.0, 1.0 / 32.0};   // cycles per input frame
  real yraw[$];

  asrc_wrapper dut (
    .clk, .rst, .audio_mclk_0(mclk0), .audio_mclk_1(mclk1),
    .iob_valid, .iob_addr, .iob_wdata, .iob_wstrb, .iob_rdata, .iob_ready,
    .dma_in_wr, .dma_in_data, .dma_out_rd, .dma_out_data,
    .indma_addr, .indma_len, .indma_run, .indma_ready,
    .outdma_addr, .outdma_len, .outdma_run, .outdma_ready);

  always #5  clk   = ~clk;
  always #10 mclk0 = ~mclk0;
  always #11 mclk1 = ~mclk1;

  // ---- bus accesses
  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    iob_valid = 1'b1; iob_addr = a; iob_wdata = d; iob_wstrb = 4'hf;
    @(negedge clk);
    iob_valid = 1'b0; iob_wstrb = '0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    iob_valid = 1'b1; iob_addr = a; iob_wstrb = '0;
    @(negedge clk);
    iob_valid = 1'b0;
    d = iob_rdata;
  endtask

  task automatic expect_reg(input logic [7:0] a, input logic [31:0] v, input string name);
    logic [31:0] d;
    rd(a, d);
    checks++;
    if (d !== v) begin failures++; $display("%s reads %0d, expected %0d", name, d, v); end
  endtask

  // one round of buffer service: feed one input sample, drain one output
  bit reading = 1;
  task automatic service();
    logic [31:0] d;
    real x;
    rd(8'h4c, d);                       // INFIFO_LEVEL
    if (d < 96) begin
      x = AMP * $sin(2.0 * PI * ftest[n_in % NCH] * real'(n_in / NCH));
      wr(8'h08, 32'($rtoi(x)));
      wr(8'h0c, 32'd1);
      n_in++;
    end
    if (reading) begin
      rd(8'h54, d);                     // OUTFIFO_EMPTY
      if (d == 0) begin
        wr(8'h10, 32'd1);
        rd(8'h14, d);
        yraw.push_back(real'($signed(d[23:0])));
      end
    end
  endtask

  task automatic run_cycles(input int n);
    int t0 = int'($time / 10);
    while (int'($time / 10) - t0 < n) service();
  endtask

  // purity and amplitude of the last nchk samples of each channel; the
  // channel order of the raw stream may start at either offset after a reset
  task automatic check_streams(input real rho, input int nchk);
    real best = 1.0e30, bestpk[NCH];
    int  n = yraw.size();
    checks += 3;
    if (n < NCH * (nchk + 2)) begin
      failures++;
      $display("only %0d output samples", n);
      return;
    end
    for (int off = 0; off < NCH; off++) begin
      real worst = 0.0, pk[NCH];
      for (int c = 0; c < NCH; c++) begin
        real w, r, rmax, y0, y1, y2;
        int  ci;
        ci = (c + off) % NCH;
        w = 2.0 * PI * ftest[ci] / rho;
        rmax = 0.0;
        pk[ci] = 0.0;
        for (int k = nchk; k > 1; k--) begin
          int i;
          i = n - (n % NCH) - NCH * (k + 1) + c;
          y0 = yraw[i]; y1 = yraw[i + NCH]; y2 = yraw[i + 2 * NCH];
          r = y2 + y0 - 2.0 * $cos(w) * y1;
          if (r < 0) r = -r;
          if (r > rmax) rmax = r;
          pk[ci] += $sqrt(y1 * y1 - y0 * y2 + 1.0) / $sin(w) / real'(nchk - 1);
        end
        if (rmax > worst) worst = rmax;
      end
      if (worst < best) begin
        best = worst;
        bestpk = pk;
      end
    end
    $display("rho %f: residual %0.1f LSB, amplitudes %0.0f %0.0f (input %0.0f)",
             rho, best, bestpk[0], bestpk[1], AMP);
    if (best > 2048.0) begin failures++; $display("residual too large"); end
    for (int c = 0; c < NCH; c++)
      if (bestpk[c] < 0.99 * AMP || bestpk[c] > 1.01 * AMP) begin
        failures++; $display("channel %0d amplitude wrong", c);
      end
  endtask

  // ---- mechanism counters and word clock period measurement
  logic sync_q = 1'b0, pend_q = 1'b0;
  always @(posedge clk) if (!rst) begin
    sync_q <= dut.u_asrc.sync;
    if (dut.u_asrc.sync && !sync_q) n_sync++;
    if (dut.u_asrc.start_sync) begin
      n_start++;
      if (dut.u_asrc.u_resampler.h_step == 31'h3800_0000) n_clamp++;
      else n_down++;
    end
    if (dut.u_asrc.correction_applied) n_corr++;
    if (dut.u_asrc.fifo_overflow) n_ovf++;
    if (indma_run) n_dmarun++;
  end

  realtime in_rise = 0, out_rise = 0, in_per = 0, out_per = 0;
  always @(posedge dut.audio_in_wclk) begin
    if (in_rise > 0) in_per = $realtime - in_rise;
    in_rise = $realtime;
  end
  always @(posedge dut.audio_out_wclk) begin
    if (out_rise > 0) out_per = $realtime - out_rise;
    out_rise = $realtime;
  end

  task automatic check_ratio(input real rho_exp);
    logic [31:0] lo, hi;
    real r, ri;
    rd(8'h34, lo); rd(8'h38, hi);
    r = (real'(hi) * 4294967296.0 + real'(lo)) / 1073741824.0;
    rd(8'h3c, lo); rd(8'h40, hi);
    ri = (real'(hi) * 4294967296.0 + real'(lo)) / 1073741824.0;
    $display("rho %f 1/rho %f (clocks give %f)", r, ri, rho_exp);
    checks += 2;
    if (r / rho_exp > 1.0001 || r / rho_exp < 0.9999) begin failures++; $display("rho wrong"); end
    if (ri * rho_exp > 1.0001 || ri * rho_exp < 0.9999) begin failures++; $display("1/rho wrong"); end
  endtask

  initial begin
    logic [31:0] d;
    repeat (50) @(posedge clk);
    rst = 1'b0;
    repeat (5) @(posedge clk);
    // initial values of the registers
    expect_reg(8'h00, 1,    "ASRC_NC");
    expect_reg(8'h20, 1,    "ASRC_CLKOUT_SEL");
    expect_reg(8'h24, 500,  "ASRC_CLKIN_DIV");
    expect_reg(8'h28, 1000, "ASRC_CLKOUT_DIV");
    expect_reg(8'h2c, 0,    "SYNC_CYCLES");
    expect_reg(8'h30, 0,    "RO_METER_SYNC");
    expect_reg(8'h48, 1,    "INFIFO_EMPTY");
    expect_reg(8'h54, 1,    "OUTFIFO_EMPTY");
    expect_reg(8'h7c, 1,    "OUTFIFO_SWITCH");
    expect_reg(8'h80, 1,    "PTR_DIFF_SWITCH");
    // DMA control
    wr(8'h5c, 32'h1234_5678); wr(8'h60, 32'd64); wr(8'h64, 32'd1);
    repeat (2) @(posedge clk);
    checks += 3;
    if (indma_addr != 30'h1234_5678 || indma_len != 8'd64) begin failures++; $display("DMA registers"); end
    if (n_dmarun != 1) begin failures++; $display("INDMA_RUN pulses %0d", n_dmarun); end
    expect_reg(8'h68, 1, "INDMA_READY");
    // configuration: hold the core, stop the write control, pre-fill
    wr(8'h04, 32'd1);
    wr(8'h80, 32'd0);
    n_switch++;
    wr(8'h00, NCH);
    wr(8'h1c, 32'd0); wr(8'h20, 32'd1);
    wr(8'h24, 32'd63); wr(8'h28, 32'd55);
    wr(8'h2c, 32'd100000);
    for (int i = 0; i < 64; i++) service();
    expect_reg(8'h4c, 64, "INFIFO_LEVEL after pre-fill");
    wr(8'h80, 32'd1);
    wr(8'h04, 32'd0);
    n_soft++;
    run_cycles(2000);
    checks += 2;
    if (in_per != 1280.0) begin failures++; $display("input word clock period %0t", in_per); end
    if (out_per != 1232.0) begin failures++; $display("output word clock period %0t", out_per); end
    // ---- A: upsampling
    do begin run_cycles(1000); rd(8'h30, d); end while (d == 0);
    check_ratio(1280.0 / 1232.0);
    while (n_corr < 2) run_cycles(10000);
    yraw.delete();
    run_cycles(120000);
    check_streams(1280.0 / 1232.0, 300);
    expect_reg(8'h18, 0, "ASRC_ERROR in phase A");
    // ---- B: soft reset, downsampling
    wr(8'h04, 32'd1);
    n_soft++;
    run_cycles(100);
    expect_reg(8'h30, 0, "RO_METER_SYNC during soft reset");
    wr(8'h28, 32'd95);
    wr(8'h04, 32'd0);
    do begin run_cycles(1000); rd(8'h30, d); end while (d == 0);
    n_resync++;
    check_ratio(1280.0 / 2112.0);
    run_cycles(20000);
    yraw.delete();
    run_cycles(150000);
    check_streams(1280.0 / 2112.0, 300);
    expect_reg(8'h18, 0, "ASRC_ERROR in phase B");
    // ---- C: the reader stops, the buffers overflow
    reading = 0;
    run_cycles(150000);
    expect_reg(8'h50, 1, "OUTFIFO_FULL");
    rd(8'h18, d);
    checks++;
    if (d[2] !== 1'b1) begin failures++; $display("error[2] not raised"); end
    // ---- D: Nc = 3
    wr(8'h00, 32'd3);
    rd(8'h18, d);
    checks++;
    if (d[0] !== 1'b1) begin failures++; $display("error[0] not raised"); end
    else n_ncerr++;
    wr(8'h00, NCH);
    rd(8'h18, d);
    checks++;
    if (d[0] !== 1'b0) begin failures++; $display("error[0] stays high"); end
    // ---- E: output word clock slowed down
    checks++;
    if (d[1] !== 1'b0) begin failures++; $display("error[1] already high"); end
    wr(8'h28, 32'd4095);
    run_cycles(100000);
    rd(8'h18, d);
    checks++;
    if (d[1] !== 1'b1) begin failures++; $display("error[1] not raised"); end
    else n_ptrerr++;
    // ---- mechanisms
    $display("mechanisms: sync %0d start %0d corrections %0d clamp %0d down %0d resync %0d soft %0d switch %0d overflow %0d ncerr %0d ptrerr %0d dmarun %0d",
             n_sync, n_start, n_corr, n_clamp, n_down, n_resync, n_soft, n_switch, n_ovf, n_ncerr, n_ptrerr, n_dmarun);
    checks += 12;
    if (n_sync < 2)   begin failures++; $display("sync not seen twice"); end
    if (n_start == 0) failures++;
    if (n_corr == 0)  failures++;
    if (n_clamp == 0) failures++;
    if (n_down == 0)  failures++;
    if (n_resync == 0) failures++;
    if (n_soft == 0)  failures++;
    if (n_switch == 0) failures++;
    if (n_ovf == 0)   failures++;
    if (n_ncerr == 0) failures++;
    if (n_ptrerr == 0) failures++;
    if (n_dmarun == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
