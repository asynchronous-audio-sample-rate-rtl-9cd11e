// Testbench of asrc_addr_gen: for several conversion ratios (upsampling,
// where h_step is clamped to 0.875, unity, and downsampling down to
// 192 kHz -> 8 kHz) and channel counts, every address produced after
// start_sync is compared with a reference walk computed here: output time
// accumulated from inv_conv_ratio, alpha = (1-frac)*h_step on the right and
// frac*h_step on the left, coefficient steps of h_step up to the last ROM
// entry, sample steps of +-Nc from frame*Nc + channel - 512. The number of
// clk cycles from start_sync to the last addr_done must not exceed
// (N_coeffs + 10) * Nc, the rate the design states for one output frame.
module tb_asrc_addr_gen;
  logic        clk = 1'b0, rst = 1'b1, start_sync = 1'b0;
  logic [34:0] conv_ratio = '0, inv_conv_ratio = '0;
  logic [7:0]  nc = 8'd1;
  logic [30:0] h_step;
  logic [17:0] y_addr;
  logic [9:0]  s_addr;
  logic [33:0] coeff_addr;
  logic        first_addr, addr_valid, addr_done, busy;
  int checks = 0, failures = 0, nclamp = 0, ndown = 0;
  longint unsigned yacc = 0;
  localparam longint unsigned MAXA = 64'(16383) << 20;
  localparam longint unsigned ONE  = 64'(1) << 30;

  asrc_addr_gen dut (.clk, .rst, .start_sync, .conv_ratio, .inv_conv_ratio, .nc,
                     .h_step, .y_addr, .s_addr, .coeff_addr, .first_addr,
                     .addr_valid, .addr_done, .busy);

  always #5 clk = ~clk;

  task automatic frame_check();
    longint unsigned h, frac, fr, a, base, n_exp;
    int cyc, ch, side, k, nvalid;
    bit ok;
    h = (conv_ratio > 35'h0_3800_0000) ? 64'h3800_0000 : 64'(conv_ratio);
    if (h == 64'h3800_0000) nclamp++; else ndown++;
    @(negedge clk) start_sync = 1'b1;
    @(negedge clk) start_sync = 1'b0;
    yacc = (yacc + 64'(inv_conv_ratio)) & ((64'(1) << 40) - 1);
    frac = yacc & (ONE - 1);
    fr   = yacc >> 30;
    cyc = 1; ch = 0; side = 0; k = 0; nvalid = 0;
    a = (((ONE - frac) * h) >> 30);
    base = ((fr + 1) * nc - 512) & 1023;
    ok = 1;
    while (ch < int'(nc)) begin
      @(posedge clk); #1;
      cyc++;
      if (cyc > 20000) break;
      if (addr_valid) begin
        nvalid++;
        checks++;
        if (a + k * h >= MAXA || coeff_addr != 34'(a + k * h) ||
            s_addr != 10'(side ? base + ch - k * nc : base + ch + k * nc) ||
            first_addr != (side == 0 && k == 0)) begin
          if (ok) $display("ch %0d side %0d k %0d: coeff %0h exp %0h s_addr %0d exp %0d first %0b",
                           ch, side, k, coeff_addr, a + k * h, s_addr,
                           10'(side ? base + ch - k * nc : base + ch + k * nc), first_addr);
          ok = 0;
          failures++;
        end
        k++;
      end else if (addr_done) begin
        checks++;
        if (side != 1 || a + k * h < MAXA) begin failures++; $display("early done"); end
        ch++; side = 0; k = 0;
        a = (((ONE - frac) * h) >> 30);
        base = ((fr + 1) * nc - 512) & 1023;
      end else if (side == 0 && k > 0) begin
        checks++;
        if (a + k * h < MAXA) begin failures++; $display("early side switch"); end
        side = 1; k = 0;
        a = ((frac * h) >> 30);
        base = (fr * nc - 512) & 1023;
      end
    end
    n_exp = (64'(nvalid) / nc + 10) * nc;
    checks++;
    if (cyc > int'(n_exp)) begin
      failures++;
      $display("frame took %0d cycles, limit %0d", cyc, n_exp);
    end
    checks++;
    if (y_addr != 18'(yacc >> 22)) begin failures++; $display("y_addr %0h", y_addr); end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("busy after last channel"); end
  endtask

  task automatic set_ratio(input real ro, input int channels);
    conv_ratio     = 35'($rtoi(ro * 1073741824.0));
    inv_conv_ratio = 35'($rtoi(1073741824.0 / ro));
    nc = 8'(channels);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    set_ratio(1.0, 1);           repeat (3) frame_check();
    set_ratio(192.0/44.1, 2);    repeat (4) frame_check();
    set_ratio(48.0/44.1, 4);     repeat (4) frame_check();
    set_ratio(44.1/48.0, 8);     repeat (3) frame_check();
    set_ratio(8.0/192.0, 1);     repeat (3) frame_check();
    set_ratio(0.3217, 2);        repeat (4) frame_check();
    checks += 2;
    if (nclamp == 0) begin failures++; $display("h_step clamp never used"); end
    if (ndown == 0)  begin failures++; $display("downsampling never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
