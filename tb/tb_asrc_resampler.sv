// Testbench of asrc_resampler with a behavioural input memory (one-cycle
// read latency, like the input data memory). The memory ring holds, for each
// of Nc channels, a sine with an integer number of cycles around the ring,
// so it represents an endless periodic, band-limited signal. For every
// output sample the expected value is that sine evaluated at the output
// instant (the accumulated inv_conv_ratio, minus the half-buffer read
// offset). Cases: unity ratio, upsampling 44.1 -> 48 kHz with two channels
// (h_step clamped to 0.875) and downsampling 48 -> 16 kHz. The error must
// stay below 64 LSB (2**-17 of full scale); all Nc outputs of a frame must come in
// channel order within (32/h_step + 10) * Nc clk cycles of start_sync, the
// output rate the design states.
module tb_asrc_resampler;
  localparam real PI = 3.141592653589793;
  logic        clk = 1'b0, rst = 1'b1, start_sync = 1'b0;
  logic [7:0]  nc = 8'd1;
  logic [34:0] conv_ratio = '0, inv_conv_ratio = '0;
  logic [9:0]  s_addr;
  logic [23:0] s_data, y;
  logic [17:0] y_addr;
  logic        y_valid, busy;
  logic [23:0] mem [1024];
  int checks = 0, failures = 0;
  longint unsigned yacc = 0;
  real max_err = 0.0;
  real amp = 0.9 * 8388608.0;

  asrc_resampler dut (.clk, .rst, .start_sync, .nc, .conv_ratio, .inv_conv_ratio,
                      .s_addr, .s_data, .y_addr, .audio_out(y), .audio_out_valid(y_valid), .busy);

  always #5 clk = ~clk;
  always_ff @(posedge clk) s_data <= mem[s_addr];

  function automatic real xsig(input int ch, input real t);   // t in frames
    real frames = 1024.0 / nc;
    return amp * $sin(2.0 * PI * (3 + 2 * ch) * t / frames + 0.3 * ch);
  endfunction

  task automatic setup(input real ro, input int channels);
    conv_ratio     = 35'($rtoi(ro * 1073741824.0));
    inv_conv_ratio = 35'($rtoi(1073741824.0 / ro));
    nc = 8'(channels);
    for (int a = 0; a < 1024; a++)
      mem[a] = 24'($rtoi(xsig(a % channels, real'(a / channels))));
  endtask

  task automatic frame_check(input real ro);
    real t, e, hs;
    int  cyc, got, limit;
    hs = (ro > 0.875) ? 0.875 : ro;
    limit = int'((32.0 / hs + 10.0) * nc);
    @(negedge clk) start_sync = 1'b1;
    @(negedge clk) start_sync = 1'b0;
    yacc = (yacc + 64'(inv_conv_ratio)) & ((64'(1) << 40) - 1);
    t = real'(yacc) / 1073741824.0 - 512.0 / nc;
    cyc = 1; got = 0;
    while (got < int'(nc) && cyc < 20000) begin
      @(posedge clk); #1;
      cyc++;
      if (y_valid) begin
        e = real'($signed(y)) - xsig(got, t);
        if (e < 0) e = -e;
        if (e > max_err) max_err = e;
        checks++;
        if (e > 64.0) begin
          failures++;
          $display("t=%f ch %0d: out %0d expected %f", t, got, $signed(y), xsig(got, t));
        end
        got++;
      end
    end
    checks++;
    if (cyc > limit) begin
      failures++;
      $display("frame outputs took %0d cycles, limit %0d", cyc, limit);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    setup(1.0, 1);           repeat (20) frame_check(1.0);
    setup(48.0 / 44.1, 2);   repeat (60) frame_check(48.0 / 44.1);
    setup(16.0 / 48.0, 1);   repeat (60) frame_check(16.0 / 48.0);
    $display("largest error %f LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
