// Testbench of asrc_data_mem with Nc = 4 TDM channels: frames of four
// samples are written after each input word clock edge; the write address
// must be frame*4 + channel (including after a short frame and across the
// wrap of the 1024-word ring), the write counter must stay at 0 while
// wr_run is low, and every sample must read back from the system clock port
// one cycle after its address.
module tb_asrc_data_mem;
  localparam int unsigned SAMP_W = 24, NC_W = 8, BUF_W = 10;
  logic              mclk = 1'b0, clk = 1'b0, in_rst = 1'b1, wr_run = 1'b0;
  logic              wclk = 1'b0, valid = 1'b0;
  logic [SAMP_W-1:0] din = '0, s_data;
  logic [NC_W-1:0]   nc = 8'd4;
  logic [BUF_W-1:0]  waddr, s_addr = '0;
  int checks = 0, failures = 0;
  logic [SAMP_W-1:0] model [2**BUF_W];

  asrc_data_mem #(.SAMP_W(SAMP_W), .NC_W(NC_W), .SAMP_BUF_W(BUF_W)) dut (
    .audio_in_mclk(mclk), .audio_in_rst(in_rst), .wr_run, .audio_in_wclk(wclk),
    .audio_in_valid(valid), .audio_in(din), .nc, .audio_in_waddr(waddr),
    .clk, .s_addr, .s_data);

  always #5 mclk = ~mclk;
  always #3 clk = ~clk;

  // one frame: word clock high for 8 mclk, low for 8; nsamp samples after the edge
  task automatic frame(input int f, input int nsamp, input bit check_addr);
    @(negedge mclk) wclk = 1'b1;
    for (int k = 0; k < 16; k++) begin
      if (k < nsamp) begin
        valid = 1'b1;
        din   = SAMP_W'(f * 16 + k + 1);
        #1;
        if (check_addr) begin
          checks++;
          if (waddr !== BUF_W'(f * 4 + k)) begin
            failures++;
            $display("frame %0d ch %0d: waddr %0d expected %0d", f, k, waddr, f * 4 + k);
          end
        end
        model[waddr] = din;
      end else begin
        valid = 1'b0;
      end
      @(negedge mclk);
      if (k == 7) wclk = 1'b0;
    end
    valid = 1'b0;
  endtask

  initial begin
    repeat (4) @(posedge mclk);
    in_rst = 1'b0;
    // not running: address stays 0
    frame(0, 4, 1'b0);
    checks++;
    if (waddr !== '0) begin failures++; $display("waddr moved while not running"); end
    @(negedge mclk) wr_run = 1'b1;
    for (int f = 0; f < 300; f++) begin
      if (f == 10) frame(f, 3, 1'b1);   // a short frame keeps the alignment
      else         frame(f, 4, 1'b1);
    end
    // read back the whole ring through the system clock port
    for (int a = 0; a < 2**BUF_W; a++) begin
      if (a == 43) continue;           // never written (short frame)
      @(negedge clk) s_addr = BUF_W'(a);
      @(negedge clk);
      checks++;
      if (s_data !== model[a]) begin
        failures++;
        $display("read %0d: %0h expected %0h", a, s_data, model[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge mclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
