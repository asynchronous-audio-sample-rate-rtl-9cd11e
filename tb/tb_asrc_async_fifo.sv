// Testbench of asrc_async_fifo with unrelated write (10 ns) and read
// (17 ns) clocks: random pushes and pops must come out in order and intact;
// empty must hold at start; with the reader stopped the FIFO must fill
// (full after 2**ADDR_W words) and a further push must raise overflow and be
// dropped; afterwards everything accepted must drain in order. The fill
// levels seen from both sides must read 2**ADDR_W when full and 0 when empty.
module tb_asrc_async_fifo;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int unsigned DW = 24, AW = 4;
  logic          wclk = 1'b0, rclk = 1'b0, wrst = 1'b1, rrst = 1'b1;
  logic          wr_en = 1'b0, rd_en = 1'b0, full, overflow, empty;
  logic [DW-1:0] wdata = '0, rdata;
  logic [AW:0]   wlevel, rlevel;
  logic [DW-1:0] q[$];
  int checks = 0, failures = 0, nread = 0, noverflow = 0;
  bit  rd_pending = 0;
  logic [DW-1:0] expect_word;

  asrc_async_fifo #(.DATA_W(DW), .ADDR_W(AW)) dut (
    .wr_clk(wclk), .wr_rst(wrst), .wr_en, .wr_data(wdata), .full, .overflow, .wr_level(wlevel),
    .rd_clk(rclk), .rd_rst(rrst), .rd_en, .rd_data(rdata), .empty, .rd_level(rlevel));

  always #5 wclk = ~wclk;
  always #8.5 rclk = ~rclk;

  // reader: checks the word popped on the previous edge
  bit reader_on = 0;
  always @(posedge rclk) begin
    if (rd_pending) begin
      checks++;
      if (rdata !== expect_word) begin
        failures++;
        $display("read %0d: %0h expected %0h", nread, rdata, expect_word);
      end
      nread++;
    end
    rd_pending = 0;
    if (rd_en && !empty) begin
      expect_word = q.pop_front();
      rd_pending  = 1;
    end
  end
  always @(negedge rclk) rd_en = reader_on && ($urandom_range(0, 3) != 0);

  always @(posedge wclk) if (overflow) noverflow++;

  task automatic push(input logic [DW-1:0] v);
    @(negedge wclk);
    wr_en = 1'b1; wdata = v;
    if (!full) q.push_back(v);
    @(negedge wclk);
    wr_en = 1'b0;
  endtask

  initial begin
    repeat (4) @(posedge rclk);
    wrst = 1'b0; rrst = 1'b0;
    checks++;
    if (!empty) begin failures++; $display("not empty after reset"); end
    reader_on = 1;
    for (int i = 0; i < 400; i++) begin
      push(DW'($urandom));
      repeat ($urandom_range(0, 2)) @(negedge wclk);
    end
    wait (q.size() == 0);
    repeat (10) @(posedge rclk);
    reader_on = 0;
    repeat (4) @(posedge rclk);
    for (int i = 0; i < 2**AW; i++) push(DW'(i + 100));
    repeat (2) @(negedge wclk);
    checks++;
    if (!full) begin failures++; $display("not full after %0d pushes", 2**AW); end
    repeat (4) @(posedge rclk);
    checks += 2;
    if (wlevel != 2**AW) begin failures++; $display("write-side level %0d", wlevel); end
    if (rlevel != 2**AW) begin failures++; $display("read-side level %0d", rlevel); end
    push(DW'(999));                    // dropped
    repeat (2) @(negedge wclk);
    checks++;
    if (noverflow != 1) begin failures++; $display("overflow pulses %0d", noverflow); end
    reader_on = 1;
    wait (q.size() == 0);
    repeat (10) @(posedge rclk);
    checks++;
    if (!empty) begin failures++; $display("not empty after drain"); end
    checks += 2;
    if (wlevel != 0 || rlevel != 0) begin failures++; $display("levels %0d %0d after drain", wlevel, rlevel); end
    checks++;
    if (nread != 400 + 2**AW) begin failures++; $display("read %0d words", nread); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge wclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
