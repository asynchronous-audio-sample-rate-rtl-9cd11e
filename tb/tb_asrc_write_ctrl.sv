// Testbench of asrc_write_ctrl: word clock edges every 20 master clock
// cycles; for random Nc (1..8) each edge must be followed by exactly Nc
// consecutive buffer reads, starting on the master clock edge after the one
// that saw the word clock high (that edge resets the counter), and audio_in_valid must
// repeat fifo_rd one cycle later. With en low no reads may happen. Nc is
// changed under reset, as a configuration value.
module tb_asrc_write_ctrl;
  logic       mclk = 1'b0, rst = 1'b1, en = 1'b1, wclk = 1'b0;
  logic [7:0] nc = 8'd2;
  logic       fifo_rd, audio_in_valid;
  int checks = 0, failures = 0;

  asrc_write_ctrl dut (.mclk, .rst, .en, .nc, .audio_in_wclk(wclk), .fifo_rd, .audio_in_valid);

  always #5 mclk = ~mclk;

  initial begin
    logic rd_q;
    repeat (3) @(negedge mclk);
    rst = 1'b0;
    @(negedge mclk);
    checks++;
    if (fifo_rd) begin failures++; $display("reads before the first edge"); end
    for (int f = 0; f < 200; f++) begin
      int nreads, first;
      if (f % 20 == 0) begin           // Nc is changed only under reset
        rst = 1'b1;
        nc  = 8'($urandom_range(1, 8));
        @(negedge mclk);
        rst = 1'b0;
      end
      en = (f < 150) || (f >= 170);
      wclk = 1'b1;
      nreads = 0; first = -1; rd_q = 1'b0;
      for (int c = 0; c < 20; c++) begin
        if (c == 10) wclk = 1'b0;
        @(posedge mclk);
        checks++;
        if (audio_in_valid !== rd_q) begin failures++; $display("frame %0d: valid not aligned", f); end
        rd_q = fifo_rd;
        if (fifo_rd) begin
          if (first < 0) first = c;
          nreads++;
        end
        @(negedge mclk);
      end
      checks += 2;
      if (nreads != (en ? int'(nc) : 0)) begin failures++; $display("frame %0d: %0d reads, Nc %0d en %0b", f, nreads, nc, en); end
      if (en && first != 1) begin failures++; $display("frame %0d: first read at %0d", f, first); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge mclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
