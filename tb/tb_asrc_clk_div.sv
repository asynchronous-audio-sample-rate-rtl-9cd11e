// Testbench of asrc_clk_div: for several division values the word clock
// period must be div+1 master clock cycles and the high time div/2+1 cycles
// (50% duty cycle to within one master clock cycle), measured over several
// periods after a reset.
module tb_asrc_clk_div;
  logic        mclk = 1'b0, rst = 1'b1, wclk;
  logic [12:0] div = 13'd1;
  int checks = 0, failures = 0;
  int unsigned divs[6] = '{1, 2, 7, 55, 500, 1000};

  asrc_clk_div dut (.mclk, .rst, .div, .wclk);

  always #5 mclk = ~mclk;

  initial begin
    foreach (divs[k]) begin
      int period, high, cyc, last_rise, nper;
      @(negedge mclk);
      rst = 1'b1; div = 13'(divs[k]);
      repeat (2) @(negedge mclk);
      rst = 1'b0;
      cyc = 0; last_rise = -1; nper = 0; high = 0;
      while (nper < 4) begin
        logic prev;
        prev = wclk;
        @(negedge mclk);
        cyc++;
        if (wclk) high++;
        if (wclk && !prev) begin
          if (last_rise >= 0) begin
            period = cyc - last_rise;
            checks += 2;
            if (period != int'(divs[k]) + 1) begin
              failures++; $display("div %0d: period %0d", divs[k], period);
            end
            // high counts the cycles of the previous period plus this edge
            if (high - 1 != int'(divs[k]) / 2 + 1) begin
              failures++; $display("div %0d: high for %0d cycles", divs[k], high - 1);
            end
            nper++;
          end
          last_rise = cyc;
          high = 1;
        end
      end
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
