// Period meter of one audio word clock.
//
// wclk_rise is the rising edge of a word clock already synchronized into
// the clk domain. A counter measures, in clk cycles, the time between two
// rising edges; while en is high each completed period is added to t_acc
// and t_cnt is incremented, so t_acc / t_cnt is the average period. The
// partial period before the first edge seen after clear is discarded, and so
// is the first period after it: right after reset the synchronized word clock
// can show a false rising edge (its synchronizer starts at 0), which would
// make that period short (this design's choice). clear zeroes the
// accumulator and the counter.
// Widths: ACC_W bits of accumulated period and count, enough for the 32-bit
// synchronization time of the core.
module asrc_period_meter #(
  parameter int unsigned ACC_W = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  logic             en,
  input  logic             wclk_rise,
  output logic [ACC_W-1:0] t_acc,
  output logic [ACC_W-1:0] t_cnt
);
  logic [ACC_W-1:0] period;
  logic [1:0]       armed;   // edges seen since clear, saturating at 2

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      period <= '0;
      armed  <= '0;
      t_acc  <= '0;
      t_cnt  <= '0;
    end else if (en) begin
      if (wclk_rise) begin
        period <= ACC_W'(1);
        if (armed != 2'd2) armed <= armed + 1'b1;
        if (armed == 2'd2) begin
          t_acc <= t_acc + period;
          t_cnt <= t_cnt + 1'b1;
        end
      end else begin
        period <= period + 1'b1;
      end
    end
  end
endmodule
