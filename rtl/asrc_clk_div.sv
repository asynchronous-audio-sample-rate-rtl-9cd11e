// Word clock generator of the test wrapper: divides an audio master clock
// into a word clock.
//
// A counter runs on every master clock cycle and returns to zero once it has
// reached the division value div, so one word clock period is div+1 master
// clock periods. A register compares the counter with half the division
// value (div shifted right by one): the word clock is high while the counter
// is at or below div/2 and low for the rest of the period, a 50% duty cycle
// to within half a master clock cycle. wclk is a register output; after
// reset it rises on the first master clock edge and then every div+1 edges.
// The counter, the reset at the division value and the shifted compare
// follow the wrapper's description; the polarity (high in the first half)
// and the reset value are this design's choices. div is a configuration
// value, expected to be steady while the divider runs.
module asrc_clk_div #(
  parameter int unsigned DIV_W = 13
) (
  input  logic             mclk,
  input  logic             rst,     // synchronous to mclk
  input  logic [DIV_W-1:0] div,     // master clock periods per word clock period, minus one
  output logic             wclk
);
  logic [DIV_W-1:0] cnt, cnt_nxt;

  assign cnt_nxt = (cnt >= div) ? '0 : cnt + 1'b1;

  always_ff @(posedge mclk) begin
    if (rst) begin
      cnt  <= div;
      wclk <= 1'b0;
    end else begin
      cnt  <= cnt_nxt;
      wclk <= (cnt_nxt <= (div >> 1));
    end
  end
endmodule
