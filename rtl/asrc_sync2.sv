// Two-flip-flop synchronizer.
//
// Brings a single slow level signal (an audio word clock or a status flag)
// into the clock domain of clk. The two registers are clocked by clk, as the
// design prescribes for the slow-to-fast word clock crossings; the output lags
// the input by two to three clk cycles. Reset value is 0 (own choice).
module asrc_sync2 (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);
  logic meta;

  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= 1'b0;
      q    <= 1'b0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
