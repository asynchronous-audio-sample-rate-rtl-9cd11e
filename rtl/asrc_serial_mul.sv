// Serial shift-add multiplier (unsigned).
//
// Shared by the ratio estimator. A one-cycle start pulse (or a held enable:
// start is only sampled while the unit is ready) loads the operands; the unit
// then adds the shifted multiplicand for each set multiplier bit, one bit per
// clock, and raises ready with the product after W cycles. The product stays
// valid until the next start. The design asks for a shift-add unit for small
// area; the exact sequencing is this design's choice.
module asrc_serial_mul #(
  parameter int unsigned W = 32
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic [W-1:0]   multiplicand,
  input  logic [W-1:0]   multiplier,
  output logic           ready,
  output logic [2*W-1:0] product
);
  logic [2*W-1:0]       mcand;
  logic [W-1:0]         mplier;
  logic [$clog2(W+1)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      ready   <= 1'b1;
      cnt     <= '0;
      mcand   <= '0;
      mplier  <= '0;
      product <= '0;
    end else if (ready) begin
      if (start) begin
        ready   <= 1'b0;
        mcand   <= (2*W)'(multiplicand);
        mplier  <= multiplier;
        product <= '0;
        cnt     <= '0;
      end
    end else begin
      if (mplier[0]) product <= product + mcand;
      mcand  <= mcand << 1;
      mplier <= mplier >> 1;
      cnt    <= cnt + 1'b1;
      if (cnt == ($clog2(W+1))'(W-1)) ready <= 1'b1;
    end
  end
endmodule
