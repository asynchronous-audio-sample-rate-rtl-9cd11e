// Multiply-accumulate unit of the resampler.
//
// Each cycle with addr_valid multiplies the input sample (signed Q1.23) by
// the filter coefficient (signed Q1.33). The product is registered (one
// pipeline stage), then either loaded into the accumulator (first_addr, the
// first coefficient of a channel) or added to it. When addr_done arrives
// (after the last product of the channel has been accumulated) the
// accumulator is multiplied by h_step, which restores unit pass-band gain,
// rounded and saturated to SAMP_W bits and stored in the output register;
// y_valid pulses with it. The output register therefore never shows a
// partial sum. The flags must arrive aligned with s_data and coeff.
// Timing: y_valid rises two cycles after the addr_done input.
// The structure follows the design; the widths, rounding and saturation are
// this design's choices.
module asrc_macc
  import asrc_pkg::*;
#(
  parameter int unsigned SAMP_W = 24,
  parameter int unsigned ACC_W  = 64
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [SAMP_W-1:0] s_data,
  input  logic signed [COEF_W-1:0] coeff,
  input  logic                     first_addr,
  input  logic                     addr_valid,
  input  logic                     addr_done,
  input  logic [HSTEP_W-1:0]       h_step,
  output logic signed [SAMP_W-1:0] audio_out,
  output logic                     y_valid
);
  localparam int unsigned PROD_W  = SAMP_W + COEF_W;
  localparam int unsigned SCALE_W = ACC_W + HSTEP_W + 1;
  // accumulator has (SAMP_W-1)+(COEF_W-1) fractional bits, h_step RO_FRAC
  localparam int unsigned SHIFT   = (COEF_W - 1) + RO_FRAC;

  logic signed [PROD_W-1:0]  prod;
  logic                      p_first, p_valid, p_done;
  logic signed [ACC_W-1:0]   acc;
  logic signed [SCALE_W-1:0] scaled, rounded;
  logic signed [SCALE_W-1:0] out_max, out_min;

  always_ff @(posedge clk) begin
    if (rst) begin
      prod    <= '0;
      p_first <= 1'b0;
      p_valid <= 1'b0;
      p_done  <= 1'b0;
    end else begin
      prod    <= PROD_W'(s_data) * PROD_W'(coeff);
      p_first <= first_addr;
      p_valid <= addr_valid;
      p_done  <= addr_done;
    end
  end

  assign scaled  = SCALE_W'(acc) * $signed({1'b0, h_step});
  assign rounded = (scaled + (SCALE_W'(1) <<< (SHIFT - 1))) >>> SHIFT;
  assign out_max = SCALE_W'(2**(SAMP_W-1) - 1);
  assign out_min = -SCALE_W'(2**(SAMP_W-1));

  always_ff @(posedge clk) begin
    if (rst) begin
      acc       <= '0;
      audio_out <= '0;
      y_valid   <= 1'b0;
    end else begin
      y_valid <= p_done;
      if (p_valid) acc <= p_first ? ACC_W'(prod) : acc + ACC_W'(prod);
      if (p_done) begin
        if (rounded > out_max)      audio_out <= out_max[SAMP_W-1:0];
        else if (rounded < out_min) audio_out <= out_min[SAMP_W-1:0];
        else                        audio_out <= rounded[SAMP_W-1:0];
      end
    end
  end
endmodule
