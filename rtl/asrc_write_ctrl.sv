// Input write control of the test wrapper: moves one frame of Nc samples
// from the input buffer into the converter after each input word clock edge.
//
// A positive edge detector on audio_in_wclk (a register in the
// audio_in_mclk domain) resets a counter; the counter then counts one step
// per master clock cycle as long as it is below nc. While it is below nc,
// fifo_rd requests one sample from the input buffer per cycle. The buffer
// shows a popped word one cycle later, so audio_in_valid is fifo_rd delayed
// by one register and lines up with the sample. With en low (the pointer
// switch register) no samples are moved.
// Timing: the first mclk edge that sees wclk high resets the counter;
// fifo_rd is high for the nc cycles after that edge and audio_in_valid one
// cycle later still.
// The edge detector, counter and compare with Nc follow the wrapper's
// description; the one-cycle alignment register, the idle counter value
// after reset (all ones, so nothing is read before the first edge) and the
// enable are this design's choices.
module asrc_write_ctrl #(
  parameter int unsigned NC_W = 8
) (
  input  logic            mclk,
  input  logic            rst,            // synchronous to mclk
  input  logic            en,
  input  logic [NC_W-1:0] nc,
  input  logic            audio_in_wclk,
  output logic            fifo_rd,
  output logic            audio_in_valid
);
  logic            wclk_q, edge_det;
  logic [NC_W-1:0] cnt;

  assign edge_det = audio_in_wclk & ~wclk_q;
  assign fifo_rd  = en && (cnt < nc);

  always_ff @(posedge mclk) begin
    if (rst) begin
      wclk_q         <= 1'b0;
      cnt            <= '1;
      audio_in_valid <= 1'b0;
    end else begin
      wclk_q         <= audio_in_wclk;
      audio_in_valid <= fifo_rd;
      if (edge_det)      cnt <= '0;
      else if (cnt < nc) cnt <= cnt + 1'b1;
    end
  end
endmodule
