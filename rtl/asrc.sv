// Asynchronous sample rate converter (ASRC) core, top level.
//
// Converts a stream of Nc time-division multiplexed audio channels from the
// input sample rate (audio_in_wclk) to the output sample rate (audio_out_wclk)
// in a third, faster system clock domain (clk). Input samples are written in
// the audio_in_mclk domain into a dual-port circular memory; the ratio
// estimator measures rho = fs_out/fs_in and tracks 1/rho; on every rising
// edge of the (synchronized) output word clock, once synchronized, the
// resampler computes Nc new output samples with a windowed-sinc filter and
// pushes them into an asynchronous FIFO read in the audio_out_mclk domain.
//
// Interface (per the core's interface table): Nc must be a power of two;
// sync_cycles is the measurement time in clk cycles; sync rises when the
// conversion ratio is known. audio_in is written on each audio_in_mclk edge
// with audio_in_valid; audio_in_ready is high once writes go to the ring.
// audio_out_valid is the read request of the output FIFO (audio_out_mclk
// domain); audio_out shows the sample the cycle after a read; audio_out_ready
// is high and audio_out_empty low while samples are buffered.
// error[0]: Nc is zero or not a power of two; error[1]: the input/output
// pointer distance drifted (sticky); error[2]: output buffer overflow (sticky).
// rst is synchronous to clk and is synchronized into the two audio domains.
// The block structure follows the design (including the two-register word
// clock synchronizers, the start edge detector and the sync AND gate); the
// error bit meanings beyond their names, the audio_in_ready meaning, the
// reset distribution and the FIFO depth are this design's choices.
module asrc
  import asrc_pkg::*;
#(
  parameter int unsigned SAMP_W     = 24,
  parameter int unsigned NC_W       = 8,
  parameter int unsigned RO_W       = 35,
  parameter int unsigned SAMP_BUF_W = 10,
  parameter int unsigned OUT_BUF_W  = 8,
  parameter int unsigned N_OUT_LOG2 = 12
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [NC_W-1:0]   nc,
  input  logic [31:0]       sync_cycles,
  output logic              sync,
  output logic [RO_W-1:0]   conv_ratio,
  output logic [RO_W-1:0]   inv_conv_ratio,
  input  logic [SAMP_W-1:0] audio_in,
  input  logic              audio_in_valid,
  output logic              audio_in_ready,
  input  logic              audio_in_mclk,
  input  logic              audio_in_wclk,
  output logic [SAMP_W-1:0] audio_out,
  output logic              audio_out_ready,
  input  logic              audio_out_wclk,
  input  logic              audio_out_mclk,
  input  logic              audio_out_valid,
  output logic              audio_out_empty,
  output logic [2:0]        error
);
  // ---- resets and status into the audio domains
  logic in_rst, out_rst, in_sync;
  asrc_sync2 u_in_rst_sync  (.clk(audio_in_mclk),  .rst(1'b0), .d(rst),  .q(in_rst));
  asrc_sync2 u_out_rst_sync (.clk(audio_out_mclk), .rst(1'b0), .d(rst),  .q(out_rst));
  asrc_sync2 u_in_sync_sync (.clk(audio_in_mclk),  .rst(in_rst), .d(sync), .q(in_sync));
  assign audio_in_ready = in_sync;

  // ---- word clock synchronizers and start edge detector
  logic in_wclk_s, out_wclk_s, out_wclk_q, start, start_sync;
  asrc_sync2 u_in_wclk_sync  (.clk, .rst, .d(audio_in_wclk),  .q(in_wclk_s));
  asrc_sync2 u_out_wclk_sync (.clk, .rst, .d(audio_out_wclk), .q(out_wclk_s));

  always_ff @(posedge clk) begin
    if (rst) out_wclk_q <= 1'b0;
    else     out_wclk_q <= out_wclk_s;
  end
  assign start      = out_wclk_s & ~out_wclk_q;
  assign start_sync = start & sync;

  // ---- input data memory
  logic [SAMP_BUF_W-1:0] s_addr, audio_in_waddr;
  logic [SAMP_W-1:0]     s_data;

  asrc_data_mem #(.SAMP_W(SAMP_W), .NC_W(NC_W), .SAMP_BUF_W(SAMP_BUF_W)) u_data_mem (
    .audio_in_mclk, .audio_in_rst(in_rst), .wr_run(in_sync), .audio_in_wclk,
    .audio_in_valid, .audio_in, .nc, .audio_in_waddr,
    .clk, .s_addr, .s_data);

  // ---- ratio estimator
  logic ptr_diff_err, correction_applied;

  asrc_ratio_estimator #(.RO_W(RO_W), .NC_W(NC_W), .SAMP_BUF_W(SAMP_BUF_W),
                         .N_OUT_LOG2(N_OUT_LOG2)) u_ratio_est (
    .clk, .rst, .sync_cycles, .nc, .in_wclk_s, .out_wclk_s, .sync,
    .conv_ratio, .inv_conv_ratio, .ptr_diff_err, .correction_applied);

  // ---- resampler
  logic [17:0]       y_addr;
  logic [SAMP_W-1:0] y;
  logic              y_valid, rs_busy;

  asrc_resampler #(.SAMP_W(SAMP_W), .RO_W(RO_W), .NC_W(NC_W), .SAMP_BUF_W(SAMP_BUF_W)) u_resampler (
    .clk, .rst, .start_sync, .nc, .conv_ratio, .inv_conv_ratio,
    .s_addr, .s_data, .y_addr, .audio_out(y), .audio_out_valid(y_valid), .busy(rs_busy));

  // ---- output buffer
  logic fifo_full, fifo_overflow;

  asrc_async_fifo #(.DATA_W(SAMP_W), .ADDR_W(OUT_BUF_W)) u_out_fifo (
    .wr_clk(clk), .wr_rst(rst), .wr_en(y_valid), .wr_data(y),
    .full(fifo_full), .overflow(fifo_overflow), .wr_level(),
    .rd_clk(audio_out_mclk), .rd_rst(out_rst), .rd_en(audio_out_valid),
    .rd_data(audio_out), .empty(audio_out_empty), .rd_level());

  assign audio_out_ready = !audio_out_empty;

  // ---- error bits
  logic outbuf_err;
  always_ff @(posedge clk) begin
    if (rst)                outbuf_err <= 1'b0;
    else if (fifo_overflow) outbuf_err <= 1'b1;
  end

  assign error[ERR_NCH]      = (nc == '0) || ((nc & (nc - 1'b1)) != '0);
  assign error[ERR_PTR_DIFF] = ptr_diff_err;
  assign error[ERR_OUTBUF]   = outbuf_err;
endmodule
