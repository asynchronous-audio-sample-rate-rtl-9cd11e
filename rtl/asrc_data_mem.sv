// Input data memory: circular buffer of TDM input samples.
//
// A true dual-port RAM of 2**SAMP_BUF_W words. The write port runs in the
// audio_in_mclk domain: every mclk cycle with audio_in_valid high stores
// audio_in at audio_in_waddr. The write address is frame aligned: a rising
// edge of audio_in_wclk (detected with one register in the mclk domain)
// starts a new frame whose base is the previous base plus Nc, and the
// channel slot inside the frame counts the valid samples since that edge.
// With exactly Nc samples per frame this is the plain "+1 per sample"
// counter; the frame alignment is this design's choice and keeps channel k
// of frame f at address f*Nc+k even if a frame is short.
// The read port runs in the clk domain with one cycle of latency
// (s_data is registered, valid the cycle after s_addr).
// wr_run (already in the mclk domain) holds the write counter at address 0
// until the converter is synchronized, so that the read pointer of the
// resampler, started at the same moment, keeps a known distance to it; this
// hold is this design's choice.
// Pointers wrap around, so newer samples overwrite the oldest ones.
module asrc_data_mem #(
  parameter int unsigned SAMP_W     = 24,
  parameter int unsigned NC_W       = 8,
  parameter int unsigned SAMP_BUF_W = 10
) (
  // input audio master clock domain
  input  logic                  audio_in_mclk,
  input  logic                  audio_in_rst,    // synchronous to audio_in_mclk
  input  logic                  wr_run,
  input  logic                  audio_in_wclk,
  input  logic                  audio_in_valid,
  input  logic [SAMP_W-1:0]     audio_in,
  input  logic [NC_W-1:0]       nc,
  output logic [SAMP_BUF_W-1:0] audio_in_waddr,
  // system clock domain
  input  logic                  clk,
  input  logic [SAMP_BUF_W-1:0] s_addr,
  output logic [SAMP_W-1:0]     s_data
);
  logic [SAMP_W-1:0]     mem [2**SAMP_BUF_W];
  logic                  wclk_q;
  logic                  frame_start;
  logic [SAMP_BUF_W-1:0] frame_base, slot;
  logic [SAMP_BUF_W-1:0] base_nxt, slot_nxt;

  assign frame_start = audio_in_wclk & ~wclk_q;

  always_comb begin
    base_nxt = frame_base;
    slot_nxt = slot;
    if (frame_start) begin
      if (slot != '0) base_nxt = frame_base + SAMP_BUF_W'(nc);
      slot_nxt = '0;
    end
  end

  assign audio_in_waddr = base_nxt + slot_nxt;

  always_ff @(posedge audio_in_mclk) begin
    if (audio_in_rst || !wr_run) begin
      wclk_q     <= audio_in_wclk;
      frame_base <= '0;
      slot       <= '0;
    end else begin
      wclk_q     <= audio_in_wclk;
      frame_base <= base_nxt;
      slot       <= slot_nxt + SAMP_BUF_W'(audio_in_valid);
    end
  end

  always_ff @(posedge audio_in_mclk) begin
    if (audio_in_valid) mem[audio_in_waddr] <= audio_in;
  end

  always_ff @(posedge clk) begin
    s_data <= mem[s_addr];
  end
endmodule
