// Test wrapper of the ASRC core: connects the converter to a processor's
// native memory-mapped interface.
//
// Four parts, as in the wrapper's block diagram:
//  * a bank of software registers (ASRC control and status at 0x00-0x40,
//    buffer status at 0x44-0x58, DMA control at 0x5c-0x78, two switches at
//    0x7c and 0x80; byte addresses, one 32-bit register each);
//  * two clock selectors, choosing audio_mclk_0 or audio_mclk_1 as the input
//    and output master clocks, and two dividers (asrc_clk_div) making the
//    word clocks from them;
//  * an input buffer (system clock to audio_in_mclk) emptied by the write
//    control (asrc_write_ctrl), Nc samples after every input word clock
//    edge, and an output buffer (audio_out_mclk to system clock) filled from
//    the core's output whenever it holds a sample;
//  * ports for a DMA engine, which moves bursts between the buffers and
//    external memory: the DMA itself is not part of this RTL.
// Bus: iob_valid starts an access; it is a write when iob_wstrb is not zero.
// iob_ready is high for one cycle one clock later, with iob_rdata for reads.
// Writing 1 to ASRC_WR (0x0c) pushes ASRC_DATA_IN into the input buffer;
// writing 1 to ASRC_RD (0x10) pops the output buffer, whose word then reads
// at ASRC_DATA_OUT (0x14) and on dma_out_data. INDMA_RUN/OUTDMA_RUN writes
// give one-cycle pulses. ASRC_SOFT_RESET holds the core in reset while 1.
// The register map, widths and initial values, the buffer sizes (2**7) and
// the four-part structure follow the design. This design's own choices:
// the handshake of the bus; write registers read back their value; the
// buffer levels are FIFO_*_ADDR_W+1 bits wide so that a full buffer reads
// as 2**FIFO_*_ADDR_W; the clock selectors are plain multiplexers, so the
// selection must only change while the converter is held in reset; the
// configuration registers cross into the audio domains without
// synchronizers and must be steady while they are used.
module asrc_wrapper #(
  parameter int unsigned SAMP_W          = 24,
  parameter int unsigned FIFO_IN_ADDR_W  = 7,
  parameter int unsigned FIFO_OUT_ADDR_W = 7,
  parameter int unsigned DMA_ADDR_W      = 30,
  parameter int unsigned N_OUT_LOG2      = 12
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  audio_mclk_0,
  input  logic                  audio_mclk_1,
  // native memory-mapped interface
  input  logic                  iob_valid,
  input  logic [7:0]            iob_addr,
  input  logic [31:0]           iob_wdata,
  input  logic [3:0]            iob_wstrb,
  output logic [31:0]           iob_rdata,
  output logic                  iob_ready,
  // DMA engine side
  input  logic                  dma_in_wr,
  input  logic [SAMP_W-1:0]     dma_in_data,
  input  logic                  dma_out_rd,
  output logic [SAMP_W-1:0]     dma_out_data,
  output logic [DMA_ADDR_W-1:0] indma_addr,
  output logic [7:0]            indma_len,
  output logic                  indma_run,
  input  logic                  indma_ready,
  output logic [DMA_ADDR_W-1:0] outdma_addr,
  output logic [7:0]            outdma_len,
  output logic                  outdma_run,
  input  logic                  outdma_ready
);
  localparam int unsigned RO_W = 35;

  // ---- register bank
  logic [7:0]        r_nc;
  logic              r_soft_reset, r_clkin_sel, r_clkout_sel;
  logic [SAMP_W-1:0] r_data_in;
  logic [12:0]       r_clkin_div, r_clkout_div;
  logic [31:0]       r_sync_cycles;
  logic              r_outfifo_switch, r_ptr_diff_switch;
  logic              cpu_wr, cpu_rd;
  logic              wr_acc;

  // status
  logic                     sync;
  logic [RO_W-1:0]          ro, inv_ro;
  logic [2:0]               error;
  logic                     in_full, out_empty;
  logic [FIFO_IN_ADDR_W:0]  in_level;
  logic [FIFO_OUT_ADDR_W:0] out_level;
  logic [SAMP_W-1:0]        data_out;

  assign wr_acc = iob_valid && (iob_wstrb != '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      r_nc              <= 8'd1;
      r_soft_reset      <= 1'b0;
      r_data_in         <= '0;
      r_clkin_sel       <= 1'b0;
      r_clkout_sel      <= 1'b1;
      r_clkin_div       <= 13'd500;
      r_clkout_div      <= 13'd1000;
      r_sync_cycles     <= '0;
      indma_addr        <= '0;
      indma_len         <= '0;
      outdma_addr       <= '0;
      outdma_len        <= '0;
      r_outfifo_switch  <= 1'b1;
      r_ptr_diff_switch <= 1'b1;
      cpu_wr            <= 1'b0;
      cpu_rd            <= 1'b0;
      indma_run         <= 1'b0;
      outdma_run        <= 1'b0;
      iob_ready         <= 1'b0;
      iob_rdata         <= '0;
    end else begin
      cpu_wr     <= 1'b0;
      cpu_rd     <= 1'b0;
      indma_run  <= 1'b0;
      outdma_run <= 1'b0;
      iob_ready  <= iob_valid;
      if (wr_acc) begin
        unique case (iob_addr)
          8'h00: r_nc              <= iob_wdata[7:0];
          8'h04: r_soft_reset      <= iob_wdata[0];
          8'h08: r_data_in         <= iob_wdata[SAMP_W-1:0];
          8'h0c: cpu_wr            <= iob_wdata[0];
          8'h10: cpu_rd            <= iob_wdata[0];
          8'h1c: r_clkin_sel       <= iob_wdata[0];
          8'h20: r_clkout_sel      <= iob_wdata[0];
          8'h24: r_clkin_div       <= iob_wdata[12:0];
          8'h28: r_clkout_div      <= iob_wdata[12:0];
          8'h2c: r_sync_cycles     <= iob_wdata;
          8'h5c: indma_addr        <= iob_wdata[DMA_ADDR_W-1:0];
          8'h60: indma_len         <= iob_wdata[7:0];
          8'h64: indma_run         <= iob_wdata[0];
          8'h6c: outdma_addr       <= iob_wdata[DMA_ADDR_W-1:0];
          8'h70: outdma_len        <= iob_wdata[7:0];
          8'h74: outdma_run        <= iob_wdata[0];
          8'h7c: r_outfifo_switch  <= iob_wdata[0];
          8'h80: r_ptr_diff_switch <= iob_wdata[0];
          default: ;
        endcase
      end else if (iob_valid) begin
        unique case (iob_addr)
          8'h00: iob_rdata <= 32'(r_nc);
          8'h04: iob_rdata <= 32'(r_soft_reset);
          8'h08: iob_rdata <= 32'(r_data_in);
          8'h14: iob_rdata <= 32'(data_out);
          8'h18: iob_rdata <= 32'(error);
          8'h1c: iob_rdata <= 32'(r_clkin_sel);
          8'h20: iob_rdata <= 32'(r_clkout_sel);
          8'h24: iob_rdata <= 32'(r_clkin_div);
          8'h28: iob_rdata <= 32'(r_clkout_div);
          8'h2c: iob_rdata <= r_sync_cycles;
          8'h30: iob_rdata <= 32'(sync);
          8'h34: iob_rdata <= ro[31:0];
          8'h38: iob_rdata <= 32'(ro[RO_W-1:32]);
          8'h3c: iob_rdata <= inv_ro[31:0];
          8'h40: iob_rdata <= 32'(inv_ro[RO_W-1:32]);
          8'h44: iob_rdata <= 32'(in_full);
          8'h48: iob_rdata <= 32'(in_level == '0);
          8'h4c: iob_rdata <= 32'(in_level);
          8'h50: iob_rdata <= 32'(out_level == (FIFO_OUT_ADDR_W+1)'(2**FIFO_OUT_ADDR_W));
          8'h54: iob_rdata <= 32'(out_empty);
          8'h58: iob_rdata <= 32'(out_level);
          8'h5c: iob_rdata <= 32'(indma_addr);
          8'h60: iob_rdata <= 32'(indma_len);
          8'h68: iob_rdata <= 32'(indma_ready);
          8'h6c: iob_rdata <= 32'(outdma_addr);
          8'h70: iob_rdata <= 32'(outdma_len);
          8'h78: iob_rdata <= 32'(outdma_ready);
          8'h7c: iob_rdata <= 32'(r_outfifo_switch);
          8'h80: iob_rdata <= 32'(r_ptr_diff_switch);
          default: iob_rdata <= '0;
        endcase
      end
    end
  end

  // ---- clock selectors and dividers
  logic audio_in_mclk, audio_out_mclk, audio_in_wclk, audio_out_wclk;
  logic in_mrst, out_mrst;

  assign audio_in_mclk  = r_clkin_sel  ? audio_mclk_1 : audio_mclk_0;
  assign audio_out_mclk = r_clkout_sel ? audio_mclk_1 : audio_mclk_0;

  asrc_sync2 u_in_mrst  (.clk(audio_in_mclk),  .rst(1'b0), .d(rst), .q(in_mrst));
  asrc_sync2 u_out_mrst (.clk(audio_out_mclk), .rst(1'b0), .d(rst), .q(out_mrst));

  asrc_clk_div u_in_div  (.mclk(audio_in_mclk),  .rst(in_mrst),  .div(r_clkin_div),  .wclk(audio_in_wclk));
  asrc_clk_div u_out_div (.mclk(audio_out_mclk), .rst(out_mrst), .div(r_clkout_div), .wclk(audio_out_wclk));

  // ---- input buffer and write control
  logic              in_rd, audio_in_valid, in_empty, in_ovf;
  logic [SAMP_W-1:0] audio_in;

  asrc_async_fifo #(.DATA_W(SAMP_W), .ADDR_W(FIFO_IN_ADDR_W)) u_in_fifo (
    .wr_clk(clk), .wr_rst(rst), .wr_en(cpu_wr || dma_in_wr),
    .wr_data(dma_in_wr ? dma_in_data : r_data_in),
    .full(in_full), .overflow(in_ovf), .wr_level(in_level),
    .rd_clk(audio_in_mclk), .rd_rst(in_mrst), .rd_en(in_rd),
    .rd_data(audio_in), .empty(in_empty), .rd_level());

  asrc_write_ctrl u_write_ctrl (
    .mclk(audio_in_mclk), .rst(in_mrst), .en(r_ptr_diff_switch), .nc(r_nc),
    .audio_in_wclk, .fifo_rd(in_rd), .audio_in_valid);

  // ---- converter core
  logic              core_rst, audio_in_ready, audio_out_ready, core_empty, core_rd;
  logic [SAMP_W-1:0] audio_out;

  assign core_rst = rst || r_soft_reset;

  asrc #(.SAMP_W(SAMP_W), .N_OUT_LOG2(N_OUT_LOG2)) u_asrc (
    .clk, .rst(core_rst), .nc(r_nc), .sync_cycles(r_sync_cycles), .sync,
    .conv_ratio(ro), .inv_conv_ratio(inv_ro),
    .audio_in, .audio_in_valid, .audio_in_ready, .audio_in_mclk, .audio_in_wclk,
    .audio_out, .audio_out_ready, .audio_out_wclk, .audio_out_mclk,
    .audio_out_valid(core_rd), .audio_out_empty(core_empty), .error);

  // ---- output buffer: move each converted sample out of the core
  logic out_full, out_ovf, out_wr;

  assign core_rd = r_outfifo_switch && audio_out_ready && !out_full;

  always_ff @(posedge audio_out_mclk) begin
    if (out_mrst) out_wr <= 1'b0;
    else          out_wr <= core_rd;
  end

  asrc_async_fifo #(.DATA_W(SAMP_W), .ADDR_W(FIFO_OUT_ADDR_W)) u_out_fifo (
    .wr_clk(audio_out_mclk), .wr_rst(out_mrst), .wr_en(out_wr), .wr_data(audio_out),
    .full(out_full), .overflow(out_ovf), .wr_level(),
    .rd_clk(clk), .rd_rst(rst), .rd_en(cpu_rd || dma_out_rd),
    .rd_data(data_out), .empty(out_empty), .rd_level(out_level));

  assign dma_out_data = data_out;
endmodule
