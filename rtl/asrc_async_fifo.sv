// Output buffer: asynchronous FIFO from the system clock to the output
// audio master clock.
//
// Gray-coded write and read pointers cross the two domains through
// two-register synchronizers; the memory has 2**ADDR_W words. The write side
// (clk) pushes one converted sample when wr_en is high and raises overflow
// for one cycle if the FIFO is full (the sample is then dropped). The read
// side (rd_clk) pops one sample per cycle while rd_en is high and the FIFO
// is not empty; rd_data is registered and shows the popped word the cycle
// after the pop. empty and full are conservative (they clear two to three
// cycles after the other side moved). wr_level and rd_level give the number
// of stored words as seen from each side (conservative in the same way).
// The same block serves as the core's output buffer and as the input and
// output buffers of the test wrapper. The design only names this block; its
// structure is the usual dual-clock FIFO and the depth is this design's choice.
module asrc_async_fifo #(
  parameter int unsigned DATA_W = 24,
  parameter int unsigned ADDR_W = 8
) (
  input  logic              wr_clk,
  input  logic              wr_rst,
  input  logic              wr_en,
  input  logic [DATA_W-1:0] wr_data,
  output logic              full,
  output logic              overflow,
  output logic [ADDR_W:0]   wr_level,
  input  logic              rd_clk,
  input  logic              rd_rst,
  input  logic              rd_en,
  output logic [DATA_W-1:0] rd_data,
  output logic              empty,
  output logic [ADDR_W:0]   rd_level
);
  logic [DATA_W-1:0] mem [2**ADDR_W];
  logic [ADDR_W:0]   wbin, wgray, rbin, rgray;
  logic [ADDR_W:0]   rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [ADDR_W:0]   wbin_nxt, rbin_nxt;
  logic              do_wr, do_rd;

  function automatic logic [ADDR_W:0] bin2gray(input logic [ADDR_W:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [ADDR_W:0] gray2bin(input logic [ADDR_W:0] g);
    logic [ADDR_W:0] b;
    b[ADDR_W] = g[ADDR_W];
    for (int i = int'(ADDR_W) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write side
  assign full     = (wgray == {~rgray_w2[ADDR_W:ADDR_W-1], rgray_w2[ADDR_W-2:0]});
  assign do_wr    = wr_en && !full;
  assign wbin_nxt = wbin + (ADDR_W+1)'(do_wr);
  assign wr_level = wbin - gray2bin(rgray_w2);

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
      overflow <= 1'b0;
    end else begin
      wbin     <= wbin_nxt;
      wgray    <= bin2gray(wbin_nxt);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      overflow <= wr_en && full;
    end
  end

  always_ff @(posedge wr_clk) begin
    if (do_wr) mem[wbin[ADDR_W-1:0]] <= wr_data;
  end

  // read side
  assign empty    = (rgray == wgray_r2);
  assign do_rd    = rd_en && !empty;
  assign rbin_nxt = rbin + (ADDR_W+1)'(do_rd);
  assign rd_level = gray2bin(wgray_r2) - rbin;

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
      rd_data  <= '0;
    end else begin
      rbin     <= rbin_nxt;
      rgray    <= bin2gray(rbin_nxt);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (do_rd) rd_data <= mem[rbin[ADDR_W-1:0]];
    end
  end
endmodule
