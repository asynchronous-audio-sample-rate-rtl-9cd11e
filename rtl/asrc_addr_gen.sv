// Resampler address generator: filter setup, input sample addresses and
// filter coefficient addresses.
//
// How it works
//   * Filter setup: on every start_sync (one per output word clock) the
//     output time accumulator audio_out_addr (unsigned, SAMP_BUF_W integer and
//     30 fractional bits, in input frames) adds inv_conv_ratio. With
//     frac = its fractional part, the output instant lies frac after input
//     frame floor and 1-frac before frame floor+1. h_step = min(0.875, rho).
//   * For each channel the right-hand side is walked first: the coefficient
//     accumulator starts at alpha = (1-frac)*h_step and the sample address at
//     frame floor+1; then the left-hand side starts at alpha = frac*h_step and
//     frame floor. Each step adds h_step to the coefficient address and +Nc
//     (right) or -Nc (left) to the sample offset, until the coefficient
//     address reaches the last ROM entry. Then the next channel (channel
//     offset +1) is processed, until Nc channels are done.
//   * Sample address = frame*Nc + channel + offset - 2**(SAMP_BUF_W-1): the
//     reads trail the write pointer of the input memory by half the buffer.
// Interface / timing: outputs are registered. Each cycle of a run presents
// coeff_addr and s_addr with addr_valid (first_addr marks the first
// coefficient of a channel). One cycle without addr_valid separates the two
// sides, and a cycle with addr_done (no addr_valid) closes each channel.
// A channel takes N_right + N_left + 2 cycles, plus one setup cycle per
// output frame. start_sync while busy still advances audio_out_addr but
// starts no new computation. busy is high from start_sync to the last done.
// The accumulator structure, h_step, alpha and the two-sided walk follow the
// design; the side order convention (frac measured from the earlier input
// sample), the half-buffer read offset and the Nc scaling of the frame index
// are this design's choices.
module asrc_addr_gen
  import asrc_pkg::*;
#(
  parameter int unsigned RO_W       = 35,
  parameter int unsigned NC_W       = 8,
  parameter int unsigned SAMP_BUF_W = 10
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  start_sync,
  input  logic [RO_W-1:0]       conv_ratio,
  input  logic [RO_W-1:0]       inv_conv_ratio,
  input  logic [NC_W-1:0]       nc,
  output logic [HSTEP_W-1:0]    h_step,
  output logic [17:0]           y_addr,
  output logic [SAMP_BUF_W-1:0] s_addr,
  output logic [CADDR_W-1:0]    coeff_addr,
  output logic                  first_addr,
  output logic                  addr_valid,
  output logic                  addr_done,
  output logic                  busy
);
  localparam int unsigned YACC_W = SAMP_BUF_W + RO_FRAC;
  localparam logic [CADDR_W:0] MAX_ADDR = (CADDR_W+1)'((2**ROM_AW - 1)) << (CADDR_W - ROM_AW);

  typedef enum logic [1:0] {AG_IDLE, AG_LOAD, AG_RUN} ag_state_e;

  ag_state_e             state;
  logic [YACC_W-1:0]     y_acc;
  logic [CADDR_W:0]      c_acc;
  logic [SAMP_BUF_W-1:0] s_off, ch, base;
  logic                  side;          // 0: right-hand side, 1: left-hand side
  logic                  first_pend;
  logic                  load_side;     // side whose alpha/base is loaded next

  // h_step = min(0.875, rho)
  assign h_step = (conv_ratio > RO_W'(HSTEP_MAX)) ? HSTEP_MAX : conv_ratio[HSTEP_W-1:0];
  assign y_addr = y_acc[YACC_W-1 -: 18];

  // alpha and base for the side being loaded
  logic [RO_FRAC:0]          distance;
  logic [RO_FRAC+HSTEP_W:0]  alpha_prod;
  logic [HSTEP_W-1:0]        alpha;
  logic [SAMP_BUF_W-1:0]     frame, base_ld;
  logic [SAMP_BUF_W+NC_W-1:0] frame_nc;

  assign distance       = load_side ? {1'b0, y_acc[RO_FRAC-1:0]}
                                : (RO_FRAC+1)'(2**RO_FRAC) - {1'b0, y_acc[RO_FRAC-1:0]};
  assign alpha_prod = distance * h_step;
  assign alpha      = alpha_prod[RO_FRAC +: HSTEP_W];
  assign frame      = y_acc[YACC_W-1:RO_FRAC] + SAMP_BUF_W'(!load_side);
  assign frame_nc   = frame * nc;
  assign base_ld    = frame_nc[SAMP_BUF_W-1:0] - SAMP_BUF_W'(2**(SAMP_BUF_W-1));

  logic last_ch;
  assign last_ch = (ch + 1'b1 >= SAMP_BUF_W'(nc));

  always_comb begin
    load_side = side;
    if (state == AG_RUN && c_acc >= MAX_ADDR) load_side = !side;
    if (state == AG_LOAD) load_side = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      y_acc      <= '0;
      state      <= AG_IDLE;
      c_acc      <= '0;
      s_off      <= '0;
      ch         <= '0;
      base       <= '0;
      side       <= 1'b0;
      first_pend <= 1'b0;
      busy       <= 1'b0;
      s_addr     <= '0;
      coeff_addr <= '0;
      first_addr <= 1'b0;
      addr_valid <= 1'b0;
      addr_done  <= 1'b0;
    end else begin
      first_addr <= 1'b0;
      addr_valid <= 1'b0;
      addr_done  <= 1'b0;
      if (start_sync) y_acc <= y_acc + YACC_W'(inv_conv_ratio);
      unique case (state)
        AG_IDLE: begin
          if (start_sync) begin
            state <= AG_LOAD;
            busy  <= 1'b1;
          end
        end
        AG_LOAD: begin        // y_acc holds the new output time
          ch         <= '0;
          side       <= 1'b0;
          c_acc      <= (CADDR_W+1)'(alpha);
          base       <= base_ld;
          s_off      <= '0;
          first_pend <= 1'b1;
          state      <= AG_RUN;
        end
        AG_RUN: begin
          if (c_acc < MAX_ADDR) begin
            coeff_addr <= c_acc[CADDR_W-1:0];
            s_addr     <= base + ch + s_off;
            addr_valid <= 1'b1;
            first_addr <= first_pend;
            first_pend <= 1'b0;
            c_acc      <= c_acc + (CADDR_W+1)'(h_step);
            s_off      <= side ? s_off - SAMP_BUF_W'(nc) : s_off + SAMP_BUF_W'(nc);
          end else if (!side) begin
            side  <= 1'b1;
            c_acc <= (CADDR_W+1)'(alpha);
            base  <= base_ld;
            s_off <= '0;
          end else begin
            addr_done <= 1'b1;
            if (last_ch) begin
              state <= AG_IDLE;
              busy  <= 1'b0;
            end else begin
              ch         <= ch + 1'b1;
              side       <= 1'b0;
              c_acc      <= (CADDR_W+1)'(alpha);
              base       <= base_ld;
              s_off      <= '0;
              first_pend <= 1'b1;
            end
          end
        end
        default: state <= AG_IDLE;
      endcase
    end
  end
endmodule
