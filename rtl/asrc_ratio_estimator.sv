// Ratio estimator: measures the sample rate conversion ratio rho = fs_out/fs_in
// and its inverse, then keeps the inverse tracked with a frequency tracker.
//
// How it works
//   * Two period meters count the system clock cycles between rising edges of
//     the synchronized input and output word clocks, accumulating the periods
//     (tin_acc, tout_acc) and their number (tin_cnt, tout_cnt) for sync_cycles
//     system clock cycles.
//   * rho   = (tin_acc * tout_cnt) / (tin_cnt * tout_acc) = prod1 / prod2 and
//     1/rho = prod2 / prod1, computed with one shared serial multiplier and one
//     shared serial divider, sequenced by a 13-state FSM (states 0..12).
//   * Frequency tracker: after sync, an input phase accumulator adds 1.0 per
//     input word clock and an output phase accumulator adds inv_conv_ratio per
//     output word clock. Their difference (the delay) is summed over every word
//     clock event during 2**N_OUT_LOG2 output periods and divided by the event
//     count (signed division) into delay_avg. The change of delay_avg between
//     two windows, divided by the window length and attenuated by 2**ATT_SHIFT,
//     is added to inv_conv_ratio.
// Interface: word clocks arrive already synchronized to clk (levels). sync
// rises once the first rho and 1/rho are available (state 9 -> 10) and stays
// high until reset. conv_ratio and inv_conv_ratio are unsigned Q5.30.
// ptr_diff_err (sticky) is raised when the delay drifts further than one
// eighth of the per-channel buffer, the point where the resampler's reads
// approach the writes.
// Timing: after the measurement the multiplications take W+1 cycles each and
// the divisions DIV_W+1 cycles each.
// The FSM states, the shared arithmetic units, the 4096-period delay window
// and the structure of the tracker follow the design; the attenuation
// amount, phase widths, the skipped first correction and the error threshold
// are this design's choices.
module asrc_ratio_estimator
  import asrc_pkg::*;
#(
  parameter int unsigned RO_W       = 35,
  parameter int unsigned NC_W       = 8,
  parameter int unsigned SAMP_BUF_W = 10,
  parameter int unsigned N_OUT_LOG2 = 12,   // delay window: 4096 output periods
  parameter int unsigned ATT_SHIFT  = 2     // extra attenuation of the correction
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [31:0]     sync_cycles,
  input  logic [NC_W-1:0] nc,
  input  logic            in_wclk_s,
  input  logic            out_wclk_s,
  output logic            sync,
  output logic [RO_W-1:0] conv_ratio,
  output logic [RO_W-1:0] inv_conv_ratio,
  output logic            ptr_diff_err,
  output logic            correction_applied   // one-cycle pulse, for observation
);
  localparam int unsigned ACC_W  = 32;
  localparam int unsigned PROD_W = 2 * ACC_W;
  localparam int unsigned DIV_W  = PROD_W + RO_FRAC;
  localparam int unsigned PH_INT = 16;
  localparam int unsigned PH_W   = PH_INT + RO_FRAC;
  localparam int unsigned DCNT_W = N_OUT_LOG2 + 8;
  localparam int unsigned DACC_W = PH_W + DCNT_W;

  re_state_e state, state_nxt;

  // word clock edges
  logic in_q, out_q, tin_valid, tout_valid;
  always_ff @(posedge clk) begin
    if (rst) begin
      in_q  <= 1'b0;
      out_q <= 1'b0;
    end else begin
      in_q  <= in_wclk_s;
      out_q <= out_wclk_s;
    end
  end
  assign tin_valid  = in_wclk_s & ~in_q;
  assign tout_valid = out_wclk_s & ~out_q;

  // period meters
  logic             count_rst, count_en;
  logic [ACC_W-1:0] tin_acc, tin_cnt, tout_acc, tout_cnt;
  logic [31:0]      sync_cnt;

  asrc_period_meter #(.ACC_W(ACC_W)) u_tin_meter (
    .clk, .rst, .clear(count_rst), .en(count_en), .wclk_rise(tin_valid),
    .t_acc(tin_acc), .t_cnt(tin_cnt));
  asrc_period_meter #(.ACC_W(ACC_W)) u_tout_meter (
    .clk, .rst, .clear(count_rst), .en(count_en), .wclk_rise(tout_valid),
    .t_acc(tout_acc), .t_cnt(tout_cnt));

  always_ff @(posedge clk) begin
    if (rst || count_rst) sync_cnt <= '0;
    else if (count_en)    sync_cnt <= sync_cnt + 1'b1;
  end

  // shared multiplier
  logic              mul_en, mul_ready;
  logic [ACC_W-1:0]  mcand, mplier;
  logic [PROD_W-1:0] mul_out, prod1, prod2;

  asrc_serial_mul #(.W(ACC_W)) u_mul (
    .clk, .rst, .start(mul_en), .multiplicand(mcand), .multiplier(mplier),
    .ready(mul_ready), .product(mul_out));

  // shared divider
  logic             div_en, div_sign, div_ready;
  logic [DIV_W-1:0] dividend, divisor, div_out;

  asrc_serial_div #(.W(DIV_W)) u_div (
    .clk, .rst, .start(div_en), .sign(div_sign), .dividend(dividend),
    .divisor(divisor), .ready(div_ready), .quotient(div_out));

  // frequency tracker state
  logic signed [PH_W-1:0]   phi_in, phi_out, delay;
  logic signed [DACC_W-1:0] delay_acc;
  logic [DCNT_W-1:0]        delay_cnt;
  logic [N_OUT_LOG2:0]      out_cnt;
  logic signed [PH_W-1:0]   delay_avg, delay_avg_new, delta_delay;
  logic                     have_prev;
  logic [RO_W-1:0]          ro_est, inv_ro_est, inv_tracked;
  logic                     delay_cnt_rst, delay_cnt_en;

  // FSM next state and operand selection
  always_comb begin
    state_nxt     = state;
    count_rst     = 1'b0;
    count_en      = 1'b0;
    mul_en        = 1'b0;
    div_en        = 1'b0;
    div_sign      = 1'b0;
    mcand         = tin_acc;
    mplier        = tout_cnt;
    dividend      = {prod1, RO_FRAC'(0)};
    divisor       = DIV_W'(prod2);
    delay_cnt_rst = 1'b0;
    delay_cnt_en  = 1'b0;
    unique case (state)
      RE_INIT: begin
        count_rst     = 1'b1;
        delay_cnt_rst = 1'b1;
        state_nxt     = RE_MEASURE;
      end
      RE_MEASURE: begin
        count_en = 1'b1;
        if (sync_cnt >= sync_cycles) state_nxt = RE_MUL_P1;
      end
      RE_MUL_P1: begin
        mcand = tin_acc;  mplier = tout_cnt;  mul_en = 1'b1;
        state_nxt = RE_WAIT_P1;
      end
      RE_WAIT_P1: begin
        if (mul_ready) state_nxt = RE_MUL_P2;
      end
      RE_MUL_P2: begin
        mcand = tout_acc; mplier = tin_cnt;   mul_en = 1'b1;
        state_nxt = RE_WAIT_P2;
      end
      RE_WAIT_P2: begin
        if (mul_ready) state_nxt = RE_DIV_RO;
      end
      RE_DIV_RO: begin
        dividend = {prod1, RO_FRAC'(0)}; divisor = DIV_W'(prod2);
        div_en = 1'b1;
        state_nxt = RE_WAIT_RO;
      end
      RE_WAIT_RO: begin
        if (div_ready) state_nxt = RE_DIV_INV;
      end
      RE_DIV_INV: begin
        dividend = {prod2, RO_FRAC'(0)}; divisor = DIV_W'(prod1);
        div_en = 1'b1;
        state_nxt = RE_WAIT_INV;
      end
      RE_WAIT_INV: begin
        if (div_ready) state_nxt = RE_DELAY;
      end
      RE_DELAY: begin
        delay_cnt_en = 1'b1;
        if (out_cnt[N_OUT_LOG2]) state_nxt = RE_DIV_DELAY;
      end
      RE_DIV_DELAY: begin
        dividend = {{(DIV_W-DACC_W){delay_acc[DACC_W-1]}}, delay_acc};
        divisor  = DIV_W'(delay_cnt);
        div_en   = 1'b1;
        div_sign = 1'b1;
        state_nxt = RE_WAIT_DELAY;
      end
      RE_WAIT_DELAY: begin
        if (div_ready) begin
          delay_cnt_rst = 1'b1;
          state_nxt     = RE_DELAY;
        end
      end
      default: state_nxt = RE_INIT;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= RE_INIT;
    end else begin
      state <= state_nxt;
    end
  end

  // saturate a quotient to the ratio width
  function automatic logic [RO_W-1:0] sat_ro(input logic [DIV_W-1:0] q);
    return (q > DIV_W'({RO_W{1'b1}})) ? {RO_W{1'b1}} : q[RO_W-1:0];
  endfunction

  // result registers
  assign delay_avg_new = div_out[PH_W-1:0];
  assign delta_delay   = delay_avg_new - delay_avg;

  always_ff @(posedge clk) begin
    if (rst) begin
      prod1              <= '0;
      prod2              <= '0;
      ro_est             <= '0;
      inv_ro_est         <= '0;
      sync               <= 1'b0;
      delay_avg          <= '0;
      have_prev          <= 1'b0;
      inv_tracked        <= '0;
      correction_applied <= 1'b0;
    end else begin
      correction_applied <= 1'b0;
      if (state == RE_WAIT_P1 && state_nxt != state) prod1 <= mul_out;
      if (state == RE_WAIT_P2 && state_nxt != state) prod2 <= mul_out;
      if (state == RE_WAIT_RO && state_nxt != state) ro_est <= sat_ro(div_out);
      if (state == RE_WAIT_INV && state_nxt != state) begin
        inv_ro_est  <= sat_ro(div_out);
        inv_tracked <= sat_ro(div_out);
        sync        <= 1'b1;
      end
      if (state == RE_WAIT_DELAY && state_nxt != state) begin
        delay_avg <= delay_avg_new;
        have_prev <= 1'b1;
        if (have_prev) begin
          inv_tracked <= inv_tracked + RO_W'(delta_delay >>> (N_OUT_LOG2 + ATT_SHIFT));
          correction_applied <= 1'b1;
        end
      end
    end
  end

  // sync selects between the first estimate and the tracked value
  assign conv_ratio     = ro_est;
  assign inv_conv_ratio = sync ? inv_tracked : inv_ro_est;

  // phases, delay and its accumulation
  assign delay = phi_in - phi_out;

  always_ff @(posedge clk) begin
    if (rst || !sync) begin
      phi_in  <= '0;
      phi_out <= '0;
    end else begin
      if (tin_valid)  phi_in  <= phi_in + (PH_W'(1) << RO_FRAC);
      if (tout_valid) phi_out <= phi_out + PH_W'(inv_conv_ratio);
    end
  end

  always_ff @(posedge clk) begin
    if (rst || delay_cnt_rst) begin
      delay_acc <= '0;
      delay_cnt <= '0;
      out_cnt   <= '0;
    end else if (delay_cnt_en) begin
      if (tin_valid || tout_valid) begin
        delay_acc <= delay_acc + DACC_W'(delay);
        delay_cnt <= delay_cnt + 1'b1;
      end
      if (tout_valid) out_cnt <= out_cnt + 1'b1;
    end
  end

  // pointer distance check: |delay| in frames times Nc against 1/8 buffer
  logic [PH_W-1:0]        delay_abs;
  logic [PH_INT-1:0]      delay_int_abs;
  logic [PH_INT+NC_W-1:0] delay_samples;
  assign delay_abs     = delay[PH_W-1] ? -delay : delay;
  assign delay_int_abs = delay_abs[PH_W-1:RO_FRAC];
  assign delay_samples = delay_int_abs * nc;

  always_ff @(posedge clk) begin
    if (rst) ptr_diff_err <= 1'b0;
    else if (sync && delay_samples >= (PH_INT+NC_W)'(2**(SAMP_BUF_W-3)))
      ptr_diff_err <= 1'b1;
  end
endmodule
