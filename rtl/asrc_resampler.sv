// Resampler: computes one output sample per channel for every output word
// clock tick, as a direct-form FIR (windowed sinc) evaluated with a single
// multiply-accumulate unit.
//
// The address generator walks the filter for each channel, the coefficient
// memory turns coefficient addresses into interpolated sinc values, and the
// MACC accumulates sample x coefficient. The input sample memory sits
// outside (it is shared with the input clock domain): s_addr goes out and
// s_data comes back one cycle later.
// Pipeline (this design's own staging): address generator output register,
// then two coefficient stages, with s_data delayed one more cycle to meet the
// coefficient, then the MACC product and accumulate stages. The control
// flags travel through a 2-stage delay line alongside. An output sample
// appears (audio_out_valid pulse) about 6 cycles after its channel's
// addresses are finished; all Nc samples of one output frame are produced in
// channel order, roughly (N_coeffs + 2) * Nc + 8 clk cycles after start_sync.
module asrc_resampler
  import asrc_pkg::*;
#(
  parameter int unsigned SAMP_W     = 24,
  parameter int unsigned RO_W       = 35,
  parameter int unsigned NC_W       = 8,
  parameter int unsigned SAMP_BUF_W = 10
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  start_sync,
  input  logic [NC_W-1:0]       nc,
  input  logic [RO_W-1:0]       conv_ratio,
  input  logic [RO_W-1:0]       inv_conv_ratio,
  output logic [SAMP_BUF_W-1:0] s_addr,
  input  logic [SAMP_W-1:0]     s_data,
  output logic [17:0]           y_addr,
  output logic [SAMP_W-1:0]     audio_out,
  output logic                  audio_out_valid,
  output logic                  busy
);
  logic [HSTEP_W-1:0]       h_step;
  logic [CADDR_W-1:0]       coeff_addr;
  logic                     first_addr, addr_valid, addr_done;
  logic signed [COEF_W-1:0] coeff;
  logic [SAMP_W-1:0]        s_data_d;
  logic [2:0]               flags_d1, flags_d2;

  asrc_addr_gen #(.RO_W(RO_W), .NC_W(NC_W), .SAMP_BUF_W(SAMP_BUF_W)) u_addr_gen (
    .clk, .rst, .start_sync, .conv_ratio, .inv_conv_ratio, .nc,
    .h_step, .y_addr, .s_addr, .coeff_addr, .first_addr, .addr_valid,
    .addr_done, .busy);

  asrc_coeff_mem u_coeff_mem (.clk, .coeff_addr, .coeff);

  // align sample and flags with the coefficient (two cycles after addresses)
  always_ff @(posedge clk) begin
    if (rst) begin
      s_data_d <= '0;
      flags_d1 <= '0;
      flags_d2 <= '0;
    end else begin
      s_data_d <= s_data;
      flags_d1 <= {first_addr, addr_valid, addr_done};
      flags_d2 <= flags_d1;
    end
  end

  asrc_macc #(.SAMP_W(SAMP_W)) u_macc (
    .clk, .rst, .s_data(s_data_d), .coeff,
    .first_addr(flags_d2[2]), .addr_valid(flags_d2[1]), .addr_done(flags_d2[0]),
    .h_step, .audio_out(audio_out), .y_valid(audio_out_valid));
endmodule
