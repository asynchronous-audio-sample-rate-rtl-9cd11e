// Coefficient memory: half windowed-sinc lookup table with linear
// interpolation.
//
// The ROM holds 2**ROM_AW = 16384 signed 24-bit words, one side of a sinc
// with 32 zero crossings (16 per side, 1024 entries per crossing) multiplied
// by the right half of a Kaiser window (beta 14.4) of 2*16384-1 points:
//   h[k] = round((2**23-1) * sinc(k/1024) * I0(beta*sqrt(1-(k/16383)**2)) / I0(beta))
// with sinc(x) = sin(pi x)/(pi x) and I0 the zeroth-order modified Bessel
// function. The table is computed when the ROM is initialised, not read
// from a file.
// coeff_addr is unsigned Q4.30: bits [33:20] address entry i, bits [19:0]
// are the fraction delta, and the coefficient is
//   coeff = h[i] + delta*(h[i+1]-h[i])
// returned as signed Q1.33 (h scaled by 2**10 plus the interpolated part).
// Timing: two pipeline stages, coeff is valid two cycles after coeff_addr.
// The addressed entry must not exceed 16382 (the address generator stops at
// the last entry). The table contents, size and the interpolation follow the
// design; the fixed-point split of the result is this design's choice.
module asrc_coeff_mem
  import asrc_pkg::*;
(
  input  logic                     clk,
  input  logic [CADDR_W-1:0]       coeff_addr,
  output logic signed [COEF_W-1:0] coeff
);
  localparam int unsigned DELTA_W = CADDR_W - ROM_AW;   // 20

  logic signed [ROM_DW-1:0] rom [2**ROM_AW];

  function automatic real bessel_i0(input real x);
    real sum, term;
    sum  = 1.0;
    term = 1.0;
    for (int m = 1; m < 60; m++) begin
      term = term * (x / (2.0 * m)) * (x / (2.0 * m));
      sum  = sum + term;
    end
    return sum;
  endfunction

  function automatic int coeff_value(input int k);
    real pi_t, s, r, w, v;
    pi_t = 3.14159265358979323846 * real'(k) / real'(2**FILT_NFRAC);
    s    = (k == 0) ? 1.0 : $sin(pi_t) / pi_t;
    r    = real'(k) / real'(2**ROM_AW - 1);
    w    = bessel_i0(KAISER_BETA * $sqrt(1.0 - r * r)) / bessel_i0(KAISER_BETA);
    v    = real'(2**(ROM_DW-1) - 1) * s * w;
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  initial begin
    for (int k = 0; k < 2**ROM_AW; k++) rom[k] = ROM_DW'(coeff_value(k));
  end

  // stage 1: read both neighbours
  logic [ROM_AW-1:0]        addr_a, addr_b;
  logic signed [ROM_DW-1:0] rom_a, rom_b;
  logic [DELTA_W-1:0]       delta;

  assign addr_a = coeff_addr[CADDR_W-1 -: ROM_AW];
  assign addr_b = addr_a + 1'b1;

  always_ff @(posedge clk) begin
    rom_a <= rom[addr_a];
    rom_b <= rom[addr_b];
    delta <= coeff_addr[DELTA_W-1:0];
  end

  // stage 2: interpolate
  logic signed [ROM_DW:0]           dh;
  logic signed [ROM_DW+DELTA_W+1:0] dprod;

  assign dh    = (ROM_DW+1)'(rom_b) - (ROM_DW+1)'(rom_a);
  assign dprod = dh * $signed({1'b0, delta});

  always_ff @(posedge clk) begin
    coeff <= (COEF_W'(rom_a) <<< (COEF_W - ROM_DW))
           + COEF_W'(dprod >>> (DELTA_W - (COEF_W - ROM_DW)));
  end
endmodule
