// Serial shift-subtract (restoring) divider, unsigned or signed.
//
// Shared by the ratio estimator for rho, 1/rho and the average delay. A start
// pulse, sampled while ready, loads dividend and divisor; with sign high both
// are taken as two's complement and the quotient is truncated toward zero.
// One quotient bit is produced per clock; ready rises with the quotient after
// W cycles (plus one cycle to load). A zero divisor gives an all-ones
// magnitude. The design asks for a serial shift-subtract unit; the signed
// handling by magnitudes is this design's choice.
module asrc_serial_div #(
  parameter int unsigned W = 94
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic         sign,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         ready,
  output logic [W-1:0] quotient
);
  logic [W-1:0]         q, d;
  logic [W:0]           r;
  logic                 neg;
  logic [$clog2(W+1)-1:0] cnt;
  logic [W:0]           r_sh, r_sub;

  assign r_sh  = {r[W-1:0], q[W-1]};
  assign r_sub = r_sh - {1'b0, d};

  always_ff @(posedge clk) begin
    if (rst) begin
      ready    <= 1'b1;
      q        <= '0;
      d        <= '0;
      r        <= '0;
      neg      <= 1'b0;
      cnt      <= '0;
      quotient <= '0;
    end else if (ready) begin
      if (start) begin
        ready <= 1'b0;
        cnt   <= '0;
        r     <= '0;
        q     <= (sign && dividend[W-1]) ? -dividend : dividend;
        d     <= (sign && divisor[W-1])  ? -divisor  : divisor;
        neg   <= sign && (dividend[W-1] ^ divisor[W-1]);
      end
    end else begin
      if (!r_sub[W]) begin
        r <= r_sub;
        q <= {q[W-2:0], 1'b1};
      end else begin
        r <= r_sh;
        q <= {q[W-2:0], 1'b0};
      end
      cnt <= cnt + 1'b1;
      if (cnt == ($clog2(W+1))'(W-1)) begin
        ready    <= 1'b1;
        quotient <= neg ? -{q[W-2:0], !r_sub[W]} : {q[W-2:0], !r_sub[W]};
      end
    end
  end
endmodule
