// cmult: complex multiplier of a tap.
//
// Multiplies the delayed base-band sample x by the interpolated channel
// coefficient e:  y = x * e, with e in 2.14 fixed point (16384 = 1.0), so a
// coefficient of magnitude one passes the signal unchanged.  The products are
// rounded down by the shift and saturated to 16 bits.  The coefficient
// format is this design's choice.
//
// Timing: registered, one ce cycle of latency.
module cmult
  import ce_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic ce,
  input  iq_t  x,
  input  iq_t  e,
  output iq_t  y
);
  logic signed [47:0] re, im;

  always_comb begin
    re = 48'(x.i * e.i) - 48'(x.q * e.q);
    im = 48'(x.i * e.q) + 48'(x.q * e.i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  y <= '0;
    else if (ce) begin
      y.i <= sat_smp(re >>> TAPC_FRAC);
      y.q <= sat_smp(im >>> TAPC_FRAC);
    end
  end
endmodule
