// iq_detector: double Nyquist digital product detector of one input.
//
// The input signal, centred on 10 MHz, is sampled at 40 MHz, four times its
// carrier.  With that ratio the in-phase samples are the even A/D samples
// and the quadrature samples the odd ones, each with alternating sign:
//   I[k] = (-1)^k x[2k],   Q[k] = -(-1)^k x[2k+1].
// A register holds each even sample for one 40 MHz period so that both
// branches are read together at 20 MHz (the "switch").  Since the odd sample
// is taken 25 ns after the even one, two programmable FIR interpolators
// realign the branches, nominally by 3/4 of a sample on I and 1/4 on Q.
// Their coefficients are loaded over the bus; the structure follows the
// original input interface, while applying (-1)^n with a sign stage, rather
// than with the device's alternate coefficient set, is this design's choice.
//
// Interface: adc is the signed 10-bit A/D code, new every clk (40 MHz).  ce
// is high on every second clock, when adc holds an odd sample.  The A/D code
// enters the 16-bit filters multiplied by 32.  iq is the filter output
// shifted right by 10 (coefficient 1024 = 1.0), saturated to 16 bits, and
// is updated two ce cycles after the samples are taken (iq_valid pulses).
// The lock-step assertion at the end is disabled during reset; linters note
// that rst_n is then used both as an asynchronous reset and in a clocked
// expression.  That use is simulation-only and intended.
module iq_detector
  import ce_pkg::*;
#(
  parameter int FIR_TAPS = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ce,
  input  logic signed [ADC_W-1:0] adc,
  input  coef_wr_t                cw_i,
  input  coef_wr_t                cw_q,
  output iq_t                     iq,
  output logic                    iq_valid
);
  logic signed [ADC_W-1:0]      adc_even;
  logic                         sgn;
  logic signed [FIR_DIN_W-1:0]  even_x, odd_x, xi, xq;
  logic signed [FIR_DOUT_W-1:0] yi, yq;
  logic                         vi, vq;

  // Switch: hold the even sample
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) adc_even <= '0;
    else        adc_even <= adc;
  end

  // (-1)^k, k counting 20 MHz samples
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  sgn <= 1'b0;
    else if (ce) sgn <= ~sgn;
  end

  assign even_x = FIR_DIN_W'(adc_even) <<< 5;
  assign odd_x  = FIR_DIN_W'(adc) <<< 5;
  assign xi     = sgn ? -even_x : even_x;
  assign xq     = sgn ? odd_x : -odd_x;

  pdsp_fir #(.TAPS(FIR_TAPS), .MACS(FIR_TAPS)) u_interp_i (
    .clk, .rst_n, .ce, .in_valid (ce), .din (xi), .cw (cw_i), .dout (yi), .dout_valid (vi)
  );
  pdsp_fir #(.TAPS(FIR_TAPS), .MACS(FIR_TAPS)) u_interp_q (
    .clk, .rst_n, .ce, .in_valid (ce), .din (xq), .cw (cw_q), .dout (yq), .dout_valid (vq)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iq       <= '0;
      iq_valid <= 1'b0;
    end else begin
      iq_valid <= vi;
      if (vi) begin
        iq.i <= sat_smp(48'(yi >>> FIR_FRAC));
        iq.q <= sat_smp(48'(yq >>> FIR_FRAC));
      end
    end
  end

  // Both interpolators run in lock step
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) vi == vq);
endmodule
