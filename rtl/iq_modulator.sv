// iq_modulator: digital part of one output interface.
//
// The reverse of iq_detector.  The base-band sum from the tap chain is
// saturated to 16 bits, the I and Q branches pass through programmable FIR
// interpolators that delay Q by half a sample against I (nominally 1/4 of a
// sample on I and 3/4 on Q), each branch is multiplied by (-1)^k to move it
// to 10 MHz, and the two are multiplexed onto one 40 MHz stream:
//   y[2k] = (-1)^k I'[k],   y[2k+1] = -(-1)^k Q'[k].
// The stream goes to the 12-bit D/A converter.  The structure is the
// original output interface; the scaling is this design's choice.
//
// Interface: sum is taken on every clock with ce (20 MHz).  dac is the
// signed 12-bit D/A code, a new sample every clk (40 MHz): the even sample
// is loaded on the clock with ce, the odd sample on the clock after.  The
// filter outputs are shifted right by 10 (coefficient 1024 = 1.0) and the
// D/A code is that value shifted right by 4 more, saturated.
module iq_modulator
  import ce_pkg::*;
#(
  parameter int FIR_TAPS = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ce,
  input  iq_sum_t                 sum,
  input  coef_wr_t                cw_i,
  input  coef_wr_t                cw_q,
  output logic signed [DAC_W-1:0] dac
);
  logic signed [FIR_DIN_W-1:0]  xi, xq;
  logic signed [FIR_DOUT_W-1:0] yi, yq;
  logic                         vi, vq;
  logic                         sgn;
  logic signed [FIR_DOUT_W-FIR_FRAC:0] si, sq;
  logic signed [DAC_W-1:0]      even_s, odd_s, odd_r;

  function automatic logic signed [DAC_W-1:0] to_dac(input logic signed [FIR_DOUT_W-FIR_FRAC:0] v);
    logic signed [FIR_DOUT_W-FIR_FRAC:0] s;
    s = v >>> 4;
    if (s > (2**(DAC_W-1)) - 1)  return DAC_W'((2**(DAC_W-1)) - 1);
    if (s < -(2**(DAC_W-1)))     return DAC_W'(-(2**(DAC_W-1)));
    return DAC_W'(s);
  endfunction

  assign xi = sat_smp(48'(sum.i));
  assign xq = sat_smp(48'(sum.q));

  pdsp_fir #(.TAPS(FIR_TAPS), .MACS(FIR_TAPS)) u_interp_i (
    .clk, .rst_n, .ce, .in_valid (ce), .din (xi), .cw (cw_i), .dout (yi), .dout_valid (vi)
  );
  pdsp_fir #(.TAPS(FIR_TAPS), .MACS(FIR_TAPS)) u_interp_q (
    .clk, .rst_n, .ce, .in_valid (ce), .din (xq), .cw (cw_q), .dout (yq), .dout_valid (vq)
  );

  // (-1)^k, k counting 20 MHz samples
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  sgn <= 1'b0;
    else if (ce) sgn <= ~sgn;
  end

  assign si     = (FIR_DOUT_W-FIR_FRAC+1)'(yi >>> FIR_FRAC);
  assign sq     = (FIR_DOUT_W-FIR_FRAC+1)'(yq >>> FIR_FRAC);
  assign even_s = sgn ? to_dac(-si) : to_dac(si);
  assign odd_s  = sgn ? to_dac(sq)  : to_dac(-sq);

  // Multiplexer onto the 40 MHz stream
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dac   <= '0;
      odd_r <= '0;
    end else if (ce) begin
      dac   <= even_s;
      odd_r <= odd_s;
    end else begin
      dac   <= odd_r;
    end
  end

  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) vi == vq);
endmodule
