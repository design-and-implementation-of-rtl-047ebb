// coef_interp: real-time interpolator of one real part of a tap coefficient.
//
// The tap RAM is read once every p = 32 periods of the filter clock f2.  The
// sample read is zero padded (31 zeros follow it) and low-pass filtered by a
// 128-coefficient programmable FIR, which is the first hardware interpolation
// stage (ratio p).  The filter runs only once per f2 period, f2 being the
// 20 MHz sample rate divided by N = 8..8192, and its output is held for the N
// sample periods in between: the zero-order hold, which is the second
// hardware stage.  Both stages and the ratios follow the original design.
//
// Timing: f2_tick and f1_tick are one-clock pulses that coincide with ce;
// f1_tick marks the f2 periods in which the RAM sample enters the filter.
// The 128-coefficient filter needs 8 ce cycles per output, so N >= 8.  e
// changes one clock after the 8th ce following each f2_tick.  The output is the 32-bit filter
// result shifted right by 10 (coefficient 1024 = 1.0) and saturated to 16 bits.
module coef_interp
  import ce_pkg::*;
#(
  parameter int N2   = N2_COEF,
  parameter int MACS = FIR_MACS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  logic        f2_tick,
  input  logic        f1_tick,
  input  logic signed [TAPC_W-1:0] ram_q,
  input  coef_wr_t    cw,
  output logic signed [TAPC_W-1:0] e
);
  logic signed [FIR_DIN_W-1:0]  padded;
  logic signed [FIR_DOUT_W-1:0] fout;
  logic                         fvalid;

  // Zero padding: the RAM sample on a read period, zero otherwise
  assign padded = f1_tick ? ram_q : '0;

  pdsp_fir #(.TAPS(N2), .MACS(MACS)) u_filter (
    .clk, .rst_n, .ce,
    .in_valid (f2_tick),
    .din      (padded),
    .cw,
    .dout     (fout),
    .dout_valid (fvalid)
  );

  // Zero-order hold
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      e <= '0;
    else if (fvalid) e <= sat_smp(48'(fout >>> FIR_FRAC));
  end
endmodule
