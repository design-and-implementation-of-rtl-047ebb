// channel_emulator: wide-band real-time mobile radio channel emulator.
//
// Reproduces in real time the time-variant multipath impulse response
//   h(t, tau) = sum_i E_i(t) * delta(tau - tau_i)
// as a complex FIR filter with unequally spaced taps.  Three input
// interfaces turn A/D samples into 20 Ms/s base-band I/Q; twenty identical
// tap circuits (five cards of four) each pick an input, delay it by up to
// 1600 samples (80 us at 50 ns), weight it with a slowly varying complex
// coefficient and add it onto one of two partial-sum buses; two output
// interfaces turn the bus sums back into D/A samples.  Grouping taps by
// input and bus gives up to six independent FIR channels.  The coefficients
// are played back from per-tap RAMs, interpolated in real time by 32 with a
// 128-coefficient filter and held for N = 8..8192 sample periods, which sets
// the simulated Doppler frequency.  The control card runs the RAM scan in
// single or continuous mode.  This is the architecture of the original
// emulator; the analog front ends, converters, PLLs, attenuators and the
// controlling DSP are outside this RTL.
//
// Interface:
//   clk        40 MHz converter clock; the 20 MHz sample rate is the enable
//              produced here by a divide-by-two (high on every second clock)
//   adc[j]     signed 10-bit A/D code of input j, a new sample every clk
//   dac[j]     signed 12-bit D/A code of output j, a new sample every clk
//   bus        DSP write bus (see ce_pkg for the register map)
//   running    emulation running; scan_addr is the RAM address being read
// Latency from an A/D sample to the D/A stream is tau_i + NTAPS + 7 sample
// periods for tap i with unity interpolator filters (see the README).
// The detectors' iq_valid strobes are left open: every stage runs on the
// same ce, so the taps need no separate data-valid.
module channel_emulator
  import ce_pkg::*;
#(
  parameter int NCARDS        = NTAPS / 4,
  parameter int TAPS_PER_CARD = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [ADC_W-1:0] adc [NIN],
  output logic signed [DAC_W-1:0] dac [NOUT],
  input  bus_t                    bus,
  output logic                    running,
  output logic [RAM_AW-1:0]       scan_addr
);
  logic     ce;
  logic     f2_tick, f1_tick;
  coef_wr_t rf_cw [2*NIN + 2*NOUT];
  iq_t      x_in  [NIN];
  iq_sum_t  chain_end [NOUT];

  // Divide-by-two: 20 MHz sample enable
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ce <= 1'b0;
    else        ce <= ~ce;
  end

  control_card u_ctrl (
    .clk, .rst_n, .ce, .bus, .running, .f2_tick, .f1_tick, .scan_addr, .rf_cw
  );

  for (genvar j = 0; j < NIN; j++) begin : g_in
    iq_detector u_det (
      .clk, .rst_n, .ce, .adc (adc[j]),
      .cw_i (rf_cw[2*j]), .cw_q (rf_cw[2*j+1]),
      .iq (x_in[j]), .iq_valid ()
    );
  end

  // Partial-sum chain through the cards; the first card starts from zero
  for (genvar c = 0; c < NCARDS; c++) begin : g_card
    iq_sum_t sin [NOUT];
    iq_sum_t sout [NOUT];
    if (c == 0) begin : g_first
      assign sin = '{default: '0};
    end else begin : g_next
      assign sin = g_card[c-1].sout;
    end
    tap_card #(.CARD_IDX(c), .TAPS_PER_CARD(TAPS_PER_CARD)) u_card (
      .clk, .rst_n, .ce, .bus, .f2_tick, .f1_tick, .scan_addr, .x_in,
      .sum_in  (sin),
      .sum_out (sout)
    );
  end
  assign chain_end = g_card[NCARDS-1].sout;

  for (genvar j = 0; j < NOUT; j++) begin : g_out
    iq_modulator u_mod (
      .clk, .rst_n, .ce, .sum (chain_end[j]),
      .cw_i (rf_cw[2*NIN + 2*j]), .cw_q (rf_cw[2*NIN + 2*j + 1]),
      .dac  (dac[j])
    );
  end
endmodule
