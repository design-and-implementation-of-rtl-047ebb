// tap_card: one tap circuit card, four tap circuits in a chain.
//
// The card's taps share the inputs, the DSP bus and the scan timing; the
// two partial-sum buses enter the first tap and leave the last one.  Taps
// are numbered CARD_IDX*TAPS_PER_CARD + j, which sets the addresses each tap
// answers to and its position on the chain.  Latency from sum_in to sum_out
// is TAPS_PER_CARD ce cycles.
module tap_card
  import ce_pkg::*;
#(
  parameter int CARD_IDX      = 0,
  parameter int TAPS_PER_CARD = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce,
  input  bus_t              bus,
  input  logic              f2_tick,
  input  logic              f1_tick,
  input  logic [RAM_AW-1:0] scan_addr,
  input  iq_t               x_in    [NIN],
  input  iq_sum_t           sum_in  [NOUT],
  output iq_sum_t           sum_out [NOUT]
);
  for (genvar j = 0; j < TAPS_PER_CARD; j++) begin : g_tap
    iq_sum_t sin [NOUT];
    iq_sum_t sout [NOUT];
    if (j == 0) begin : g_first
      assign sin = sum_in;
    end else begin : g_next
      assign sin = g_tap[j-1].sout;
    end
    tap_circuit #(.TAP_IDX(CARD_IDX * TAPS_PER_CARD + j)) u_tap (
      .clk, .rst_n, .ce, .bus, .f2_tick, .f1_tick, .scan_addr, .x_in,
      .sum_in  (sin),
      .sum_out (sout)
    );
  end
  assign sum_out = g_tap[TAPS_PER_CARD-1].sout;
endmodule
