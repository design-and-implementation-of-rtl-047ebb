// control_card: global control of the emulator.
//
// Decodes the DSP writes addressed to the control card and holds what they
// set: start and stop of the real-time emulation, single-scan or continuous
// mode, the zero-order-hold ratio N (as log2 N) that sets the simulated
// Doppler frequency, and the last RAM address of a scan.  It generates the
// variable filter clock and the RAM scan through scan_ctrl, and it passes
// the coefficient writes of the input and output interface interpolators on
// to them.  The functions are those of the original control card; the
// register map (see ce_pkg) is this design's.
//
// Register writes take effect on the next clock.  A write of the command
// register with bit 0 set starts the emulation; with bit 0 clear it stops it.
// Reset state: stopped, single scan, N = 8, last = the whole RAM.
// The interface coefficient writes (rf_cw) are combinational: only the
// write strobe is decoded, the index and data fields are wired straight from
// the bus address and data, and they are used in the same clock.
module control_card
  import ce_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce,
  input  bus_t              bus,
  output logic              running,
  output logic              f2_tick,
  output logic              f1_tick,
  output logic [RAM_AW-1:0] scan_addr,
  output coef_wr_t          rf_cw [2*NIN + 2*NOUT]
);
  logic              cmd_wr, start, stop, continuous;
  logic [3:0]        log2n;
  logic [RAM_AW-1:0] last;
  logic [5:0]        bank;

  assign bank   = bus.addr[23:18];
  assign cmd_wr = bus.we && bank == BANK_CTRL && bus.addr[1:0] == CREG_CMD;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start      <= 1'b0;
      stop       <= 1'b0;
      continuous <= 1'b0;
      log2n      <= 4'(LOG2N_MIN);
      last       <= '1;
    end else begin
      start <= cmd_wr &&  bus.wdata[0];
      stop  <= cmd_wr && !bus.wdata[0];
      if (cmd_wr) continuous <= bus.wdata[1];
      if (bus.we && bank == BANK_CTRL && bus.addr[1:0] == CREG_LOG2N) log2n <= bus.wdata[3:0];
      if (bus.we && bank == BANK_CTRL && bus.addr[1:0] == CREG_LAST)  last  <= bus.wdata[RAM_AW-1:0];
    end
  end

  scan_ctrl u_scan (
    .clk, .rst_n, .ce, .start, .stop, .continuous, .log2n, .last,
    .running, .f2_tick, .f1_tick, .addr (scan_addr)
  );

  // Interface interpolator coefficient writes
  always_comb begin
    for (int f = 0; f < 2*NIN + 2*NOUT; f++) begin
      rf_cw[f].we   = bus.we && bank == BANK_RFCOEF && int'(bus.addr[7:4]) == f;
      rf_cw[f].idx  = {3'b000, bus.addr[3:0]};
      rf_cw[f].data = bus.wdata[FIR_COEF_W-1:0];
    end
  end
endmodule
