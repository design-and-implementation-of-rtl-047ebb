// scan_ctrl: real-time scan timing of the tap RAMs.
//
// Generates the two slow clocks of the coefficient path as one-clock enables
// that coincide with the 20 MHz sample enable ce:
//   f2_tick  the interpolation filter clock, once every N sample periods,
//            N = 2**log2n with log2n clamped to 3..13 (N = 8..8192),
//   f1_tick  the RAM read, on every 32nd f2_tick (f1 = f2/32).
// At each f1_tick the scan address moves on.  In single scan it runs from 0
// to `last` once and then the emulation stops; in continuous mode it runs up
// to `last`, back down to 0, and so on (no address is repeated at a turn)
// until a stop command.  A start command restarts from address 0 going up.
// These modes and ratios are those of the original design; the start/stop
// pulses and the clamping of N are this design's choices.
//
// Timing: the first f2_tick and f1_tick come with the first ce after start,
// and they read address 0; addr changes on the clock after each f1_tick.
module scan_ctrl
  import ce_pkg::*;
#(
  parameter int LOG2N_LO = LOG2N_MIN,
  parameter int LOG2N_HI = LOG2N_MAX,
  parameter int P        = P_INTERP
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce,
  input  logic              start,
  input  logic              stop,
  input  logic              continuous,
  input  logic [3:0]        log2n,
  input  logic [RAM_AW-1:0] last,
  output logic              running,
  output logic              f2_tick,
  output logic              f1_tick,
  output logic [RAM_AW-1:0] addr
);
  localparam int PW = $clog2(P);

  logic [LOG2N_HI-1:0] div_cnt, div_max;
  logic [PW-1:0]       p_cnt;
  logic                down;
  int unsigned         k;

  always_comb begin
    k = (int'(log2n) < LOG2N_LO) ? LOG2N_LO :
        (int'(log2n) > LOG2N_HI) ? LOG2N_HI : int'(log2n);
    div_max = LOG2N_HI'((64'd1 << k) - 64'd1);
  end

  assign f2_tick = running && ce && (div_cnt == '0);
  assign f1_tick = f2_tick && (p_cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      div_cnt <= '0;
      p_cnt   <= '0;
      addr    <= '0;
      down    <= 1'b0;
    end else if (start) begin
      running <= 1'b1;
      div_cnt <= '0;
      p_cnt   <= '0;
      addr    <= '0;
      down    <= 1'b0;
    end else if (stop) begin
      running <= 1'b0;
    end else if (running && ce) begin
      div_cnt <= (div_cnt >= div_max) ? '0 : div_cnt + 1'b1;
      if (f2_tick) p_cnt <= p_cnt + 1'b1;
      if (f1_tick) begin
        if (!continuous) begin
          if (addr == last) running <= 1'b0;
          else              addr    <= addr + 1'b1;
        end else if (last == '0) begin
          addr <= '0;
        end else if (!down) begin
          if (addr == last) begin down <= 1'b1; addr <= addr - 1'b1; end
          else              addr <= addr + 1'b1;
        end else begin
          if (addr == '0)   begin down <= 1'b0; addr <= addr + 1'b1; end
          else              addr <= addr - 1'b1;
        end
      end
    end
  end
endmodule
