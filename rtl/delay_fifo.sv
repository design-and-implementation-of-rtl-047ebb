// delay_fifo: programmable delay of the complex signal of one tap.
//
// Gives each tap of the emulated FIR filter its own delay tau_i, in steps of
// one 50 ns sample, up to 80 us (1600 samples) as in the original design.
// It is a circular buffer written every sample; the read pointer trails the
// write pointer by the programmed delay.  Until as many samples as the delay
// have been written since reset, the output is zero rather than stale memory.
//
// Timing: on a clock with ce, din is stored and dout becomes the sample
// written `delay` ce cycles earlier, so the total latency is delay + 1 ce
// cycles.  delay may be 0 .. 2**AW - 1.
module delay_fifo
  import ce_pkg::*;
#(
  parameter int AW = FIFO_AW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ce,
  input  iq_t           din,
  input  logic [AW-1:0] delay,
  output iq_t           dout
);
  iq_t           mem [2**AW];
  logic [AW-1:0] wptr, rptr, written;

  assign rptr = wptr - delay;

  always_ff @(posedge clk) begin
    if (ce) mem[wptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr    <= '0;
      written <= '0;
      dout    <= '0;
    end else if (ce) begin
      wptr <= wptr + 1'b1;
      if (written != '1) written <= written + 1'b1;
      if (delay == '0)          dout <= din;
      else if (written >= delay) dout <= mem[rptr];
      else                       dout <= '0;
    end
  end
endmodule
