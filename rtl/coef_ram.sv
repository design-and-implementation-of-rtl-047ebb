// coef_ram: one tap RAM bank (real or imaginary part of a tap coefficient).
//
// Holds the channel samples that the DSP has interpolated off line.  The
// DSP writes it before the emulation starts; in real time it is read at the
// slow rate f1 = f2/32 at the scan address.  Size follows the original
// design (256 Kwords per real part); the 16-bit word is this design's choice.
//
// Interface: synchronous write (we, waddr, wdata); registered read, q holds
// mem[raddr] one clock after raddr is presented.  The contents are not reset.
module coef_ram
  import ce_pkg::*;
#(
  parameter int AW = RAM_AW,
  parameter int DW = TAPC_W
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] q
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    q <= mem[raddr];
  end
endmodule
