// pdsp_fir: programmable FIR filter with a fixed bank of multipliers.
//
// Behaves like the programmable FIR filter devices used throughout the
// emulator: 16-bit input samples, 12-bit coefficients, 32-bit output.  The
// filter owns MACS multipliers.  When it has TAPS > MACS coefficients, each
// output takes TAPS/MACS computation cycles, which is why the device offers
// 16 coefficients at the full 20 MHz rate but 128 coefficients when it is
// clocked at one eighth of that rate.
//
// Timing: a sample is accepted on a clock with ce and in_valid both high; it
// is shifted into the delay line (line[0] newest).  On each following ce one
// group of MACS products is accumulated; after TAPS/MACS such cycles dout
// holds  sum_k coef[k] * x[n-k]  and dout_valid pulses for one clock.  With
// TAPS == MACS a new sample may arrive on every ce and the output follows the
// input by two ce cycles.  With TAPS > MACS the next sample must not arrive
// before the computation is over.  The accumulator wraps at 32 bits like the
// device's output.  Coefficients are written one at a time through cw and
// are cleared by reset; the single coefficient set (the device can hold two)
// is a simplification of this design.
module pdsp_fir
  import ce_pkg::*;
#(
  parameter int TAPS = 16,
  parameter int MACS = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          ce,
  input  logic                          in_valid,
  input  logic signed [FIR_DIN_W-1:0]   din,
  input  coef_wr_t                      cw,
  output logic signed [FIR_DOUT_W-1:0]  dout,
  output logic                          dout_valid
);
  localparam int PHASES = TAPS / MACS;
  localparam int PW     = (PHASES > 1) ? $clog2(PHASES) : 1;
  localparam int IW     = $clog2(TAPS);

  logic signed [FIR_DIN_W-1:0]  line [TAPS];
  logic signed [FIR_COEF_W-1:0] coef [TAPS];
  logic [PW-1:0]                phase;
  logic                         busy;
  logic signed [FIR_DOUT_W-1:0] acc, partial;

  initial begin
    assert (TAPS % MACS == 0) else $error("TAPS must be a multiple of MACS");
  end

  // One group of MACS products
  always_comb begin
    partial = '0;
    for (int m = 0; m < MACS; m++) begin
      partial += FIR_DOUT_W'(coef[int'(phase) * MACS + m] * line[int'(phase) * MACS + m]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) coef[k] <= '0;
    end else if (cw.we) begin
      coef[cw.idx[IW-1:0]] <= cw.data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) line[k] <= '0;
      phase      <= '0;
      busy       <= 1'b0;
      acc        <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= 1'b0;
      if (ce) begin
        if (busy) begin
          if (int'(phase) == PHASES - 1) begin
            dout       <= acc + partial;
            dout_valid <= 1'b1;
            busy       <= 1'b0;
          end else begin
            acc   <= acc + partial;
            phase <= phase + 1'b1;
          end
        end
        if (in_valid) begin
          line[0] <= din;
          for (int k = 1; k < TAPS; k++) line[k] <= line[k-1];
          busy  <= 1'b1;
          phase <= '0;
          acc   <= '0;
        end
      end
    end
  end
endmodule
