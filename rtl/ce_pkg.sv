// ce_pkg: widths, register map and shared types of the channel emulator.
//
// The numbers that come from the original design are the converter
// resolutions (10-bit A/D, 12-bit D/A), the programmable FIR filter
// precisions (16-bit data in, 12-bit coefficients, 32-bit data out), the
// 20 complex taps, 3 inputs, 2 outputs, the 80 us maximum delay at 50 ns
// resolution, the 256 Kword tap RAMs, the hardware interpolation ratio p = 32
// with a 128-coefficient filter, and the zero-order-hold ratio N = 8..8192.
// The base-band sample width, the partial-sum width, the bus format and the
// register map are choices of this implementation.
package ce_pkg;

  // Converters and programmable FIR filter precisions
  localparam int ADC_W   = 10;
  localparam int DAC_W   = 12;
  localparam int FIR_DIN_W  = 16;
  localparam int FIR_COEF_W = 12;
  localparam int FIR_DOUT_W = 32;
  localparam int FIR_FRAC   = 10;   // coefficient 1024 is unity gain

  // Base-band signal path
  localparam int SMP_W  = 16;       // I or Q sample
  localparam int SUM_W  = 24;       // partial sums on the tap chain
  localparam int TAPC_W = 16;       // tap coefficient (real or imaginary)
  localparam int TAPC_FRAC = 14;    // tap coefficient 16384 is unity gain

  // Emulator dimensions
  localparam int NTAPS = 20;
  localparam int NIN   = 3;
  localparam int NOUT  = 2;
  localparam int FIFO_AW = 11;      // 2048-entry delay memory, 1600 + 19 used
  localparam int RAM_AW  = 18;      // 256 Kwords per real part
  localparam int P_INTERP = 32;     // zero-padding interpolation ratio p
  localparam int N2_COEF  = 128;    // coefficients of the tap filter
  localparam int FIR_MACS = 16;     // multipliers of one programmable FIR
  localparam int LOG2N_MIN = 3;     // N = 8
  localparam int LOG2N_MAX = 13;    // N = 8192

  typedef logic signed [SMP_W-1:0] smp_t;
  typedef logic signed [SUM_W-1:0] sum_t;

  typedef struct packed {
    smp_t i;
    smp_t q;
  } iq_t;

  typedef struct packed {
    sum_t i;
    sum_t q;
  } iq_sum_t;

  // DSP write bus: one write per clock when we is high.
  typedef struct packed {
    logic        we;
    logic [23:0] addr;
    logic [31:0] wdata;
  } bus_t;

  // Address map: addr[23:18] selects a bank.
  //   0..39  tap RAMs, bank = 2*tap + part (0 real, 1 imaginary), addr[17:0] word
  //   60     interface interpolator coefficients, addr[7:4] filter, addr[3:0] index
  //          filters 0..5 = input 1..3 (I then Q), 6..9 = output 1..2 (I then Q)
  //   61     tap filter coefficients, addr[12:8] tap, addr[7] part, addr[6:0] index
  //   62     tap registers, addr[12:8] tap, addr[1:0] register
  //   63     control card registers, addr[1:0] register
  localparam logic [5:0] BANK_RFCOEF  = 6'd60;
  localparam logic [5:0] BANK_TAPCOEF = 6'd61;
  localparam logic [5:0] BANK_TAPREG  = 6'd62;
  localparam logic [5:0] BANK_CTRL    = 6'd63;

  // Tap registers
  localparam logic [1:0] TREG_INSEL  = 2'd0;  // input 0..2
  localparam logic [1:0] TREG_OUTSEL = 2'd1;  // partial-sum bus 0..1 to add to
  localparam logic [1:0] TREG_DELAY  = 2'd2;  // delay in samples
  // Control registers
  localparam logic [1:0] CREG_CMD    = 2'd0;  // bit0 1 = start, 0 = stop; bit1 continuous
  localparam logic [1:0] CREG_LOG2N  = 2'd1;  // log2 of the zero-order-hold ratio N
  localparam logic [1:0] CREG_LAST   = 2'd2;  // last RAM address of a scan

  // Coefficient write port of a programmable FIR
  typedef struct packed {
    logic                         we;
    logic [6:0]                   idx;
    logic signed [FIR_COEF_W-1:0] data;
  } coef_wr_t;

  function automatic smp_t sat_smp(input logic signed [47:0] v);
    if (v > 48'sd32767)       return 16'sh7fff;
    else if (v < -48'sd32768) return 16'sh8000;
    else                      return smp_t'(v);
  endfunction

endpackage
