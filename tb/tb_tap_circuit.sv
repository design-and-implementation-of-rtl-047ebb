// tb_tap_circuit: self-checking test of one tap circuit.
//
// Tap number 6 is configured over the DSP bus: a constant coefficient (the
// same word at RAM address 0 of its two banks and a 32-coefficient box
// filter of unity gain, which with zero padding by 32 reproduces the RAM
// word), an input, an output bus and a delay.  The testbench plays the
// control card's ticks (N = 8).  Random inputs and partial sums are applied
// on every sample; the selected bus must carry the incoming partial sum plus
// the coefficient times the selected input tau + 9 samples earlier (tau plus
// the tap's chain-position compensation of 6 plus 3 registers), the other
// bus the incoming partial sum unchanged.  Further configurations switch
// input, bus and delay, select no input, and a write to tap 7 must change
// nothing.
module tb_tap_circuit;
  import ce_pkg::*;

  localparam int TAPN = 6;
  localparam int NT   = 1;

  logic clk = 1'b0, rst_n = 1'b0, ce;
  always #5 clk = ~clk;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ce <= 1'b0; else ce <= ~ce;

  bus_t bus;
  logic f2_tick, f1_tick;
  logic [RAM_AW-1:0] scan_addr;
  iq_t x_in [NIN];
  iq_sum_t sum_in [NOUT], sum_out [NOUT];
  int checks = 0, failures = 0;

  tap_circuit #(.TAP_IDX(TAPN)) dut (
    .clk, .rst_n, .ce, .bus, .f2_tick, .f1_tick, .scan_addr, .x_in, .sum_in, .sum_out
  );

  // Control card ticks: N = 8, p = 32
  int div_cnt = 0, p_cnt = 0;
  assign f2_tick = ce && (div_cnt == 0);
  assign f1_tick = f2_tick && (p_cnt == 0);
  always_ff @(posedge clk) if (ce) begin
    div_cnt <= (div_cnt + 1) % 8;
    if (f2_tick) p_cnt <= (p_cnt + 1) % 32;
  end
  assign scan_addr = '0;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [23:0] a, input logic [31:0] d);
    @(negedge clk);
    bus = '{we: 1'b1, addr: a, wdata: d};
    @(negedge clk);
    bus = '0;
  endtask

  function automatic logic signed [15:0] sat(input longint v);
    if (v > 32767) return 16'sd32767;
    if (v < -32768) return -16'sd32768;
    return 16'(v);
  endfunction

  function automatic iq_t cmul(input iq_t a, input iq_t b);
    iq_t r;
    r.i = sat((longint'(a.i) * b.i - longint'(a.q) * b.q) >>> 14);
    r.q = sat((longint'(a.i) * b.q + longint'(a.q) * b.i) >>> 14);
    return r;
  endfunction

  iq_t coef [NT];
  int  in_sel [NT], out_sel [NT], dly [NT];

  task automatic config_tap(input int j, input int is, input int os, input int d);
    int t = TAPN;
    in_sel[j] = is; out_sel[j] = os; dly[j] = d;
    wr({BANK_TAPREG, 5'd0, 5'(t), 6'd0, TREG_INSEL},  32'(is));
    wr({BANK_TAPREG, 5'd0, 5'(t), 6'd0, TREG_OUTSEL}, 32'(os));
    wr({BANK_TAPREG, 5'd0, 5'(t), 6'd0, TREG_DELAY},  32'(d));
  endtask

  // History of everything applied, indexed by ce edge
  localparam int H = 8192;
  iq_t     xh [H][NIN];
  iq_sum_t sh [H][NOUT];
  int      selh [H][NT];

  task automatic run_and_check(input int n_samples, input int first_check);
    static int m = 0;
    for (int k = 0; k < n_samples; k++) begin
      // inputs for the next ce edge, set while ce is low
      do @(negedge clk); while (ce);
      @(negedge clk);
      // ce is high until the next posedge: that edge is edge m
      for (int i = 0; i < NIN; i++) begin
        x_in[i] = '{i: 16'($urandom % 20000) - 16'sd10000, q: 16'($urandom % 20000) - 16'sd10000};
        xh[m][i] = x_in[i];
      end
      for (int b = 0; b < NOUT; b++) begin
        sum_in[b] = '{i: 24'($urandom % 2000000) - 24'sd1000000, q: 24'($urandom % 2000000) - 24'sd1000000};
        sh[m][b] = sum_in[b];
      end
      for (int j = 0; j < NT; j++) selh[m][j] = in_sel[j];
      @(posedge clk); #1;
      if (k >= first_check) begin
        for (int b = 0; b < NOUT; b++) begin
          iq_sum_t e = sh[m][b];
          for (int j = 0; j < NT; j++) begin
            if (out_sel[j] == b) begin
              int s = m - 3 - TAPN - dly[j];
              iq_t xv = (selh[s][j] < NIN) ? xh[s][selh[s][j]] : '0;
              iq_t p = cmul(xv, coef[j]);
              e.i += SUM_W'(p.i);
              e.q += SUM_W'(p.q);
            end
          end
          checks++;
          if (sum_out[b] !== e) begin
            failures++;
            if (failures < 10)
              $display("FAIL edge %0d bus %0d: got %h,%h expected %h,%h in %h", m, b,
                       sum_out[b].i, sum_out[b].q, e.i, e.q, sh[m-3][b]);
          end
        end
      end
      m++;
    end
  endtask

  initial begin
    bus = '0;
    for (int i = 0; i < NIN; i++) x_in[i] = '0;
    for (int b = 0; b < NOUT; b++) sum_in[b] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Coefficients: RAM word 0 and a box filter of 32 x 1.0
    coef[0] = '{i: 16'sd9000, q: -16'sd13000};
    for (int j = 0; j < NT; j++) begin
      automatic int t = TAPN;
      wr({6'(2 * t), 18'd0}, 32'(coef[j].i));
      wr({6'(2 * t + 1), 18'd0}, 32'(coef[j].q));
      for (int k = 0; k < 32; k++) begin
        wr({BANK_TAPCOEF, 5'd0, 5'(t), 1'b0, 7'(k)}, 32'd1024);
        wr({BANK_TAPCOEF, 5'd0, 5'(t), 1'b1, 7'(k)}, 32'd1024);
      end
    end
    // let the interpolators pick the words up
    repeat (600) @(negedge clk);

    config_tap(0, 1, 1, 5);
    run_and_check(600, 100);
    config_tap(0, 2, 0, 1600);
    run_and_check(2000, 1700);
    config_tap(0, 0, 1, 0);
    run_and_check(300, 20);
    config_tap(0, 3, 0, 44);
    run_and_check(200, 80);
    // the next tap's registers are not this tap's
    wr({BANK_TAPREG, 5'd0, 5'(TAPN + 1), 6'd0, TREG_INSEL}, 32'd1);
    wr({BANK_TAPREG, 5'd0, 5'(TAPN + 1), 6'd0, TREG_OUTSEL}, 32'd1);
    wr({BANK_TAPREG, 5'd0, 5'(TAPN + 1), 6'd0, TREG_DELAY}, 32'd9);
    run_and_check(200, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
