// tb_tap_card: self-checking test of a tap card (four chained tap circuits).
//
// The card under test is card 1, so its taps are numbers 4..7.  Over the DSP
// bus each tap gets a constant coefficient (the same word at RAM address 0
// of its real and imaginary banks, and a 32-coefficient box filter of unity
// gain, which with zero padding by 32 reproduces the RAM word), an input, an
// output bus and a delay.  The testbench plays the control card's ticks
// (N = 8).  After the coefficients settle, random inputs and partial sums are
// applied on every sample, and each output bus is compared with a reference:
// the incoming partial sum four samples earlier plus, for every tap on that
// bus, the product of its coefficient and its selected input tau + 10 samples
// earlier.  A second configuration moves taps between inputs and buses, and
// a write to tap 8's registers must change nothing.
module tb_tap_card;
  import ce_pkg::*;

  localparam int CARD = 1;
  localparam int NT   = 4;

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

  tap_card #(.CARD_IDX(CARD), .TAPS_PER_CARD(NT)) dut (
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
    int t = CARD * NT + j;
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
          iq_sum_t e = sh[m-3][b];
          for (int j = 0; j < NT; j++) begin
            if (out_sel[j] == b) begin
              int s = m - 10 - dly[j];
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
    coef[0] = '{i: 16'sd16384, q: 16'sd0};
    coef[1] = '{i: 16'sd8000,  q: -16'sd6000};
    coef[2] = '{i: -16'sd3000, q: 16'sd12000};
    coef[3] = '{i: 16'sd0,     q: -16'sd16384};
    for (int j = 0; j < NT; j++) begin
      automatic int t = CARD * NT + j;
      wr({6'(2 * t), 18'd0}, 32'(coef[j].i));
      wr({6'(2 * t + 1), 18'd0}, 32'(coef[j].q));
      for (int k = 0; k < 32; k++) begin
        wr({BANK_TAPCOEF, 5'd0, 5'(t), 1'b0, 7'(k)}, 32'd1024);
        wr({BANK_TAPCOEF, 5'd0, 5'(t), 1'b1, 7'(k)}, 32'd1024);
      end
    end
    // let the interpolators pick the words up
    repeat (600) @(negedge clk);

    config_tap(0, 0, 0, 0);
    config_tap(1, 1, 1, 5);
    config_tap(2, 2, 0, 37);
    config_tap(3, 0, 1, 1600);
    run_and_check(2000, 1700);

    config_tap(0, 2, 1, 12);
    config_tap(1, 3, 0, 3);
    config_tap(2, 1, 1, 0);
    config_tap(3, 0, 0, 250);
    // another card's tap must not react
    wr({BANK_TAPREG, 5'd0, 5'(CARD * NT + NT), 6'd0, TREG_OUTSEL}, 32'd1);
    wr({BANK_TAPREG, 5'd0, 5'(CARD * NT + NT), 6'd0, TREG_DELAY}, 32'd9);
    run_and_check(1000, 300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
