// tb_channel_emulator: end-to-end test of the whole emulator at full size.
//
// The testbench plays the DSP: over the write bus it loads pass-through
// coefficients into the ten interface interpolators, programs five of the
// twenty taps as three channels, fills their RAMs and loads 32-coefficient
// box filters of unity gain into their coefficient interpolators (with zero
// padding by 32 this reproduces the current RAM word exactly), and starts a
// continuous scan.
//   channel 1: input 1 -> output 1, taps 0 (0 us), 3 (10 us), 5 (5 us)
//              tap 5's RAM words change along the scan (time-variant tap)
//   channel 2: input 2 -> output 2, tap 10 (1.85 us)
//   channel 3: input 3 -> output 2, tap 19 (80 us, the longest delay)
// An impulse on one in-phase A/D sample of an input is then sent and the
// whole D/A stream of both outputs is compared, clock by clock, with the
// expected sparse impulse response: for each tap a sample 55 + 2*tau clocks
// after the impulse (even position for a real coefficient part, odd for an
// imaginary one) whose size is the coefficient times the impulse, and zero
// everywhere else.  The scan is watched on the status ports: address steps
// every 32*N samples, turns at both ends in continuous mode, a changed N,
// and a single scan that stops by itself.  Each mechanism is counted and
// must have happened at least once.
module tb_channel_emulator;
  import ce_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic signed [ADC_W-1:0] adc [NIN];
  logic signed [DAC_W-1:0] dac [NOUT];
  bus_t bus;
  logic running;
  logic [RAM_AW-1:0] scan_addr;
  int checks = 0, failures = 0;

  channel_emulator dut (.clk, .rst_n, .adc, .dac, .bus, .running, .scan_addr);

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic wr(input logic [23:0] a, input logic [31:0] d);
    @(negedge clk);
    bus = '{we: 1'b1, addr: a, wdata: d};
    @(negedge clk);
    bus = '0;
  endtask

  // Mechanism counters
  int n_inputs_used [NIN];
  int n_outputs_used [NOUT];
  int n_max_delay, n_bus_add, n_time_variant, n_turns, n_n_change, n_single_stop;

  // ---------------- channel programming ----------------
  typedef struct {
    int tap, in_sel, out_sel, delay;
    int re [4];
    int im [4];
  } tap_cfg_t;
  tap_cfg_t cfg [5];

  task automatic program_tap(input tap_cfg_t c);
    for (int a = 0; a < 4; a++) begin
      wr({6'(2 * c.tap), 18'(a)}, 32'(c.re[a]));
      wr({6'(2 * c.tap + 1), 18'(a)}, 32'(c.im[a]));
    end
    for (int k = 0; k < 32; k++) begin
      wr({BANK_TAPCOEF, 5'd0, 5'(c.tap), 1'b0, 7'(k)}, 32'd1024);
      wr({BANK_TAPCOEF, 5'd0, 5'(c.tap), 1'b1, 7'(k)}, 32'd1024);
    end
    wr({BANK_TAPREG, 5'd0, 5'(c.tap), 6'd0, TREG_INSEL},  32'(c.in_sel));
    wr({BANK_TAPREG, 5'd0, 5'(c.tap), 6'd0, TREG_OUTSEL}, 32'(c.out_sel));
    wr({BANK_TAPREG, 5'd0, 5'(c.tap), 6'd0, TREG_DELAY},  32'(c.delay));
  endtask

  // ---------------- impulse response check ----------------
  localparam int IMP = 200;            // A/D code of the impulse
  localparam int WIN = 55 + 2 * 1600 + 20;
  localparam int BASE = 55;            // clocks from impulse to first D/A sample

  // Coefficient word c (2.14) times the detector's impulse (IMP*32), as a D/A code magnitude
  function automatic int dac_mag(input int c);
    longint p = (longint'(IMP * 32) * c) >>> 14;
    if (p < 0) p = -p;
    return int'(p >>> 4);
  endfunction

  task automatic impulse(input int inp);
    int exp_mag [NOUT][WIN];
    bit exp_any [NOUT][WIN];
    int seen_var = -1;
    for (int o = 0; o < NOUT; o++)
      for (int t = 0; t < WIN; t++) begin exp_mag[o][t] = 0; exp_any[o][t] = 0; end
    // wait for a clock edge that stores an even sample
    do @(negedge clk); while (dut.ce);
    adc[inp] = ADC_W'(IMP);
    @(negedge clk);
    adc[inp] = '0;
    // expected response: the RAM word the scan is on decides tap 5's size
    foreach (cfg[i]) begin
      if (cfg[i].in_sel == inp) begin
        int o = cfg[i].out_sel;
        int t = BASE + 2 * cfg[i].delay;
        exp_mag[o][t] = dac_mag(cfg[i].re[0]);     exp_any[o][t] = cfg[i].re[0] != 0;
        exp_mag[o][t+1] = dac_mag(cfg[i].im[0]);   exp_any[o][t+1] = cfg[i].im[0] != 0;
        if (cfg[i].tap == 5) exp_any[o][t] = 1'b0;  // checked on its own below
        n_inputs_used[inp]++;
        n_outputs_used[o]++;
      end
    end
    // compare the D/A streams, the impulse edge being clock 0
    for (int t = 1; t < WIN; t++) begin
      @(posedge clk); #1;
      for (int o = 0; o < NOUT; o++) begin
        int got = (dac[o] < 0) ? -int'(dac[o]) : int'(dac[o]);
        if (inp == 0 && o == 0 && t == BASE + 2 * cfg[2].delay) begin
          // time-variant tap: one of its four RAM words
          bit ok = 0;
          for (int a = 0; a < 4; a++) if (got >= dac_mag(cfg[2].re[a]) - 1 && got <= dac_mag(cfg[2].re[a]) + 1) ok = 1;
          expect_true(ok, $sformatf("time-variant tap size %0d", got));
          seen_var = got;
        end else if (exp_any[o][t]) begin
          expect_true(got >= exp_mag[o][t] - 1 && got <= exp_mag[o][t] + 1,
                      $sformatf("input %0d output %0d clock %0d: size %0d expected %0d", inp, o, t, got, exp_mag[o][t]));
        end else begin
          checks++;
          if (got != 0) begin
            failures++;
            if (failures < 20) $display("FAIL input %0d output %0d clock %0d: %0d where none expected", inp, o, t, dac[o]);
          end
        end
      end
    end
    if (seen_var >= 0) tv_sizes.push_back(seen_var);
  endtask

  int tv_sizes [$];

  // ---------------- scan watching ----------------
  int last_change_clk, step_clks;
  int clk_count = 0;
  logic [RAM_AW-1:0] prev_addr, prev_prev_addr;
  always @(posedge clk) begin
    clk_count++;
    if (rst_n && scan_addr != prev_addr) begin
      step_clks = clk_count - last_change_clk;
      last_change_clk = clk_count;
      if (prev_prev_addr == scan_addr) n_turns++;
      prev_prev_addr = prev_addr;
      prev_addr = scan_addr;
    end
  end

  initial begin
    bus = '0;
    for (int i = 0; i < NIN; i++) adc[i] = '0;
    prev_addr = '0; prev_prev_addr = '1; last_change_clk = 0; step_clks = 0;
    n_max_delay = 0; n_bus_add = 0; n_time_variant = 0; n_turns = 0; n_n_change = 0; n_single_stop = 0;
    foreach (n_inputs_used[i]) n_inputs_used[i] = 0;
    foreach (n_outputs_used[i]) n_outputs_used[i] = 0;
    cfg[0] = '{tap: 0,  in_sel: 0, out_sel: 0, delay: 0,    re: '{8192, 8192, 8192, 8192},   im: '{0, 0, 0, 0}};
    cfg[1] = '{tap: 3,  in_sel: 0, out_sel: 0, delay: 200,  re: '{0, 0, 0, 0},               im: '{7700, 7700, 7700, 7700}};
    cfg[2] = '{tap: 5,  in_sel: 0, out_sel: 0, delay: 100,  re: '{4096, 8192, 12288, 16384}, im: '{0, 0, 0, 0}};
    cfg[3] = '{tap: 10, in_sel: 1, out_sel: 1, delay: 37,   re: '{-8192, -8192, -8192, -8192}, im: '{0, 0, 0, 0}};
    cfg[4] = '{tap: 19, in_sel: 2, out_sel: 1, delay: 1600, re: '{4096, 4096, 4096, 4096},   im: '{4096, 4096, 4096, 4096}};
    repeat (4) @(negedge clk);
    rst_n = 1;

    // interface interpolators: pass-through
    for (int f = 0; f < 2 * NIN + 2 * NOUT; f++) wr({BANK_RFCOEF, 10'd0, 4'(f), 4'd0}, 32'd1024);
    foreach (cfg[i]) program_tap(cfg[i]);
    n_max_delay += int'(cfg[4].delay == 1600);
    n_bus_add   += int'(cfg[0].out_sel == cfg[1].out_sel);

    // continuous scan of addresses 0..3, N = 8
    wr({BANK_CTRL, 16'd0, CREG_LOG2N}, 32'd3);
    wr({BANK_CTRL, 16'd0, CREG_LAST}, 32'd3);
    wr({BANK_CTRL, 16'd0, CREG_CMD}, 32'd3);
    repeat (700) @(negedge clk);
    expect_true(running, "emulation running after start");

    for (int r = 0; r < 5; r++) begin
      impulse(0);
      repeat (137 * r) @(negedge clk);
    end
    impulse(1);
    impulse(2);

    // scan: address steps every 32*N samples = 512 clocks at N = 8
    expect_true(step_clks == 512, $sformatf("scan step %0d clocks at N = 8", step_clks));
    // N = 16
    wr({BANK_CTRL, 16'd0, CREG_LOG2N}, 32'd4);
    repeat (3 * 1024) @(negedge clk);
    expect_true(step_clks == 1024, $sformatf("scan step %0d clocks at N = 16", step_clks));
    n_n_change += int'(step_clks == 1024);
    // single scan stops by itself after address 3
    wr({BANK_CTRL, 16'd0, CREG_LOG2N}, 32'd3);
    wr({BANK_CTRL, 16'd0, CREG_CMD}, 32'd1);
    repeat (5 * 512) @(negedge clk);
    expect_true(!running && scan_addr == 18'd3, "single scan ends at the last address");
    n_single_stop += int'(!running);

    // time-variant tap: more than one coefficient value seen
    n_time_variant = 0;
    foreach (tv_sizes[i]) if (tv_sizes[i] != tv_sizes[0]) n_time_variant++;

    // every mechanism happened
    foreach (n_inputs_used[i])  expect_true(n_inputs_used[i] > 0, $sformatf("input %0d used", i));
    foreach (n_outputs_used[i]) expect_true(n_outputs_used[i] > 0, $sformatf("output %0d used", i));
    expect_true(n_max_delay > 0, "80 us delay used");
    expect_true(n_bus_add > 0, "two taps added on one bus");
    expect_true(n_time_variant > 0, "time-variant coefficient changed between impulses");
    expect_true(n_turns > 0, "continuous scan turned");
    expect_true(n_n_change > 0, "N changed");
    expect_true(n_single_stop > 0, "single scan stopped");
    $display("mechanisms: inputs %0d/%0d/%0d outputs %0d/%0d max-delay %0d bus-add %0d time-variant %0d turns %0d N-change %0d single-stop %0d",
             n_inputs_used[0], n_inputs_used[1], n_inputs_used[2], n_outputs_used[0], n_outputs_used[1],
             n_max_delay, n_bus_add, n_time_variant, n_turns, n_n_change, n_single_stop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
