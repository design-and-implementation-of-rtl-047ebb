// tb_workloads: the emulator's reference channel profiles, run on the full
// design at its default size.
//
// The testbench plays the DSP over the write bus.  It loads pass-through
// interface interpolators and static tap coefficients (the same word in both
// scanned RAM addresses, played back through a 32-coefficient box filter of
// unity gain, so E_i(t) is constant).  Then it sends one impulse per input and
// compares the whole D/A stream of both outputs with the expected sparse
// impulse response, clock by clock, signs included.
//   workload 1, two two-ray channels running at the same time (the
//   soft-handover set-up, two inputs to two outputs):
//     input 0 -> output 0: rays at 0 and 10 us, second ray 0.94 e^{+j60deg}
//                          times the first (minimum phase)
//     input 1 -> output 1: rays at 0 and 10 us, second ray 1.06 e^{-j45deg}
//                          times the first (non-minimum phase)
//   workload 2, suburban profile: the two-ray taps are switched off and six
//     taps form one channel input 2 -> output 1 with rays at 0, 0.5, 5.25,
//     5.75, 6.75 and 9.1 us (0, 10, 105, 115, 135, 182 samples) and fixed
//     complex gains.
// Expected response: a ray of delay tau and gain c = (re + j im)/16384 puts,
// 55 + 2*tau clocks after the impulse on an even A/D sample, the D/A pair
//   even = s * re * IMP / 8192,   odd = -s * im * IMP / 8192,
// where s = (-1)^(tau + NTAPS + 7) is the 10 MHz carrier's sign rotation over
// the channel delay plus the fixed latency of NTAPS + 7 samples.  Values
// within one code of that are accepted (truncation of negative products);
// every other D/A sample must be zero.  The ray gains are fixed test values
// chosen for this check; the ray delays and two-ray magnitudes are those of
// the emulator's laboratory tests.
module tb_workloads;
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
    #2000000;
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

  typedef struct {
    int tap, in_sel, out_sel, delay, re, im;
  } ray_t;

  localparam int IMP  = 256;                 // A/D code of the impulse
  localparam int BASE = 2 * (NTAPS + 7) + 1; // clocks to the D/A sample of a tau = 0 ray
  localparam int WIN  = BASE + 2 * 200 + 40;

  ray_t rays [$];
  int   n_rays_checked [NOUT];
  int   n_concurrent, n_minphase, n_nonminphase, n_suburban_rays, n_disabled;

  task automatic program_ray(input ray_t r);
    for (int a = 0; a < 2; a++) begin
      wr({6'(2 * r.tap), 18'(a)}, 32'(r.re));
      wr({6'(2 * r.tap + 1), 18'(a)}, 32'(r.im));
    end
    for (int k = 0; k < 32; k++) begin
      wr({BANK_TAPCOEF, 5'd0, 5'(r.tap), 1'b0, 7'(k)}, 32'd1024);
      wr({BANK_TAPCOEF, 5'd0, 5'(r.tap), 1'b1, 7'(k)}, 32'd1024);
    end
    wr({BANK_TAPREG, 5'd0, 5'(r.tap), 6'd0, TREG_INSEL},  32'(r.in_sel));
    wr({BANK_TAPREG, 5'd0, 5'(r.tap), 6'd0, TREG_OUTSEL}, 32'(r.out_sel));
    wr({BANK_TAPREG, 5'd0, 5'(r.tap), 6'd0, TREG_DELAY},  32'(r.delay));
  endtask

  task automatic disable_tap(input int tap);
    wr({BANK_TAPREG, 5'd0, 5'(tap), 6'd0, TREG_INSEL}, 32'd3);
  endtask

  // Send an impulse on input inp and compare both D/A streams.
  task automatic impulse(input int inp);
    int  exp_v   [NOUT][WIN];
    bit  exp_any [NOUT][WIN];
    for (int o = 0; o < NOUT; o++)
      for (int t = 0; t < WIN; t++) begin exp_v[o][t] = 0; exp_any[o][t] = 0; end
    foreach (rays[i]) begin
      if (rays[i].in_sel == inp) begin
        automatic int o = rays[i].out_sel;
        automatic int t = BASE + 2 * rays[i].delay;
        automatic int s = ((rays[i].delay + NTAPS + 7) % 2 == 0) ? 1 : -1;
        exp_v[o][t]   =  s * rays[i].re * IMP / 8192;  exp_any[o][t]   = 1'b1;
        exp_v[o][t+1] = -s * rays[i].im * IMP / 8192;  exp_any[o][t+1] = 1'b1;
      end
    end
    do @(negedge clk); while (dut.ce);       // next edge stores an even sample
    adc[inp] = ADC_W'(IMP);
    @(negedge clk);
    adc[inp] = '0;
    for (int t = 1; t < WIN; t++) begin
      @(posedge clk); #1;
      for (int o = 0; o < NOUT; o++) begin
        automatic int got = int'(dac[o]);
        checks++;
        if (exp_any[o][t]) begin
          if (got < exp_v[o][t] - 1 || got > exp_v[o][t] + 1) begin
            failures++;
            if (failures < 20)
              $display("FAIL input %0d output %0d clock %0d: %0d expected %0d", inp, o, t, got, exp_v[o][t]);
          end else if (t % 2 == BASE % 2) n_rays_checked[o]++;
        end else if (got != 0) begin
          failures++;
          if (failures < 20) $display("FAIL input %0d output %0d clock %0d: %0d where none expected", inp, o, t, got);
        end
      end
    end
  endtask

  // 16384 * m * e^{j phi}, for the two-ray second rays
  function automatic ray_t ray(input int tap, inp, outp, dly, input real m, input real deg);
    ray_t r;
    real ph = deg * 3.14159265358979 / 180.0;
    r.tap = tap; r.in_sel = inp; r.out_sel = outp; r.delay = dly;
    r.re = int'($floor(16384.0 * m * $cos(ph) / 32.0 + 0.5)) * 32;
    r.im = int'($floor(16384.0 * m * $sin(ph) / 32.0 + 0.5)) * 32;
    return r;
  endfunction

  initial begin
    bus = '0;
    for (int i = 0; i < NIN; i++) adc[i] = '0;
    foreach (n_rays_checked[o]) n_rays_checked[o] = 0;
    n_concurrent = 0; n_minphase = 0; n_nonminphase = 0; n_suburban_rays = 0; n_disabled = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;

    for (int f = 0; f < 2 * NIN + 2 * NOUT; f++) wr({BANK_RFCOEF, 10'd0, 4'(f), 4'd0}, 32'd1024);

    // ---- workload 1: two two-ray channels side by side, tau = 10 us = 200 samples
    // first rays at half scale so the sum stays inside the 12-bit D/A range
    rays.push_back(ray(0,  0, 0, 0,   0.5,        0.0));
    rays.push_back(ray(7,  0, 0, 200, 0.5 * 0.94, 60.0));
    rays.push_back(ray(2,  1, 1, 0,   0.5,        0.0));
    rays.push_back(ray(13, 1, 1, 200, 0.5 * 1.06, -45.0));
    foreach (rays[i]) program_ray(rays[i]);

    wr({BANK_CTRL, 16'd0, CREG_LOG2N}, 32'd3);
    wr({BANK_CTRL, 16'd0, CREG_LAST}, 32'd1);
    wr({BANK_CTRL, 16'd0, CREG_CMD}, 32'd3);
    repeat (2000) @(negedge clk);            // coefficient filters settled

    impulse(0);
    impulse(1);
    n_minphase    = n_rays_checked[0];
    n_nonminphase = n_rays_checked[1];
    n_concurrent  = int'(n_rays_checked[0] == 2 && n_rays_checked[1] == 2);

    // ---- workload 2: suburban six-ray profile on input 2 -> output 1
    foreach (rays[i]) disable_tap(rays[i].tap);
    rays.delete();
    rays.push_back('{tap: 1,  in_sel: 2, out_sel: 1, delay: 0,   re:  6144, im:  2048});
    rays.push_back('{tap: 4,  in_sel: 2, out_sel: 1, delay: 10,  re: -4096, im:  3072});
    rays.push_back('{tap: 8,  in_sel: 2, out_sel: 1, delay: 105, re:  2048, im: -5120});
    rays.push_back('{tap: 11, in_sel: 2, out_sel: 1, delay: 115, re: -1024, im: -2048});
    rays.push_back('{tap: 16, in_sel: 2, out_sel: 1, delay: 135, re:  3072, im:   512});
    rays.push_back('{tap: 19, in_sel: 2, out_sel: 1, delay: 182, re:  -512, im:  1536});
    foreach (rays[i]) program_ray(rays[i]);
    repeat (2000) @(negedge clk);

    foreach (n_rays_checked[o]) n_rays_checked[o] = 0;
    impulse(2);
    n_suburban_rays = n_rays_checked[1];
    // the switched-off two-ray taps must give nothing on inputs 0 and 1
    impulse(0);
    impulse(1);
    n_disabled = int'(n_rays_checked[0] == 0 && n_rays_checked[1] == 6);

    $display("rays seen: min-phase two-ray %0d, non-min-phase two-ray %0d, suburban %0d",
             n_minphase, n_nonminphase, n_suburban_rays);
    checks += 4;
    if (n_concurrent != 1)    begin failures++; $display("FAIL two channels at once"); end
    if (n_suburban_rays != 6) begin failures++; $display("FAIL suburban rays %0d", n_suburban_rays); end
    if (n_disabled != 1)      begin failures++; $display("FAIL switched-off taps still answer"); end
    if (!running)             begin failures++; $display("FAIL emulation stopped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
