// tb_scan_ctrl: self-checking test of the RAM scan timing.
//
// The sample enable toggles every clock as in the emulator.  A reference
// model of the scan checks, at every f1_tick, the address being read, and it
// checks the spacing of f2_tick (N sample enables) and of f1_tick (32
// f2_ticks).  Runs: single scan with N = 8 stopping by itself after the last
// address; continuous mode with N = 16 turning at both ends, stopped by a
// command; N clamped to 8 when log2 N is set below 3 and to 8192 above 13;
// and a start while running that restarts at address 0.
module tb_scan_ctrl;
  import ce_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, ce;
  always #5 clk = ~clk;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ce <= 1'b0; else ce <= ~ce;

  logic start, stop, continuous, running, f2_tick, f1_tick;
  logic [3:0] log2n;
  logic [RAM_AW-1:0] last, addr;
  int checks = 0, failures = 0;

  scan_ctrl dut (.clk, .rst_n, .ce, .start, .stop, .continuous, .log2n, .last,
                 .running, .f2_tick, .f1_tick, .addr);

  initial begin
    #50000000;
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

  // Observe one scan: n_f1 RAM reads, expected N, expected address list
  task automatic observe(input int n_f1, input int n, input int exp_addr[$]);
    int ce_since_f2 = -1, f2_since_f1 = -1, got = 0;
    while (got < n_f1) begin
      if (ce && ce_since_f2 >= 0) ce_since_f2++;
      if (f2_tick) begin
        if (ce_since_f2 >= 0) expect_true(ce_since_f2 == n, $sformatf("f2 period %0d, N %0d", ce_since_f2, n));
        ce_since_f2 = 0;
        if (f2_since_f1 >= 0) f2_since_f1++;
      end
      if (f1_tick) begin
        if (f2_since_f1 >= 0) expect_true(f2_since_f1 == 32, $sformatf("f1 period %0d f2 ticks", f2_since_f1));
        f2_since_f1 = 0;
        expect_true(int'(addr) == exp_addr[got], $sformatf("read %0d at %0d, expected %0d", got, addr, exp_addr[got]));
        got++;
      end
      if (got < n_f1) @(negedge clk);
    end
  endtask

  task automatic cmd_start(input bit cont);
    @(negedge clk);
    start = 1; continuous = cont;
    @(negedge clk);
    start = 0;
  endtask

  initial begin
    int exp[$];
    start = 0; stop = 0; continuous = 0; log2n = 4'd3; last = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Single scan, N = 8, addresses 0..5, then it stops by itself
    last = 18'd5; log2n = 4'd3;
    cmd_start(1'b0);
    exp = '{0, 1, 2, 3, 4, 5};
    observe(6, 8, exp);
    repeat (4) @(negedge clk);
    expect_true(!running, "single scan stops after the last address");
    repeat (600) begin
      @(negedge clk);
      if (f2_tick) expect_true(1'b0, "no f2_tick after the scan");
    end

    // Continuous mode, N = 16, up and down between 0 and 3
    last = 18'd3; log2n = 4'd4;
    cmd_start(1'b1);
    exp = '{0, 1, 2, 3, 2, 1, 0, 1, 2, 3, 2, 1, 0, 1};
    observe(14, 16, exp);
    expect_true(running, "continuous mode keeps running");
    @(negedge clk); stop = 1; @(negedge clk); stop = 0;
    @(negedge clk);
    expect_true(!running, "stop command");

    // N clamped: below 3 gives 8, above 13 gives 8192
    last = 18'd100; log2n = 4'd1;
    cmd_start(1'b0);
    exp = '{0, 1};
    observe(2, 8, exp);
    log2n = 4'd15;
    cmd_start(1'b0);
    exp = '{0, 1};
    observe(2, 8192, exp);

    // Start while running restarts from address 0
    log2n = 4'd3;
    cmd_start(1'b1);
    exp = '{0, 1, 2};
    observe(3, 8, exp);
    cmd_start(1'b1);
    exp = '{0, 1};
    observe(2, 8, exp);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
