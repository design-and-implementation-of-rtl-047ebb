// tb_control_card: self-checking test of the control card register decode.
//
// Drives DSP bus writes and checks their effects: the LOG2N register sets the
// spacing of f2_tick, the LAST register sets where a single scan stops, the
// command register starts a single or continuous scan and stops it, the
// interface-interpolator coefficient writes come out on the right one of the
// ten coefficient ports with the right index and data, and writes to other
// banks reach none of them.
module tb_control_card;
  import ce_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, ce;
  always #5 clk = ~clk;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ce <= 1'b0; else ce <= ~ce;

  bus_t bus;
  logic running, f2_tick, f1_tick;
  logic [RAM_AW-1:0] scan_addr;
  coef_wr_t rf_cw [2*NIN + 2*NOUT];
  int checks = 0, failures = 0;

  control_card dut (.clk, .rst_n, .ce, .bus, .running, .f2_tick, .f1_tick, .scan_addr, .rf_cw);

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic wr(input logic [5:0] bank, input logic [17:0] a, input logic [31:0] d);
    @(negedge clk);
    bus = '{we: 1'b1, addr: {bank, a}, wdata: d};
    @(negedge clk);
    bus = '0;
  endtask

  // ce cycles between two f2_ticks
  task automatic f2_period(output int n);
    n = 0;
    do @(negedge clk); while (!f2_tick);
    do begin @(negedge clk); if (ce) n++; end while (!f2_tick);
  endtask

  initial begin
    int n, f1s;
    logic [RAM_AW-1:0] last_seen;
    bus = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Interface interpolator coefficients
    for (int f = 0; f < 2*NIN + 2*NOUT; f++) begin
      logic [3:0] idx;
      logic [11:0] d;
      idx = 4'($urandom); d = 12'($urandom);
      @(negedge clk);
      bus = '{we: 1'b1, addr: {BANK_RFCOEF, 10'd0, 4'(f), idx}, wdata: {20'hABCDE, d}};
      #1;
      for (int g = 0; g < 2*NIN + 2*NOUT; g++)
        expect_true(rf_cw[g].we == (g == f), $sformatf("coefficient port %0d select for write to %0d", g, f));
      expect_true(rf_cw[f].idx == {3'b0, idx} && rf_cw[f].data == d, "coefficient index and data");
      @(negedge clk);
      bus = '0;
    end
    @(negedge clk);
    bus = '{we: 1'b1, addr: {BANK_TAPCOEF, 18'h0001}, wdata: 32'h5};
    #1;
    n = 0;
    for (int g = 0; g < 2*NIN + 2*NOUT; g++) n += int'(rf_cw[g].we);
    expect_true(n == 0, "write to another bank reaches no interface filter");
    @(negedge clk);
    bus = '0;

    // Start single scan, N = 32, last address 3
    wr(BANK_CTRL, {16'd0, CREG_LOG2N}, 32'd5);
    wr(BANK_CTRL, {16'd0, CREG_LAST}, 32'd3);
    expect_true(!running, "idle after reset");
    wr(BANK_CTRL, {16'd0, CREG_CMD}, 32'd1);
    @(negedge clk);
    expect_true(running, "start command");
    f2_period(n);
    expect_true(n == 32, $sformatf("N = 32 from LOG2N = 5 (got %0d)", n));
    f1s = 0;
    while (running) begin
      @(negedge clk);
      if (f1_tick) begin f1s++; last_seen = scan_addr; end
    end
    expect_true(last_seen == 18'd3, "single scan ends at LAST");
    expect_true(f1s == 3, $sformatf("RAM reads after the first: %0d", f1s));

    // Continuous scan keeps going past LAST, stop command ends it
    wr(BANK_CTRL, {16'd0, CREG_LOG2N}, 32'd3);
    wr(BANK_CTRL, {16'd0, CREG_CMD}, 32'd3);
    f1s = 0;
    repeat (12 * 512) begin
      @(negedge clk);
      if (f1_tick) f1s++;
    end
    expect_true(running && f1s >= 10, $sformatf("continuous scan running after %0d reads", f1s));
    wr(BANK_CTRL, {16'd0, CREG_CMD}, 32'd0);
    @(negedge clk);
    expect_true(!running, "stop command");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
