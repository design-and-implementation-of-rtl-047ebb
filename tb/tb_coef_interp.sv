// tb_coef_interp: self-checking test of the real-time coefficient interpolator.
//
// The testbench plays the control card: f2_tick every N = 8 sample enables
// (ce on every second clock) and f1_tick on every 32nd f2_tick, at which a
// new random RAM word is offered.  Random 12-bit filter coefficients are
// loaded.  A reference model zero pads the words by 32, convolves them with
// the 128 coefficients (32-bit wrap), shifts right by 10 and saturates.
// After each f2_tick the output must still hold the previous result until
// the 8th ce (zero-order hold during the computation) and show the new
// result one clock after it.
module tb_coef_interp;
  import ce_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  always #5 clk = ~clk;

  logic f2_tick, f1_tick;
  logic signed [15:0] ram_q, e;
  coef_wr_t cw;
  int checks = 0, failures = 0;

  coef_interp dut (.clk, .rst_n, .ce, .f2_tick, .f1_tick, .ram_q, .cw, .e);

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [11:0] c [128];
  logic signed [15:0] h [128];

  function automatic logic signed [15:0] ref_out();
    logic signed [63:0] s = 0;
    logic signed [31:0] w;
    logic signed [31:0] v;
    for (int k = 0; k < 128; k++) s += 64'(c[k]) * 64'(h[k]);
    w = s[31:0];
    v = w >>> 10;
    if (v > 32767) return 16'sd32767;
    if (v < -32768) return -16'sd32768;
    return 16'(v);
  endfunction

  task automatic check(input string what, input logic signed [15:0] exp);
    checks++;
    if (e !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, e, exp);
    end
  endtask

  logic signed [15:0] prev_exp, new_exp;

  initial begin
    f2_tick = 0; f1_tick = 0; ram_q = '0; cw = '0;
    for (int k = 0; k < 128; k++) h[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 128; k++) begin
      c[k] = 12'($urandom);
      @(negedge clk);
      cw = '{we: 1'b1, idx: 7'(k), data: c[k]};
    end
    @(negedge clk);
    cw = '0;
    prev_exp = '0;
    for (int t = 0; t < 400; t++) begin
      // one f2 period of 8 ce (16 clocks)
      @(negedge clk);
      ce = 1; f2_tick = 1;
      f1_tick = (t % 32) == 0;
      ram_q = f1_tick ? 16'($urandom) : 16'($urandom);   // ignored unless f1_tick
      for (int k = 127; k > 0; k--) h[k] = h[k-1];
      h[0] = f1_tick ? ram_q : 16'sd0;
      new_exp = ref_out();
      for (int cyc = 1; cyc <= 16; cyc++) begin
        @(negedge clk);
        f2_tick = 0; f1_tick = 0;
        ce = (cyc % 2) == 0;
        if (cyc == 16) check("hold", prev_exp);
      end
      // the 8th ce after the tick completes the filter; e follows one clock later
      @(negedge clk);
      ce = 0;
      @(negedge clk);
      check("update", new_exp);
      prev_exp = new_exp;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
