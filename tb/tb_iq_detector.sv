// tb_iq_detector: self-checking test of the input I/Q detector.
//
// The A/D input is a random 10-bit stream, one sample per clock (40 MHz),
// with the sample enable high on every second clock as in the emulator.
// The reference splits the stream by the detector equations
//   I[k] = (-1)^k x[2k] * 32,   Q[k] = -(-1)^k x[2k+1] * 32,
// filters each branch with the loaded interpolator coefficients and shifts
// right by 10 with saturation.  Two coefficient sets are used: a pure
// pass-through and random 16-coefficient interpolators.  Each output must
// belong to the sample pair taken two sample enables before it.
module tb_iq_detector;
  import ce_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, ce;
  always #5 clk = ~clk;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ce <= 1'b0; else ce <= ~ce;

  logic signed [ADC_W-1:0] adc;
  coef_wr_t cw_i, cw_q;
  iq_t iq;
  logic iq_valid;
  int checks = 0, failures = 0;

  iq_detector dut (.clk, .rst_n, .ce, .adc, .cw_i, .cw_q, .iq, .iq_valid);

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [11:0] ci [16], cq [16];
  logic signed [15:0] hi [16], hq [16];
  iq_t expq [$];
  int  k_ce = 0;
  logic signed [ADC_W-1:0] prev_adc;

  function automatic logic signed [15:0] fir(input logic signed [11:0] c[16], input logic signed [15:0] h[16]);
    logic signed [63:0] s = 0;
    logic signed [31:0] w, v;
    for (int k = 0; k < 16; k++) s += 64'(c[k]) * 64'(h[k]);
    w = s[31:0];
    v = w >>> 10;
    if (v > 32767) return 16'sd32767;
    if (v < -32768) return -16'sd32768;
    return 16'(v);
  endfunction

  task automatic load(input bit passthrough);
    for (int k = 0; k < 16; k++) begin
      ci[k] = passthrough ? ((k == 0) ? 12'sd1024 : 12'sd0) : 12'($urandom);
      cq[k] = passthrough ? ((k == 0) ? 12'sd1024 : 12'sd0) : 12'($urandom);
      @(negedge clk);
      cw_i = '{we: 1'b1, idx: 7'(k), data: ci[k]};
      cw_q = '{we: 1'b1, idx: 7'(k), data: cq[k]};
    end
    @(negedge clk);
    cw_i = '0; cw_q = '0;
  endtask

  // Reference: at each sample enable edge the pair (previous, current) is taken
  always @(posedge clk) begin
    if (rst_n && ce) begin
      logic signed [15:0] ev, od;
      ev = 16'(prev_adc) * 16'sd32;
      od = 16'(adc) * 16'sd32;
      for (int k = 15; k > 0; k--) begin hi[k] = hi[k-1]; hq[k] = hq[k-1]; end
      hi[0] = (k_ce % 2 == 0) ? ev : -ev;
      hq[0] = (k_ce % 2 == 0) ? -od : od;
      expq.push_back('{i: fir(ci, hi), q: fir(cq, hq)});
      k_ce++;
    end
    prev_adc <= adc;
  end

  // Compare every output with the sample pair two enables earlier
  always @(posedge clk) begin
    #1;
    if (rst_n && iq_valid) begin
      iq_t e;
      checks++;
      if (expq.size() != 2) begin
        failures++;
        $display("FAIL latency: %0d sample pairs outstanding", expq.size());
      end
      e = expq.pop_front();
      checks++;
      if (iq !== e) begin
        failures++;
        if (failures < 10) $display("FAIL I/Q got %0d,%0d expected %0d,%0d", iq.i, iq.q, e.i, e.q);
      end
      while (expq.size() > 2) void'(expq.pop_front());
    end
  end

  initial begin
    adc = '0; cw_i = '0; cw_q = '0; prev_adc = '0;
    for (int k = 0; k < 16; k++) begin hi[k] = 0; hq[k] = 0; ci[k] = 0; cq[k] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    load(1'b1);
    repeat (400) begin @(negedge clk); adc = 10'($urandom); end
    load(1'b0);
    repeat (400) begin @(negedge clk); adc = 10'($urandom); end
    // full-scale corners
    repeat (40) begin @(negedge clk); adc = ($urandom % 2) ? -10'sd512 : 10'sd511; end
    repeat (4) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
