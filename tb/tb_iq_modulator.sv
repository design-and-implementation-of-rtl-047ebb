// tb_iq_modulator: self-checking test of the output I/Q modulator.
//
// Random partial sums (some beyond the 16-bit range, to reach saturation)
// are applied on every sample enable.  The reference saturates them to 16
// bits, filters I and Q with the loaded interpolator coefficients, shifts
// right by 10, multiplies by (-1)^k and forms the 40 MHz stream
//   y[2k] = (-1)^k I'[k],   y[2k+1] = -(-1)^k Q'[k],
// each shifted right by 4 more and saturated to the 12-bit D/A code.  The
// even sample of pair k must be on the D/A port after the sample enable edge
// k + 2, the odd one a clock later.  Coefficient sets: pass-through, then
// random.
module tb_iq_modulator;
  import ce_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, ce;
  always #5 clk = ~clk;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ce <= 1'b0; else ce <= ~ce;

  iq_sum_t sum;
  coef_wr_t cw_i, cw_q;
  logic signed [DAC_W-1:0] dac;
  int checks = 0, failures = 0;

  iq_modulator dut (.clk, .rst_n, .ce, .sum, .cw_i, .cw_q, .dac);

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [11:0] ci [16], cq [16];
  logic signed [15:0] hi [16], hq [16];
  logic signed [11:0] ev [4096], od [4096];
  int k_ce = 0;
  bit checking = 0;

  function automatic longint fir(input logic signed [11:0] c[16], input logic signed [15:0] h[16]);
    logic signed [63:0] s = 0;
    logic signed [31:0] w;
    for (int k = 0; k < 16; k++) s += 64'(c[k]) * 64'(h[k]);
    w = s[31:0];
    return longint'(w >>> 10);
  endfunction

  function automatic logic signed [15:0] sat16(input longint v);
    if (v > 32767) return 16'sd32767;
    if (v < -32768) return -16'sd32768;
    return 16'(v);
  endfunction

  function automatic logic signed [11:0] to_dac(input longint v);
    longint s = v >>> 4;
    if (s > 2047) return 12'sd2047;
    if (s < -2048) return -12'sd2048;
    return 12'(s);
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

  // Reference and comparison, edge by edge
  always @(posedge clk) begin
    if (rst_n && ce) begin
      longint yi, yq;
      for (int k = 15; k > 0; k--) begin hi[k] = hi[k-1]; hq[k] = hq[k-1]; end
      hi[0] = sat16(longint'(sum.i));
      hq[0] = sat16(longint'(sum.q));
      yi = fir(ci, hi);
      yq = fir(cq, hq);
      ev[k_ce % 4096] = (k_ce % 2 == 0) ? to_dac(yi) : to_dac(-yi);
      od[k_ce % 4096] = (k_ce % 2 == 0) ? to_dac(-yq) : to_dac(yq);
      #1;
      if (checking && k_ce >= 2) begin
        checks++;
        if (dac !== ev[(k_ce - 2) % 4096]) begin
          failures++;
          if (failures < 10) $display("FAIL even sample %0d: got %0d expected %0d", k_ce - 2, dac, ev[(k_ce - 2) % 4096]);
        end
        @(posedge clk); #1;
        checks++;
        if (dac !== od[(k_ce - 2) % 4096]) begin
          failures++;
          if (failures < 10) $display("FAIL odd sample %0d: got %0d expected %0d", k_ce - 2, dac, od[(k_ce - 2) % 4096]);
        end
      end
      k_ce++;
    end
  end

  task automatic drive(input int n, input int range);
    repeat (n) begin
      @(negedge clk);
      sum = '{i: SUM_W'(longint'($urandom % (2 * range)) - range),
              q: SUM_W'(longint'($urandom % (2 * range)) - range)};
    end
  endtask

  initial begin
    sum = '0; cw_i = '0; cw_q = '0;
    for (int k = 0; k < 16; k++) begin hi[k] = 0; hq[k] = 0; ci[k] = 0; cq[k] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    load(1'b1);
    repeat (40) @(negedge clk);
    checking = 1;
    drive(400, 20000);
    drive(100, 200000);
    checking = 0;
    load(1'b0);
    repeat (40) @(negedge clk);
    checking = 1;
    drive(400, 20000);
    repeat (6) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
