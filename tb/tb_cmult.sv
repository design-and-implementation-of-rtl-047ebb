// tb_cmult: self-checking test of the tap complex multiplier.
//
// Random signal samples and coefficients, plus unity, j and full-scale
// corner cases, are compared with a complex product computed in the
// testbench (2.14 coefficient, arithmetic shift, saturation to 16 bits).
// The output must appear one ce cycle after the inputs.
module tb_cmult;
  import ce_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  always #5 clk = ~clk;

  iq_t x, e, y;
  int checks = 0, failures = 0;

  cmult dut (.clk, .rst_n, .ce, .x, .e, .y);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [15:0] sat(input longint v);
    if (v > 32767) return 16'sd32767;
    if (v < -32768) return -16'sd32768;
    return 16'(v);
  endfunction

  function automatic iq_t ref_mult(input iq_t a, input iq_t b);
    longint re, im;
    iq_t r;
    re = longint'(a.i) * longint'(b.i) - longint'(a.q) * longint'(b.q);
    im = longint'(a.i) * longint'(b.q) + longint'(a.q) * longint'(b.i);
    r.i = sat(re >>> 14);
    r.q = sat(im >>> 14);
    return r;
  endfunction

  task automatic apply(input iq_t a, input iq_t b);
    iq_t exp;
    @(negedge clk);
    x = a; e = b; ce = 1;
    exp = ref_mult(a, b);
    @(negedge clk);
    ce = 0;
    x = iq_t'($urandom);          // must not matter without ce
    @(negedge clk);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL x=%0d,%0d e=%0d,%0d: got %0d,%0d expected %0d,%0d",
               a.i, a.q, b.i, b.q, y.i, y.q, exp.i, exp.q);
    end
  endtask

  initial begin
    x = '0; e = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    apply('{i: 16'sd1000, q: -16'sd2000}, '{i: 16'sd16384, q: 16'sd0});   // unity
    apply('{i: 16'sd1000, q: -16'sd2000}, '{i: 16'sd0, q: 16'sd16384});   // j
    apply('{i: -16'sd32768, q: -16'sd32768}, '{i: -16'sd32768, q: 16'sd32767}); // saturation
    for (int n = 0; n < 500; n++) apply(iq_t'($urandom), iq_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
