// tb_pdsp_fir: self-checking test of the programmable FIR filter.
//
// Two filters are tested: the 16-coefficient form that accepts a sample on
// every ce, and the 128-coefficient form with 16 multipliers that needs 8 ce
// cycles per output.  Both get random coefficients and random samples; a
// reference convolution kept in the testbench gives the expected 32-bit
// (wrapping) output, and the number of ce cycles from a sample to its output
// is checked against 2 (16 taps) and 8 (128 taps).
module tb_pdsp_fir;
  import ce_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- 16-coefficient filter, one sample per ce -------------
  logic ce_a, inv_a, dv_a;
  logic signed [15:0] din_a;
  logic signed [31:0] dout_a;
  coef_wr_t cw_a;
  pdsp_fir #(.TAPS(16), .MACS(16)) dut_a (
    .clk, .rst_n, .ce (ce_a), .in_valid (inv_a), .din (din_a), .cw (cw_a),
    .dout (dout_a), .dout_valid (dv_a)
  );

  // ---------------- 128-coefficient filter, 16 multipliers ----------------
  logic ce_b, inv_b, dv_b;
  logic signed [15:0] din_b;
  logic signed [31:0] dout_b;
  coef_wr_t cw_b;
  pdsp_fir #(.TAPS(128), .MACS(16)) dut_b (
    .clk, .rst_n, .ce (ce_b), .in_valid (inv_b), .din (din_b), .cw (cw_b),
    .dout (dout_b), .dout_valid (dv_b)
  );

  logic signed [11:0] ca [16], cb [128];
  logic signed [15:0] ha [16], hb [128];

  function automatic logic signed [31:0] conv16();
    logic signed [63:0] s = 0;
    for (int k = 0; k < 16; k++) s += 64'(ca[k]) * 64'(ha[k]);
    return s[31:0];
  endfunction
  function automatic logic signed [31:0] conv128();
    logic signed [63:0] s = 0;
    for (int k = 0; k < 128; k++) s += 64'(cb[k]) * 64'(hb[k]);
    return s[31:0];
  endfunction

  task automatic check(input string what, input logic signed [31:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [31:0] exp_a [$];
  logic signed [31:0] exp_b;
  int cyc_b;

  initial begin
    ce_a = 0; inv_a = 0; din_a = 0; cw_a = '0;
    ce_b = 0; inv_b = 0; din_b = 0; cw_b = '0;
    for (int k = 0; k < 16; k++) ha[k] = 0;
    for (int k = 0; k < 128; k++) hb[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Load coefficients
    for (int k = 0; k < 128; k++) begin
      cb[k] = 12'($urandom);
      if (k < 16) ca[k] = 12'($urandom);
      @(negedge clk);
      cw_b = '{we: 1'b1, idx: 7'(k), data: cb[k]};
      cw_a = '{we: (k < 16), idx: 7'(k), data: (k < 16) ? ca[k] : 12'sd0};
    end
    @(negedge clk);
    cw_a = '0; cw_b = '0;

    // 16-tap filter: a sample on every ce, ce high on every clock
    fork
      begin
        for (int n = 0; n < 300; n++) begin
          @(negedge clk);
          ce_a = 1; inv_a = 1; din_a = 16'($urandom);
          for (int k = 15; k > 0; k--) ha[k] = ha[k-1];
          ha[0] = din_a;
          exp_a.push_back(conv16());
        end
        @(negedge clk);
        inv_a = 0;
        repeat (4) @(negedge clk);
        ce_a = 0;
      end
      begin
        automatic int got_n = 0;
        automatic int first_cycle = -1, in_cycle = -1;
        // latency: the first output must follow the first sample by 2 ce cycles
        while (got_n < 300) begin
          @(posedge clk);
          #1;
          if (inv_a && in_cycle < 0) in_cycle = 0;
          else if (in_cycle >= 0 && first_cycle < 0) in_cycle++;
          if (dv_a) begin
            if (first_cycle < 0) begin
              first_cycle = in_cycle;
              checks++;
              if (first_cycle != 1) begin
                failures++;
                $display("FAIL 16-tap latency: output %0d clocks after the sample edge", first_cycle);
              end
            end
            check("16-tap output", dout_a, exp_a.pop_front());
            got_n++;
          end
        end
      end
    join

    // 128-tap filter: ce on every other clock, a sample every 8..12 ce
    for (int n = 0; n < 200; n++) begin
      int gap;
      gap = 8 + int'($urandom % 5);
      // present the sample with a ce
      @(negedge clk);
      ce_b = 1; inv_b = 1; din_b = 16'($urandom);
      for (int k = 127; k > 0; k--) hb[k] = hb[k-1];
      hb[0] = din_b;
      exp_b = conv128();
      cyc_b = 0;
      @(negedge clk);
      inv_b = 0; ce_b = 0;
      for (int g = 0; g < gap; g++) begin
        @(negedge clk); ce_b = 1;
        @(posedge clk); #1;
        if (ce_b) cyc_b++;
        if (dv_b) begin
          check("128-tap output", dout_b, exp_b);
          checks++;
          if (cyc_b != 8) begin
            failures++;
            $display("FAIL 128-tap latency %0d ce cycles", cyc_b);
          end
        end
        @(negedge clk); ce_b = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
