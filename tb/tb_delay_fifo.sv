// tb_delay_fifo: self-checking test of the programmable tap delay.
//
// For several delays (0, 1, 7, 1600 = 80 us, 2047) the FIFO is reset and fed
// random complex samples on every second clock.  A history kept in the
// testbench gives the expected output: after the k-th ce edge since reset the
// output must be sample k - delay, or zero while k < delay.
module tb_delay_fifo;
  import ce_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  always #5 clk = ~clk;

  iq_t din, dout;
  logic [FIFO_AW-1:0] delay;
  int checks = 0, failures = 0;

  delay_fifo dut (.clk, .rst_n, .ce, .din, .delay, .dout);

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  iq_t hist [4096];
  int delays [5] = '{0, 1, 7, 1600, 2047};

  initial begin
    din = '0; delay = '0;
    foreach (delays[di]) begin
      rst_n = 0;
      delay = FIFO_AW'(delays[di]);
      repeat (2) @(negedge clk);
      rst_n = 1;
      for (int k = 0; k < 2600; k++) begin
        @(negedge clk);
        ce = 1;
        din = iq_t'($urandom);
        hist[k] = din;
        @(negedge clk);
        ce = 0;
        checks++;
        if (k >= delays[di] ? dout !== hist[k - delays[di]] : dout !== '0) begin
          failures++;
          if (failures < 10) $display("FAIL delay %0d sample %0d: got %h", delays[di], k, dout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
