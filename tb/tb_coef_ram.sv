// tb_coef_ram: self-checking test of a tap RAM bank.
//
// Writes random words at random addresses spread over the whole 256 Kword
// space, then reads them back through the scan port and checks that each
// word appears exactly one clock after its address.
module tb_coef_ram;
  import ce_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic we;
  logic [RAM_AW-1:0] waddr, raddr;
  logic [15:0] wdata, q;
  int checks = 0, failures = 0;

  coef_ram dut (.clk, .we, .waddr, .wdata, .raddr, .q);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [RAM_AW-1:0] addrs [300];
  logic [15:0]       words [300];

  initial begin
    we = 0; waddr = '0; wdata = '0; raddr = '0;
    for (int n = 0; n < 300; n++) begin
      // distinct addresses: a random high part and the index in the low part
      addrs[n] = {RAM_AW'($urandom) >> 9, 9'(n)};
      if (n == 0) addrs[n] = '0;
      if (n == 1) addrs[n] = '1;
      words[n] = 16'($urandom);
      @(negedge clk);
      we = 1; waddr = addrs[n]; wdata = words[n];
    end
    @(negedge clk);
    we = 0;
    for (int n = 0; n < 300; n++) begin
      raddr = addrs[n];
      @(negedge clk);
      checks++;
      if (q !== words[n]) begin
        failures++;
        $display("FAIL address %h: got %h expected %h", addrs[n], q, words[n]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
