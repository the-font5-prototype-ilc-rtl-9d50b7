// recip_rom_tb: reads every entry of the reciprocal table and compares it
// with 2^(RECIP_FRAC+1)/(2a+1) computed in floating point and rounded (0 at address 0);
// also checks the one-cycle read latency.
module recip_rom_tb;
  import font5_pkg::*;

  localparam int unsigned AW = RECIP_AW, FRAC = RECIP_FRAC, DW = FRAC + 1;
  logic clk = 0;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] data;
  int checks = 0, failures = 0;

  always #1.4 clk = ~clk;

  recip_rom dut (.clk, .addr, .data);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned expv;
    real r;
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk) addr = AW'(a);
      @(negedge clk);
      if (a == 0) expv = 0;
      else begin
        r = (2.0 ** (FRAC + 1)) / (2.0 * a + 1.0);
        expv = $rtoi(r + 0.5);
      end
      checks++;
      if (data !== DW'(expv)) begin
        failures++;
        $display("FAIL addr %0d: %0d expected %0d", a, data, expv);
      end
    end
    // latency: the word for a new address appears after exactly one edge
    @(negedge clk) addr = AW'(3);
    @(negedge clk) addr = AW'(300);
    checks++;
    if (data !== DW'($rtoi((2.0 ** (FRAC + 1)) / 7.0 + 0.5))) begin failures++; $display("FAIL latency"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
