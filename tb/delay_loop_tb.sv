// delay_loop_tb: feeds random corrections with random gaps, clears and
// delay-loop on/off settings, and checks the accumulator after every edge
// against a saturating integer model; forces saturation at both rails.
module delay_loop_tb;
  import font5_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, dl_on = 1, valid_in = 0, valid_out, sat;
  dac_t corr = '0, acc;
  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0, opened = 0;

  always #1.4 clk = ~clk;

  delay_loop dut (.*);

  localparam int HI = 2**(DAC_W-1) - 1, LO = -(2**(DAC_W-1));

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m, s, c;
    bit es;
    m = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      clear    = ($urandom % 40) == 0;
      valid_in = ($urandom % 3) == 0;
      dl_on    = ($urandom % 10) != 0;
      // bias phases towards large corrections so both rails are hit
      c = (n % 1000 < 200) ? 3000 + int'($urandom % 1000) :
          (n % 1000 < 400) ? -3000 - int'($urandom % 1000) :
          int'($urandom % 8000) - 4000;
      corr = dac_t'(c);
      es = 0;
      if (clear) m = 0;
      else if (valid_in) begin
        s = (dl_on ? m : 0) + c;
        if (!dl_on) opened++;
        if (s > HI) begin s = HI; es = 1; sat_hi++; end
        if (s < LO) begin s = LO; es = 1; sat_lo++; end
        m = s;
      end
      @(negedge clk);
      checks++;
      if (acc !== dac_t'(m)) begin failures++; $display("FAIL n=%0d acc=%0d exp=%0d", n, acc, m); end
      checks++;
      if (sat !== es || valid_out !== (valid_in && !clear)) begin failures++; $display("FAIL flags n=%0d", n); end
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0 || opened == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
