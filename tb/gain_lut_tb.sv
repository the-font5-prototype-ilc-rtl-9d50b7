// gain_lut_tb: checks the gain table's start-up contents (unity normalised
// gain, negative feedback: correction = -16 * signed address) for every
// address, then rewrites part of the table with a gain of 0.5 and an
// arbitrary curve through the write port and checks the reads, the one-cycle
// read latency and that valid follows valid_in.
module gain_lut_tb;
  import font5_pkg::*;

  logic clk = 0, rst_n = 0, valid_in = 0, valid_out, we = 0;
  pos_t pos = '0;
  dac_t corr, wdata = '0;
  logic [GAIN_AW-1:0] waddr = '0;
  int checks = 0, failures = 0;
  dac_t shadow [2**GAIN_AW];

  always #1.4 clk = ~clk;

  gain_lut dut (.*);

  localparam int LSB = POS_W - GAIN_AW;   // position bits below the address
  localparam int STEP = 1 << (DAC_W - GAIN_AW);

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(input int a, input dac_t expv);
    @(negedge clk);
    pos = pos_t'((a << LSB) | ($urandom % (1 << LSB)));
    valid_in = 1;
    @(negedge clk);
    valid_in = 0;
    checks++;
    if (corr !== expv || valid_out !== 1'b1) begin
      failures++;
      $display("FAIL addr %0d: corr %0d expected %0d", a, corr, expv);
    end
  endtask

  initial begin
    int v, e;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 2**GAIN_AW; a++) begin
      v = (a >= 2**(GAIN_AW-1)) ? a - 2**GAIN_AW : a;
      e = -v * STEP;
      if (e > 2**(DAC_W-1) - 1) e = 2**(DAC_W-1) - 1;
      shadow[a] = dac_t'(e);
      read_check(a, dac_t'(e));
    end
    // load gain 0.5 over the lower half, a random curve over the upper
    for (int a = 0; a < 2**GAIN_AW; a++) begin
      v = (a >= 2**(GAIN_AW-1)) ? a - 2**GAIN_AW : a;
      @(negedge clk);
      we = 1; waddr = GAIN_AW'(a);
      wdata = (a < 2**(GAIN_AW-1)) ? dac_t'(-(v * STEP) / 2) : dac_t'($urandom);
      shadow[a] = wdata;
    end
    @(negedge clk) we = 0;
    for (int a = 0; a < 2**GAIN_AW; a++) read_check(a, shadow[a]);
    // read during a write to another entry is unaffected
    @(negedge clk);
    we = 1; waddr = 10'd5; wdata = 14'sd77;
    pos = pos_t'(6 << LSB);
    @(negedge clk) we = 0;
    checks++;
    if (corr !== shadow[6]) begin failures++; $display("FAIL read during write"); end
    read_check(5, 14'sd77);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
