// peak_sampler_tb: drives random ADC words on all 9 channels every cycle and
// random strobes; checks that the outputs hold exactly the words present in
// the last strobe cycle, with the bunch number, and that valid follows each
// strobe by one cycle.
module peak_sampler_tb;
  import font5_pkg::*;

  logic clk = 0, rst_n = 0, strobe = 0, valid;
  logic [BUNCH_W-1:0] bunch_in = '0, bunch_out;
  adc_t adc [N_ADC];
  adc_t smp [N_ADC];
  adc_t exp_smp [N_ADC];
  logic [BUNCH_W-1:0] exp_bunch;
  logic exp_valid;
  int checks = 0, failures = 0;

  always #1.4 clk = ~clk;

  peak_sampler dut (.clk, .rst_n, .strobe, .bunch_in, .adc, .smp, .valid, .bunch_out);

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (adc[c]) begin adc[c] = '0; exp_smp[c] = '0; end
    exp_bunch = '0; exp_valid = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      foreach (adc[c]) adc[c] = adc_t'($urandom);
      strobe   = ($urandom % 7) == 0;
      bunch_in = BUNCH_W'($urandom);
      @(posedge clk);
      // model: capture what is on the inputs at this edge
      exp_valid = strobe;
      if (strobe) begin
        foreach (adc[c]) exp_smp[c] = adc[c];
        exp_bunch = bunch_in;
      end
      @(negedge clk);
      checks++;
      if (valid !== exp_valid) begin failures++; $display("FAIL valid at %0d", n); end
      foreach (smp[c]) begin
        checks++;
        if (smp[c] !== exp_smp[c]) begin failures++; $display("FAIL ch%0d at %0d", c, n); end
      end
      checks++;
      if (bunch_out !== exp_bunch) begin failures++; $display("FAIL bunch at %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
