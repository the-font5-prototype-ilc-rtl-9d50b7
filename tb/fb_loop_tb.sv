// fb_loop_tb: one feedback channel, driven with peak samples spaced like a
// bunch train. For every bunch it checks position, correction and DAC code
// against the reference model, and that the DAC code changes exactly
// LOOP_LAT cycles after the sample. Covers feedback off (DAC zero), the
// drive window closing (DAC zero), delay loop off, a gain-table rewrite
// (gain 0.5) and the accumulator clear at each train start.
module fb_loop_tb;
  import font5_pkg::*;
  import font5_model_pkg::*;

  logic clk = 0, rst_n = 0, train_start = 0, drive_en = 0, valid_in = 0;
  loop_ctrl_t ctrl;
  adc_t sum = '0, diff = '0;
  logic gain_we = 0;
  logic [GAIN_AW-1:0] gain_waddr = '0;
  dac_t gain_wdata = '0, dac, corr;
  logic pos_valid, corr_valid, acc_valid, sat;
  pos_t pos;
  int checks = 0, failures = 0;
  int n_off = 0, n_window = 0, n_open = 0, n_gain = 0, n_accum = 0;

  always #1.4 clk = ~clk;

  fb_loop dut (.*);

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One train of nb bunches; gain_q8 is what the table currently holds.
  task automatic train(input int nb, input int gain_q8, input bit fb, input bit dl, input bit win_cut);
    int acc, p, c, s, d, dac_prev;
    ctrl = '{fb_on: fb, dl_on: dl};
    @(negedge clk) train_start = 1; drive_en = 1;
    @(negedge clk) train_start = 0;
    acc = 0;
    for (int b = 0; b < nb; b++) begin
      if (win_cut && b == nb - 1) drive_en = 0;
      repeat (10) @(negedge clk);
      s = 2000 + int'($urandom % 6000);
      d = (int'($urandom % 2001) - 1000) * s / 4000;
      sum = adc_t'(s); diff = adc_t'(d); valid_in = 1;
      p = m_pos(s, d);
      c = m_corr(p, gain_q8);
      acc = m_acc(acc, c, dl);
      dac_prev = int'(dac);
      @(negedge clk) valid_in = 0;
      for (int k = 1; k < int'(LOOP_LAT); k++) begin
        if (k == int'(NORM_LAT)) chk(pos_valid && pos == pos_t'(p), $sformatf("pos %0d exp %0d", pos, p));
        if (k == int'(NORM_LAT + GAIN_LAT)) chk(corr_valid && corr == dac_t'(c), $sformatf("corr %0d exp %0d", corr, c));
        chk(int'(dac) == dac_prev, $sformatf("DAC changed before the loop latency, k=%0d b=%0d", k, b));
        @(negedge clk);
      end
      if (fb && !(win_cut && b == nb - 1)) begin
        chk(dac == dac_t'(acc), $sformatf("dac %0d exp %0d", dac, acc));
        if (dl && b > 0 && c != 0) n_accum++;
      end else begin
        chk(dac == '0, "DAC not held at zero");
        if (!fb) n_off++; else n_window++;
      end
      if (!dl) n_open++;
    end
    drive_en = 0;
    repeat (2) @(negedge clk);
    chk(dac == '0, "DAC not zero after the drive window");
  endtask

  initial begin
    ctrl = '{fb_on: 1'b1, dl_on: 1'b1};
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (4) train(3, 256, 1, 1, 0);
    train(3, 256, 0, 1, 0);
    train(3, 256, 1, 0, 0);
    train(3, 256, 1, 1, 1);
    // rewrite the whole table with gain 0.5
    for (int a = 0; a < 2**GAIN_AW; a++) begin
      @(negedge clk);
      gain_we = 1; gain_waddr = GAIN_AW'(a);
      gain_wdata = dac_t'(m_corr(int'(pos_t'(a << (POS_W - GAIN_AW))), 128));
    end
    @(negedge clk) gain_we = 0;
    n_gain++;
    repeat (3) train(20, 128, 1, 1, 0);
    chk(n_off > 0 && n_window > 0 && n_open > 0 && n_gain > 0 && n_accum > 0, "mechanism coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
