// timing_ctrl_tb: checks the pre-beam trigger sequencer. For several train
// set-ups (the ATF 3-bunch train at 140 ns and 154 ns spacing, a 20-bunch
// train, a zero-bunch trigger) it records the cycle of train_start, of every
// strobe and the length of the drive window, and compares them with the
// times expected from the configuration. A second trigger inside a train
// must be ignored and flagged.
module timing_ctrl_tb;
  import font5_pkg::*;

  logic clk = 0, rst_n = 0, trig = 0;
  timing_cfg_t cfg;
  logic train_start, drive_en, strobe, busy, trig_ignored;
  logic [BUNCH_W-1:0] bunch_idx;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #1.4 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  timing_ctrl dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run one train and check its timing.
  task automatic run_train(input int fd, input int sp, input int nb, input int win, input bit retrig);
    longint t0, tw_end;
    int seen, dcount;
    cfg = '{first_delay: CNT_W'(fd), spacing: CNT_W'(sp), n_bunches: BUNCH_W'(nb), window_len: CNT_W'(win)};
    @(negedge clk) trig = 1;
    @(negedge clk) trig = 0;
    // train_start is high in the cycle after the edge was sampled
    check(train_start === 1'b1, "train_start after trigger");
    t0 = cyc;
    seen = 0; dcount = 0;
    // drive_en is high in cycle 0 of the train
    for (int c = 0; c < fd + 2 + nb * sp + win + 20; c++) begin
      if (drive_en) dcount++;
      if (strobe) begin
        check(cyc - t0 == longint'(fd + 1 + seen * sp),
              $sformatf("strobe %0d at %0d expected %0d", seen, cyc - t0, fd + 1 + seen * sp));
        check(bunch_idx == BUNCH_W'(seen), "bunch index");
        seen++;
      end
      if (retrig && c == fd + 3) begin
        trig = 1;
      end
      if (retrig && c == fd + 5) trig = 0;
      @(negedge clk);
      if (retrig && c == fd + 3) check(trig_ignored === 1'b1, "retrigger flagged");
    end
    check(seen == nb, $sformatf("strobes %0d expected %0d", seen, nb));
    check(dcount == win, $sformatf("drive window %0d expected %0d", dcount, win));
    check(!busy, "idle after train");
    tw_end = cyc;
  endtask

  initial begin
    cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    run_train(20, 55, 3, 240, 1'b0);   // 3 bunches, 154 ns
    run_train(20, 50, 3, 240, 1'b1);   // 3 bunches, 140 ns, retrigger inside
    run_train(0, 1, 4, 3, 1'b0);       // back-to-back strobes, short window
    run_train(5, 54, 20, 1200, 1'b0);  // 20-bunch train
    run_train(5, 54, 0, 30, 1'b0);     // window only, no bunches
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
