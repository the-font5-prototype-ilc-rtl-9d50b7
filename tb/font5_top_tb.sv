// font5_top_tb: end-to-end test of the feedback board logic at its default
// sizes, closed around a simple beam model.
//
// Beam model (this testbench's own): each bunch b arrives with vertical
// offsets y[bpm][b] in position units (Q1.13 of diff/sum) and charge q[b]
// (the sum signal, scaled by 0.9, 1.0 and 1.1 for P1, P2, P3). The kicker of a loop adds its current DAC code, one
// position unit per DAC unit, to the offset seen at that loop's BPM (K1 at
// P2, K2 at P3); P1 sees the incoming beam only. The ADC words are
// sum = q and diff = offset * q / 2^13, held until the bunch's peak strobe.
//
// Checks: every captured sample against what was driven; every DAC code
// against a reference model of the arithmetic, exactly STROBE_TO_DAC cycles
// after the bunch's strobe and not before; DAC at zero with the feedback off
// or the drive window closed; the corrected offsets of bunches 2 and 3
// against the beam (unity gain leaves y2-y1 and, with the delay loop, y3-y2);
// jitter of bunch 2 at P2 reduced with the feedback on. Each mechanism
// (trigger, retrigger ignored, feedback off, delay loop on/off, gain-table
// rewrite, saturation, no-beam bunch, window gating, 20/60/3000-bunch
// trains) is counted and must occur.
module font5_top_tb;
  import font5_pkg::*;
  import font5_model_pkg::*;

  localparam int MAXB = 3000;
  localparam int UNIT = 1 << (POS_W - 1);

  logic clk = 0, rst_n = 0, trig = 0;
  timing_cfg_t tcfg;
  loop_ctrl_t lctrl [N_LOOP];
  adc_t adc [N_ADC];
  logic gain_we = 0, gain_loop = 0;
  logic [GAIN_AW-1:0] gain_waddr = '0;
  dac_t gain_wdata = '0;
  dac_t dac [N_LOOP];
  logic amp_en, train_start, trig_ignored, busy, smp_valid;
  logic [BUNCH_W-1:0] smp_bunch;
  adc_t smp [N_ADC];
  logic [N_LOOP-1:0] pos_valid, corr_valid, acc_valid, sat;
  pos_t pos [N_LOOP];
  dac_t corr [N_LOOP];

  font5_top dut (.*);

  always #1.4 clk = ~clk;   // 357 MHz

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- beam and reference state ----------------
  int y [3][MAXB];        // incoming offsets at P1, P2, P3
  int q [MAXB];           // charge (sum signal)
  int spare [MAXB];       // spare channel content
  int meas [3][MAXB];     // offsets seen at the BPMs (with kicks)
  adc_t drv [N_ADC];      // words currently driven
  int nxt = 0;            // next bunch to arrive
  int g [N_LOOP];         // gain in each table, Q8
  int m_acc_v [N_LOOP];   // model accumulator
  int dac_exp [N_LOOP];   // model DAC after the latest bunch
  longint due = -1;       // cycle of the pending DAC update
  int dac_hold [N_LOOP];
  bit amp_en_q = 0;

  // mechanism counters
  int n_trains = 0, n_bunch = 0, n_retrig = 0, n_fb_off = 0, n_dl_open = 0,
      n_dl_acc = 0, n_gain_wr = 0, n_sat = 0, n_nobeam = 0, n_gate = 0,
      n_long20 = 0, n_long60 = 0, n_ilc = 0;

  function automatic int offs_to_diff(input int off, input int qq);
    int o;
    o = (off > UNIT - 1) ? UNIT - 1 : (off < -UNIT) ? -UNIT : off;
    return int'((longint'(o) * qq) / UNIT);
  endfunction

  // Sum signal of BPM k: the charge times a per-BPM response (0.9, 1.0, 1.1).
  function automatic int qbpm(input int k, input int b);
    return q[b] * (9 + k) / 10;
  endfunction

  always @(negedge clk) begin
    int b;
    bit amp_old;
    if (rst_n) begin
      amp_old = amp_en_q;
      // DAC gating: one cycle after the window closes the code must be zero
      if (!amp_en_q) begin
        chk(dac[0] == '0 && dac[1] == '0, "DAC not zero outside the drive window");
      end
      amp_en_q = amp_en;
      if (train_start) begin
        nxt = 0;
        m_acc_v[0] = 0; m_acc_v[1] = 0;
      end
      if (sat != '0) n_sat++;
      if (trig_ignored) n_retrig++;
      // a new peak sample: check it, update the reference model
      if (smp_valid) begin
        b = int'(smp_bunch);
        chk(b == nxt, $sformatf("bunch index %0d expected %0d", b, nxt));
        for (int c = 0; c < N_ADC; c++)
          chk(smp[c] == drv[c], $sformatf("sample ch%0d bunch %0d", c, b));
        for (int l = 0; l < N_LOOP; l++) begin
          int s, d, p, cr;
          s = int'(drv[l == 0 ? CH_P2_SUM : CH_P3_SUM]);
          d = int'(drv[l == 0 ? CH_P2_DIF : CH_P3_DIF]);
          p = m_pos(s, d);
          cr = m_corr(p, g[l]);
          m_acc_v[l] = m_acc(m_acc_v[l], cr, lctrl[l].dl_on);
          dac_hold[l] = int'(dac[l]);
          dac_exp[l] = lctrl[l].fb_on ? m_acc_v[l] : 0;
          if (!lctrl[l].fb_on) n_fb_off++;
          if (!lctrl[l].dl_on) n_dl_open++;
          else if (b > 0 && cr != 0 && m_acc_v[l] != cr) n_dl_acc++;
        end
        if (s_is_zero(int'(drv[CH_P2_SUM]))) n_nobeam++;
        due = cyc + longint'(LOOP_LAT);
        n_bunch++;
        nxt++;
      end else if (due >= 0) begin
        for (int l = 0; l < N_LOOP; l++) begin
          if (!amp_old) begin
            if (cyc == due && dac_exp[l] != 0) n_gate++;
          end else if (cyc < due)
            chk(int'(dac[l]) == dac_hold[l], "DAC changed before the loop latency");
          else if (cyc == due)
            chk(int'(dac[l]) == dac_exp[l],
                $sformatf("loop %0d bunch %0d dac %0d expected %0d", l, nxt - 1, dac[l], dac_exp[l]));
        end
        if (cyc >= due) due = -1;
      end
      // drive the next bunch's peak onto the ADC inputs
      b = (nxt < MAXB) ? nxt : MAXB - 1;
      meas[0][b] = y[0][b];
      meas[1][b] = y[1][b] + int'(dac[0]);
      meas[2][b] = y[2][b] + int'(dac[1]);
      drv[CH_P1_SUM] = adc_t'(qbpm(0, b));
      drv[CH_P1_DIF] = adc_t'(offs_to_diff(meas[0][b], qbpm(0, b)));
      drv[CH_P2_SUM] = adc_t'(qbpm(1, b));
      drv[CH_P2_DIF] = adc_t'(offs_to_diff(meas[1][b], qbpm(1, b)));
      drv[CH_P3_SUM] = adc_t'(qbpm(2, b));
      drv[CH_P3_DIF] = adc_t'(offs_to_diff(meas[2][b], qbpm(2, b)));
      for (int c = 6; c < N_ADC; c++) drv[c] = adc_t'(spare[b] + c);
      adc = drv;
    end
  end

  function automatic bit s_is_zero(input int s);
    return s == 0;
  endfunction

  // ---------------- scenario helpers ----------------
  // Incoming beam: bunch-to-bunch correlated offsets with small jitter.
  task automatic make_beam(input int nb, input int jit, input bit nobeam, input int base);
    int y1;
    for (int k = 0; k < 3; k++) begin
      y1 = base + int'($urandom % 3001) - 1500;
      for (int b = 0; b < nb; b++) begin
        y[k][b] = (b == 0) ? y1 : y[k][b-1] + int'($urandom % (2 * jit + 1)) - jit;
      end
    end
    for (int b = 0; b < nb; b++) begin
      q[b] = nobeam ? 0 : 5000 + int'($urandom % 2000);
      spare[b] = int'($urandom % 4000);
    end
  endtask

  task automatic fire(input int nb, input int sp, input int win, input bit retrig);
    tcfg = '{first_delay: CNT_W'(30), spacing: CNT_W'(sp), n_bunches: BUNCH_W'(nb),
             window_len: CNT_W'(win)};
    @(negedge clk) trig = 1;
    @(negedge clk) trig = 0;
    n_trains++;
    if (retrig) begin
      repeat (40) @(negedge clk);
      trig = 1;
      @(negedge clk) trig = 0;
    end
    while (busy || amp_en) @(negedge clk);
    repeat (10) @(negedge clk);
  endtask

  task automatic load_gain(input int l, input int gq8);
    for (int a = 0; a < 2**GAIN_AW; a++) begin
      @(negedge clk);
      gain_we = 1; gain_loop = 1'(l); gain_waddr = GAIN_AW'(a);
      gain_wdata = dac_t'(m_corr(int'(pos_t'(a << (POS_W - GAIN_AW))), gq8));
    end
    @(negedge clk) gain_we = 0;
    g[l] = gq8;
    n_gain_wr++;
  endtask

  real ss_off = 0, ss_on = 0;
  int n_off = 0, n_on = 0;

  task automatic atf_trains(input int n, input bit fb, input bit dl, input bit check_phys);
    int r2, r3;
    for (int t = 0; t < n; t++) begin
      lctrl[0] = '{fb_on: fb, dl_on: dl};
      lctrl[1] = '{fb_on: fb, dl_on: dl};
      make_beam(3, 60, 0, 0);
      fire(3, (t % 2) ? 50 : 55, 30 + 1 + 3 * 55 + 20, t == 3);
      if (fb) begin ss_on += real'(meas[1][1]) ** 2; n_on++; end
      else    begin ss_off += real'(meas[1][1]) ** 2; n_off++; end
      if (check_phys && fb && g[0] == 256) begin
        // unity gain: bunch 2 sees y2 - y1; bunch 3 sees y3 - y2 with the
        // delay loop, y3 - (y2 - y1) without it
        r2 = y[1][1] - y[1][0];
        r3 = dl ? y[1][2] - y[1][1] : y[1][2] - (y[1][1] - y[1][0]);
        chk(meas[1][1] - r2 < 40 && r2 - meas[1][1] < 40,
            $sformatf("bunch 2 at P2 %0d expected about %0d", meas[1][1], r2));
        chk(meas[1][2] - r3 < 60 && r3 - meas[1][2] < 60,
            $sformatf("bunch 3 at P2 %0d expected about %0d", meas[1][2], r3));
      end
    end
  endtask

  initial begin
    real rms_off, rms_on;
    g[0] = GAIN_Q8_DEFAULT; g[1] = GAIN_Q8_DEFAULT;
    m_acc_v = '{0, 0}; dac_exp = '{0, 0}; dac_hold = '{0, 0};
    lctrl[0] = '{fb_on: 1'b1, dl_on: 1'b1};
    lctrl[1] = '{fb_on: 1'b1, dl_on: 1'b1};
    tcfg = '0;
    for (int c = 0; c < N_ADC; c++) begin adc[c] = '0; drv[c] = '0; end
    make_beam(3, 60, 0, 0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);

    // ATF 3-bunch trains, 154 / 140 ns spacing, feedback off then on
    atf_trains(12, 0, 1, 0);
    atf_trains(12, 1, 1, 1);
    atf_trains(3, 1, 0, 1);                // delay loop open
    // no beam: zero sum, no correction
    lctrl[0] = '{fb_on: 1'b1, dl_on: 1'b1}; lctrl[1] = lctrl[0];
    make_beam(3, 60, 1, 0);
    fire(3, 55, 200, 0);
    chk(dac[0] == '0, "no-beam train left a correction");
    // window closing before the last bunch's correction
    make_beam(3, 60, 0, 3000);
    fire(3, 55, 30 + 1 + 2 * 55 + 2, 0);
    // gain 0.5 on loop P2-K1
    load_gain(0, 128);
    atf_trains(3, 1, 1, 0);
    // wrong-sign gain on loop P3-K2 runs the accumulator to the rail
    load_gain(1, -256);
    make_beam(20, 60, 0, 2000);
    fire(20, 54, 30 + 1 + 20 * 54 + 20, 0);
    n_long20++;
    load_gain(1, 256);
    load_gain(0, 256);
    // 60-bunch train at 140 ns
    make_beam(60, 60, 0, 0);
    fire(60, 50, 30 + 1 + 60 * 50 + 20, 0);
    n_long60++;
    // ILC-like train: 3000 bunches, 300 ns (107 cycles)
    make_beam(3000, 30, 0, 0);
    fire(3000, 107, 30 + 1 + 3000 * 107 + 20, 0);
    n_ilc++;

    rms_off = $sqrt(ss_off / n_off);
    rms_on  = $sqrt(ss_on / n_on);
    $display("bunch 2 at P2: rms %0.1f units feedback off, %0.1f units on", rms_off, rms_on);
    $display("loop latency %0d cycles = %0.1f ns", STROBE_TO_DAC, STROBE_TO_DAC * 1.0e6 / CLK_KHZ);
    chk(rms_on < rms_off / 4.0, "feedback did not reduce the bunch-2 jitter");
    $display("mechanisms: trains=%0d bunches=%0d retrig=%0d fb_off=%0d dl_open=%0d dl_acc=%0d gain_wr=%0d sat=%0d nobeam=%0d gate=%0d long20=%0d long60=%0d ilc=%0d",
             n_trains, n_bunch, n_retrig, n_fb_off, n_dl_open, n_dl_acc, n_gain_wr, n_sat,
             n_nobeam, n_gate, n_long20, n_long60, n_ilc);
    chk(n_trains > 0, "no train");
    chk(n_bunch > 0, "no bunch");
    chk(n_retrig > 0, "retrigger never ignored");
    chk(n_fb_off > 0, "feedback never off");
    chk(n_dl_open > 0, "delay loop never open");
    chk(n_dl_acc > 0, "delay loop never accumulated");
    chk(n_gain_wr > 0, "gain table never written");
    chk(n_sat > 0, "accumulator never saturated");
    chk(n_nobeam > 0, "no-beam bunch never seen");
    chk(n_gate > 0, "drive window never gated a correction");
    chk(n_long20 > 0 && n_long60 > 0 && n_ilc > 0, "long trains not run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
