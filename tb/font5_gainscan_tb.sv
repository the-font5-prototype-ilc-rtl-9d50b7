// font5_gainscan_tb: the beam-test workload - a scan of the loop gain with
// 3-bunch trains, both loops closed, measuring the jitter of bunch 2 at the
// loop's BPM and its correlation with bunch 1.
//
// Beam model (this testbench's own): bunch offsets are Gaussian with the
// same rms SIGMA for every bunch and a bunch-to-bunch correlation RHO, 0.96
// at P2 and 0.92 at P3 (values that reproduce a jitter reduction like the
// one reported for each loop). The kicker adds its DAC code, one position
// unit per DAC unit, to the next bunch at its BPM; P1 sees only the
// incoming beam. For a gain g the corrected bunch 2 is y2 - g*y1, so its rms
// is SIGMA*sqrt(1 - 2*g*RHO + g^2), smallest near g = RHO, where its
// correlation with bunch 1 vanishes.
//
// Per gain point it checks the measured rms against the rms of y2 - g*y1
// computed from the same random draws (the table quantises the gain
// response, so within 5 % plus 12 units), and over the scan that the
// minimum is near g = RHO, the reduction at the optimum, and the sign of
// the residual correlation below and above the optimum.
module font5_gainscan_tb;
  import font5_pkg::*;
  import font5_model_pkg::*;

  localparam int NT = 120;              // trains per gain point
  localparam real SIGMA = 800.0;        // incoming jitter, position units
  localparam real RHO [2] = '{0.96, 0.92};
  localparam int NG = 8;
  localparam int GAINS [NG] = '{77, 154, 205, 236, 256, 307, 358, 435};

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

  always #1.4 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int y [3][3];           // [bpm][bunch] incoming offsets
  int meas [3][3];        // offsets at the BPMs with the kicks
  int q [3];
  int nxt = 0;

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  function automatic int to_diff(input int off, input int qq);
    int o;
    o = (off > 8191) ? 8191 : (off < -8192) ? -8192 : off;
    return int'((longint'(o) * qq) / 8192);
  endfunction

  always @(negedge clk) begin
    if (train_start) nxt = 0;
    if (smp_valid) nxt++;
    if (nxt < 3) begin
      meas[0][nxt] = y[0][nxt];
      meas[1][nxt] = y[1][nxt] + int'(dac[0]);
      meas[2][nxt] = y[2][nxt] + int'(dac[1]);
      adc[CH_P1_SUM] = adc_t'(q[nxt]);
      adc[CH_P1_DIF] = adc_t'(to_diff(meas[0][nxt], q[nxt]));
      adc[CH_P2_SUM] = adc_t'(q[nxt]);
      adc[CH_P2_DIF] = adc_t'(to_diff(meas[1][nxt], q[nxt]));
      adc[CH_P3_SUM] = adc_t'(q[nxt]);
      adc[CH_P3_DIF] = adc_t'(to_diff(meas[2][nxt], q[nxt]));
    end
  end

  task automatic load_gain(input int l, input int gq8);
    for (int a = 0; a < 2**GAIN_AW; a++) begin
      @(negedge clk);
      gain_we = 1; gain_loop = 1'(l); gain_waddr = GAIN_AW'(a);
      gain_wdata = dac_t'(m_corr(int'(pos_t'(a << (POS_W - GAIN_AW))), gq8));
    end
    @(negedge clk) gain_we = 0;
  endtask

  real rms_meas [2][NG], rms_pred [2][NG], corr21 [2][NG];

  initial begin
    real n1, n2, g;
    real s_mm [2], s_pp [2], s_m1 [2], s_11 [2], s_m [2], s_1 [2];
    int best [2];
    for (int c = 0; c < N_ADC; c++) adc[c] = '0;
    lctrl[0] = '{fb_on: 1'b1, dl_on: 1'b1};
    lctrl[1] = '{fb_on: 1'b1, dl_on: 1'b1};
    tcfg = '{first_delay: CNT_W'(30), spacing: CNT_W'(55), n_bunches: BUNCH_W'(3),
             window_len: CNT_W'(30 + 1 + 3 * 55 + 20)};
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int gi = 0; gi < NG; gi++) begin
      load_gain(0, GAINS[gi]);
      load_gain(1, GAINS[gi]);
      g = real'(GAINS[gi]) / 256.0;
      for (int l = 0; l < 2; l++) begin
        s_mm[l] = 0; s_pp[l] = 0; s_m1[l] = 0; s_11[l] = 0; s_m[l] = 0; s_1[l] = 0;
      end
      for (int t = 0; t < NT; t++) begin
        for (int k = 0; k < 3; k++) begin
          real r;
          r = (k == 0) ? 0.5 : RHO[k - 1];
          n1 = gauss();
          y[k][0] = int'(SIGMA * n1);
          for (int b = 1; b < 3; b++) begin
            n2 = gauss();
            y[k][b] = int'(r * real'(y[k][b-1]) + SIGMA * $sqrt(1.0 - r * r) * n2);
          end
        end
        for (int b = 0; b < 3; b++) q[b] = 5000 + int'($urandom % 2000);
        @(negedge clk) trig = 1;
        @(negedge clk) trig = 0;
        while (busy || amp_en) @(negedge clk);
        repeat (5) @(negedge clk);
        for (int l = 0; l < 2; l++) begin
          real m2, p2, m1;
          m2 = real'(meas[l + 1][1]);
          m1 = real'(meas[l + 1][0]);
          p2 = real'(y[l + 1][1]) - g * real'(y[l + 1][0]);
          s_mm[l] += m2 * m2; s_pp[l] += p2 * p2;
          s_m1[l] += m2 * m1; s_11[l] += m1 * m1; s_m[l] += m2; s_1[l] += m1;
        end
      end
      for (int l = 0; l < 2; l++) begin
        real cov, v1, v2;
        rms_meas[l][gi] = $sqrt(s_mm[l] / NT);
        rms_pred[l][gi] = $sqrt(s_pp[l] / NT);
        cov = s_m1[l] / NT - (s_m[l] / NT) * (s_1[l] / NT);
        v1  = s_11[l] / NT - (s_1[l] / NT) ** 2;
        v2  = s_mm[l] / NT - (s_m[l] / NT) ** 2;
        corr21[l][gi] = cov / $sqrt(v1 * v2);
        $display("loop %s gain %0.2f: bunch-2 rms %0.1f (y2-g*y1: %0.1f), corr(2,1) %0.2f",
                 l == 0 ? "P2-K1" : "P3-K2", g, rms_meas[l][gi], rms_pred[l][gi], corr21[l][gi]);
        chk(rms_meas[l][gi] < rms_pred[l][gi] * 1.05 + 12.0 &&
            rms_meas[l][gi] > rms_pred[l][gi] * 0.95 - 12.0,
            $sformatf("loop %0d gain %0.2f rms %0.1f predicted %0.1f", l, g, rms_meas[l][gi], rms_pred[l][gi]));
      end
    end
    for (int l = 0; l < 2; l++) begin
      best[l] = 0;
      for (int gi = 1; gi < NG; gi++) if (rms_meas[l][gi] < rms_meas[l][best[l]]) best[l] = gi;
      chk(GAINS[best[l]] >= 205 && GAINS[best[l]] <= 307, $sformatf("loop %0d optimum at gain %0d/256", l, GAINS[best[l]]));
      chk(rms_meas[l][best[l]] < SIGMA * 0.5, $sformatf("loop %0d optimum jitter %0.1f", l, rms_meas[l][best[l]]));
      chk(corr21[l][0] > 0.5, $sformatf("loop %0d correlation at low gain %0.2f", l, corr21[l][0]));
      chk(corr21[l][NG-1] < -0.3, $sformatf("loop %0d correlation at high gain %0.2f", l, corr21[l][NG-1]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
