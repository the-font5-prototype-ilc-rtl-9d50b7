// font5_top: logic of the FONT5 digital feedback board, a bunch-by-bunch
// intra-train position feedback for the ATF2 extraction line.
//
// The board digitises 9 analogue channels at 357 MHz (the clock is derived
// from the accelerator master oscillator, so it is locked to the beam) and
// drives 2 DACs, one per kicker amplifier. The FONT5 system uses the vertical
// sum and difference signals of three stripline BPMs: P2 feeds kicker K1,
// P3 feeds kicker K2, and P1 only witnesses the incoming beam. The channel
// order (P1, P2, P3 sum/diff pairs, then three spares) is this design's.
//
// A pre-beam trigger opens the amplifier drive window and starts the bunch
// sequencer (timing_ctrl); each bunch's peak is captured on all channels
// (peak_sampler); each loop normalises its BPM position by the charge,
// applies the gain table and adds the result to the delay-loop accumulator
// (fb_loop), whose value goes to the DAC. Every sample, position and
// correction is also brought out for the data acquisition system.
//
// Timing: the DAC code for bunch k appears STROBE_TO_DAC = 6 cycles (17 ns)
// after bunch k's sample strobe, well inside the 50-55 cycle bunch spacing,
// so bunch k+1 is kicked with the correction from bunches 1..k.
// The gain tables are loaded through gain_we/gain_loop/gain_waddr/gain_wdata.
module font5_top
  import font5_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               trig,                // pre-beam trigger
  input  timing_cfg_t        tcfg,
  input  loop_ctrl_t         lctrl   [N_LOOP],
  input  adc_t               adc     [N_ADC],
  input  logic               gain_we,
  input  logic               gain_loop,
  input  logic [GAIN_AW-1:0] gain_waddr,
  input  dac_t               gain_wdata,
  output dac_t               dac     [N_LOOP],    // kicker amplifier drive codes
  output logic               amp_en,              // amplifier drive enable
  // data acquisition
  output logic               train_start,
  output logic               trig_ignored,
  output logic               busy,                // bunch strobes still to come
  output logic               smp_valid,
  output logic [BUNCH_W-1:0] smp_bunch,
  output adc_t               smp     [N_ADC],
  output logic [N_LOOP-1:0]  pos_valid,
  output pos_t               pos     [N_LOOP],
  output logic [N_LOOP-1:0]  corr_valid,
  output dac_t               corr    [N_LOOP],
  output logic [N_LOOP-1:0]  acc_valid,
  output logic [N_LOOP-1:0]  sat
);

  logic               strobe;
  logic [BUNCH_W-1:0] strobe_bunch;
  logic               drive_en;

  localparam int unsigned SUM_CH [N_LOOP] = '{CH_P2_SUM, CH_P3_SUM};
  localparam int unsigned DIF_CH [N_LOOP] = '{CH_P2_DIF, CH_P3_DIF};

  timing_ctrl u_timing (
    .clk          (clk),
    .rst_n        (rst_n),
    .trig         (trig),
    .cfg          (tcfg),
    .train_start  (train_start),
    .drive_en     (drive_en),
    .strobe       (strobe),
    .bunch_idx    (strobe_bunch),
    .busy         (busy),
    .trig_ignored (trig_ignored)
  );

  assign amp_en = drive_en;

  peak_sampler #(.NCH(N_ADC)) u_sampler (
    .clk       (clk),
    .rst_n     (rst_n),
    .strobe    (strobe),
    .bunch_in  (strobe_bunch),
    .adc       (adc),
    .smp       (smp),
    .valid     (smp_valid),
    .bunch_out (smp_bunch)
  );

  for (genvar l = 0; l < N_LOOP; l++) begin : g_loop
    fb_loop u_loop (
      .clk         (clk),
      .rst_n       (rst_n),
      .train_start (train_start),
      .drive_en    (drive_en),
      .ctrl        (lctrl[l]),
      .valid_in    (smp_valid),
      .sum         (smp[SUM_CH[l]]),
      .diff        (smp[DIF_CH[l]]),
      .gain_we     (gain_we && (gain_loop == 1'(l))),
      .gain_waddr  (gain_waddr),
      .gain_wdata  (gain_wdata),
      .dac         (dac[l]),
      .pos_valid   (pos_valid[l]),
      .pos         (pos[l]),
      .corr_valid  (corr_valid[l]),
      .corr        (corr[l]),
      .acc_valid   (acc_valid[l]),
      .sat         (sat[l])
    );
  end

endmodule
