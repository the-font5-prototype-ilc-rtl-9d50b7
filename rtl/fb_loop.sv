// fb_loop: one BPM-to-kicker intra-train feedback channel (P2 -> K1 or
// P3 -> K2).
//
// Chain, as in the FONT5 system: peak-sampled sum and difference of one
// BPM -> charge normalisation with the reciprocal of the sum (charge_norm)
// -> gain table (gain_lut) -> delay-loop accumulator (delay_loop) -> DAC,
// which drives the kicker amplifier. This design adds a DAC output register
// that holds the code at zero when the feedback is switched off or outside
// the drive window opened by the pre-beam trigger, and clears the accumulator
// at the start of each train.
//
// Timing: LOOP_LAT = 5 cycles from valid_in (sampled sum/diff on the inputs)
// to the new DAC code; pos_valid/pos and corr_valid/corr are brought out for
// data acquisition.
module fb_loop
  import font5_pkg::*;
#(
  parameter int GAIN_Q8 = GAIN_Q8_DEFAULT
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               train_start,
  input  logic               drive_en,
  input  loop_ctrl_t         ctrl,
  input  logic               valid_in,
  input  adc_t               sum,
  input  adc_t               diff,
  input  logic               gain_we,
  input  logic [GAIN_AW-1:0] gain_waddr,
  input  dac_t               gain_wdata,
  output dac_t               dac,
  output logic               pos_valid,
  output pos_t               pos,
  output logic               corr_valid,
  output dac_t               corr,
  output logic               acc_valid,
  output logic               sat
);

  dac_t acc;

  charge_norm u_norm (
    .clk       (clk),
    .rst_n     (rst_n),
    .valid_in  (valid_in),
    .sum       (sum),
    .diff      (diff),
    .valid_out (pos_valid),
    .pos       (pos)
  );

  gain_lut #(.GAIN_Q8(GAIN_Q8)) u_gain (
    .clk       (clk),
    .rst_n     (rst_n),
    .valid_in  (pos_valid),
    .pos       (pos),
    .valid_out (corr_valid),
    .corr      (corr),
    .we        (gain_we),
    .waddr     (gain_waddr),
    .wdata     (gain_wdata)
  );

  delay_loop u_dloop (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (train_start),
    .dl_on     (ctrl.dl_on),
    .valid_in  (corr_valid),
    .corr      (corr),
    .valid_out (acc_valid),
    .acc       (acc),
    .sat       (sat)
  );

  // Outside the drive window, or with the feedback off, the output is zero.
  a_dac_gated: assert property (@(posedge clk) disable iff (!rst_n)
    !($past(ctrl.fb_on) && $past(drive_en)) |-> dac == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     dac <= '0;
    else if (ctrl.fb_on && drive_en) dac <= acc;
    else                            dac <= '0;
  end

endmodule
