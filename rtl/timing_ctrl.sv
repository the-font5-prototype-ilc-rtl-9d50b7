// timing_ctrl: turns the pre-beam trigger into the amplifier drive-enable
// window and one peak-sample strobe per bunch.
//
// In the FONT5 system a pre-beam trigger enables the amplifier drive output of
// the board, the BPM processor outputs are sampled at their peak, and the ATF
// train has 3 bunches 140-154 ns apart (50-55 cycles at 357 MHz), with 20 and
// 60 bunch trains foreseen. How the sample instants are set is not
// described; here they are programmed: a delay from the trigger to the first
// peak, a bunch spacing and a bunch count, all in clock cycles.
//
// Timing (cycles counted from the one in which train_start is high, 0):
//   drive_en  high in cycles 0 .. window_len-1
//   strobe k  high in cycle first_delay + 1 + k*spacing, k = 0 .. n_bunches-1,
//             with bunch_idx = k in the same cycle
// A rising edge of trig is taken only while no train is being sequenced and
// no drive window is open; later edges are ignored and flagged on
// trig_ignored. A spacing of 0 is treated as 1.
module timing_ctrl
  import font5_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               trig,          // pre-beam trigger (level, edge taken)
  input  timing_cfg_t        cfg,
  output logic               train_start,   // one-cycle pulse on an accepted trigger
  output logic               drive_en,      // amplifier drive-enable window
  output logic               strobe,        // peak-sample strobe, one per bunch
  output logic [BUNCH_W-1:0] bunch_idx,     // bunch number of the strobe
  output logic               busy,          // bunch strobes still to come
  output logic               trig_ignored   // a trigger edge arrived while busy
);

  typedef enum logic {IDLE, SEQ} state_t;

  state_t             state;
  logic               trig_q;
  logic [CNT_W-1:0]   gap;      // cycles left until the next strobe
  logic [CNT_W-1:0]   win;      // cycles left in the drive window
  logic [BUNCH_W-1:0] nb;       // strobes issued so far
  logic               trig_rise;

  assign trig_rise = trig && !trig_q;
  assign drive_en  = (win != '0);
  assign busy      = (state == SEQ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= IDLE;
      trig_q       <= 1'b0;
      gap          <= '0;
      win          <= '0;
      nb           <= '0;
      strobe       <= 1'b0;
      bunch_idx    <= '0;
      train_start  <= 1'b0;
      trig_ignored <= 1'b0;
    end else begin
      trig_q       <= trig;
      strobe       <= 1'b0;
      train_start  <= 1'b0;
      trig_ignored <= 1'b0;
      if (win != '0) win <= win - 1'b1;

      unique case (state)
        IDLE: begin
          if (trig_rise && win == '0) begin
            train_start <= 1'b1;
            win         <= cfg.window_len;
            gap         <= cfg.first_delay;
            nb          <= '0;
            if (cfg.n_bunches != '0) state <= SEQ;
          end else if (trig_rise) begin
            trig_ignored <= 1'b1;
          end
        end
        SEQ: begin
          if (trig_rise) trig_ignored <= 1'b1;
          if (gap == '0) begin
            strobe    <= 1'b1;
            bunch_idx <= nb;
            nb        <= nb + 1'b1;
            gap       <= (cfg.spacing == '0) ? '0 : cfg.spacing - 1'b1;
            if (nb + 1'b1 == cfg.n_bunches) state <= IDLE;
          end else begin
            gap <= gap - 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // A strobe is never issued outside the sequencing of a train.
  a_strobe_in_train: assert property (@(posedge clk) disable iff (!rst_n)
    strobe |-> $past(state == SEQ));

endmodule
