// font5_pkg: widths, channel map, configuration types and pipeline latencies
// shared by the FONT5 intra-train feedback logic.
//
// The FONT5 system fixes the clock (357 MHz, locked to the beam), the number of
// ADC inputs (9) and DAC outputs (2), the two loops (BPM P2 -> kicker K1 and
// BPM P3 -> kicker K2) and the processing chain (peak sample, charge
// normalisation by a reciprocal-of-sum table, gain table, delay-loop
// accumulator, DAC). Every word width, the channel order and the table sizes
// below are this design's own choices.
package font5_pkg;

  // Clock, for reference when converting times to cycles: 357 MHz, 2.80 ns.
  localparam int unsigned CLK_KHZ = 357_000;

  localparam int unsigned ADC_W   = 14;  // ADC sample width, two's complement
  localparam int unsigned DAC_W   = 14;  // DAC code width, two's complement
  localparam int unsigned POS_W   = 14;  // normalised position, Q1.13 of diff/sum
  localparam int unsigned N_ADC   = 9;   // analogue input channels on the board
  localparam int unsigned N_LOOP  = 2;   // analogue outputs = kicker drive loops
  localparam int unsigned CNT_W   = 20;  // timing counters (cycles)
  localparam int unsigned BUNCH_W = 16;  // bunch index / bunch count

  // Reciprocal-of-sum table: 2**RECIP_AW entries of RECIP_FRAC+1 bits.
  localparam int unsigned RECIP_AW   = 10;
  localparam int unsigned RECIP_FRAC = 24;
  // Gain table: 2**GAIN_AW entries of DAC_W bits.
  localparam int unsigned GAIN_AW    = 10;
  // Default gain written into the gain table at start-up, Q8 (256 = 1.0).
  localparam int          GAIN_Q8_DEFAULT = 256;

  // ADC channel map: sum and difference of each stripline BPM, then spares.
  localparam int unsigned CH_P1_SUM = 0;
  localparam int unsigned CH_P1_DIF = 1;
  localparam int unsigned CH_P2_SUM = 2;
  localparam int unsigned CH_P2_DIF = 3;
  localparam int unsigned CH_P3_SUM = 4;
  localparam int unsigned CH_P3_DIF = 5;

  // Loop index: 0 = P2 -> K1, 1 = P3 -> K2.
  localparam int unsigned LOOP_P2K1 = 0;
  localparam int unsigned LOOP_P3K2 = 1;

  // Pipeline latencies in clock cycles.
  localparam int unsigned NORM_LAT   = 2;  // reciprocal read, multiply
  localparam int unsigned GAIN_LAT   = 1;  // gain table read
  localparam int unsigned DLOOP_LAT  = 1;  // accumulator
  localparam int unsigned OUT_LAT    = 1;  // DAC output register
  localparam int unsigned LOOP_LAT   = NORM_LAT + GAIN_LAT + DLOOP_LAT + OUT_LAT;
  // From the cycle the sample strobe is high (ADC word captured at its end)
  // to the first cycle the new DAC code is on the output.
  localparam int unsigned STROBE_TO_DAC = 1 + LOOP_LAT;

  typedef logic signed [ADC_W-1:0] adc_t;
  typedef logic signed [DAC_W-1:0] dac_t;
  typedef logic signed [POS_W-1:0] pos_t;

  // Train timing, set by the control system before the pre-beam trigger.
  typedef struct packed {
    logic [CNT_W-1:0]   first_delay;  // trigger edge to first peak sample
    logic [CNT_W-1:0]   spacing;      // bunch spacing in cycles
    logic [BUNCH_W-1:0] n_bunches;    // bunches in the train
    logic [CNT_W-1:0]   window_len;   // amplifier drive-enable window
  } timing_cfg_t;

  // Per-loop switches.
  typedef struct packed {
    logic fb_on;  // feedback output on (off: DAC held at zero)
    logic dl_on;  // delay loop on (off: each bunch gets only its own correction)
  } loop_ctrl_t;

  // Saturate a wide signed value into an N-bit two's complement range.
  function automatic logic signed [31:0] sat_s(input logic signed [47:0] v, input int unsigned n);
    logic signed [47:0] hi, lo;
    hi = (48'sd1 <<< (n - 1)) - 48'sd1;
    lo = -(48'sd1 <<< (n - 1));
    if (v > hi)      return 32'(hi);
    else if (v < lo) return 32'(lo);
    else             return 32'(v);
  endfunction

endpackage
