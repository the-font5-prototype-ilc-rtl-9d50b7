// charge_norm: charge-normalised beam position, diff / sum, for one BPM.
//
// In the FONT5 system the analogue processor forms the sum and difference of
// the top and bottom stripline signals, and the FPGA normalises for the beam
// charge with the reciprocal of the sum, held in a table in FPGA RAM
// (recip_rom). The table size, the widths and the pipeline are this design's
// choices. Here:
//   cycle 1: the top RECIP_AW bits of the sum (negative sums count as zero)
//            address the reciprocal table; the difference is registered
//   cycle 2: pos = saturate( (diff * recip) >>> SH ),
//            SH = RECIP_FRAC + (ADC_W-1-RECIP_AW) - (POS_W-1)
// pos is diff/sum in Q1.(POS_W-1): +2^(POS_W-1)-1 is diff = sum.
// Latency NORM_LAT = 2 cycles, one result per cycle; valid_out follows
// valid_in by the latency.
module charge_norm
  import font5_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic valid_in,
  input  adc_t sum,
  input  adc_t diff,
  output logic valid_out,
  output pos_t pos
);

  localparam int unsigned RW = RECIP_FRAC + 1;
  localparam int unsigned SH = RECIP_FRAC + (ADC_W - 1 - RECIP_AW) - (POS_W - 1);

  logic [RECIP_AW-1:0] addr;
  logic [RW-1:0]       recip;
  adc_t                diff_q;
  logic                v1;
  logic signed [ADC_W+RW:0] prod;

  assign addr = (sum <= 0) ? '0 : sum[ADC_W-2 -: RECIP_AW];

  recip_rom #(.AW(RECIP_AW), .FRAC(RECIP_FRAC)) u_recip (
    .clk  (clk),
    .addr (addr),
    .data (recip)
  );

  assign prod = diff_q * $signed({1'b0, recip});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      diff_q    <= '0;
      valid_out <= 1'b0;
      pos       <= '0;
    end else begin
      v1        <= valid_in;
      diff_q    <= diff;
      valid_out <= v1;
      pos       <= POS_W'(sat_s(48'(prod >>> SH), POS_W));
    end
  end

endmodule
