// gain_lut: the feedback gain stage, a lookup table in FPGA RAM that maps a
// normalised beam position to a kicker correction.
//
// The FONT5 system implements the gain as a table in FPGA RAM; the table's size,
// how it is loaded and its start-up contents are this design's choices. The
// address is the top GAIN_AW bits of the position (two's complement, so the
// address read as a signed number is the position in units of
// 2^(POS_W-GAIN_AW)). At start-up entry i holds the linear negative feedback
//   lut[i] = saturate( -(GAIN_Q8 * signed(i) * 2^(DAC_W-GAIN_AW)) / 256 )
// i.e. a normalised gain GAIN_Q8/256 with one position unit per DAC unit.
// Any other response (another gain, a non-linear curve) is written through
// the write port by the control system between trains. The position bits
// below the table address are not used (the table sets the resolution).
// Read latency
// GAIN_LAT = 1 cycle; a write and a read of the same entry in one cycle
// return the old entry.
module gain_lut
  import font5_pkg::*;
#(
  parameter int GAIN_Q8 = GAIN_Q8_DEFAULT
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               valid_in,
  input  pos_t               pos,
  output logic               valid_out,
  output dac_t               corr,
  input  logic               we,
  input  logic [GAIN_AW-1:0] waddr,
  input  dac_t               wdata
);

  dac_t lut [2**GAIN_AW];

  function automatic dac_t init_entry(input int unsigned i);
    longint signed v;
    v = longint'($signed(GAIN_AW'(i)));
    v = -(longint'(GAIN_Q8) * v * (longint'(1) << (DAC_W - GAIN_AW))) / 256;
    return DAC_W'(sat_s(48'(v), DAC_W));
  endfunction

  initial begin
    for (int unsigned i = 0; i < 2**GAIN_AW; i++) lut[i] = init_entry(i);
  end

  always_ff @(posedge clk) begin
    if (we) lut[waddr] <= wdata;
    corr <= lut[pos[POS_W-1 -: GAIN_AW]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_out <= 1'b0;
    else        valid_out <= valid_in;
  end

endmodule
