// delay_loop: the feedback delay loop, an accumulator that adds each bunch's
// correction to the drive already applied.
//
// In the FONT5 system the delay loop is an accumulator in the FPGA: the kicker
// downstream BPM sees the beam after the previous corrections, so to keep a
// bunch corrected the new correction is added to the previous output
// (the "+" and "Delay" of the feedback circuit). Here
//   clear                      -> acc = 0      (start of each train)
//   valid_in and dl_on         -> acc = saturate(acc + corr)
//   valid_in and not dl_on     -> acc = corr   (loop opened, for tests)
// The sum saturates at the DAC range and sat pulses for one cycle when it does.
// clear wins over valid_in. Latency DLOOP_LAT = 1 cycle.
module delay_loop
  import font5_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic dl_on,
  input  logic valid_in,
  input  dac_t corr,
  output logic valid_out,
  output dac_t acc,
  output logic sat
);

  logic signed [DAC_W:0] next_sum;

  assign next_sum = (dl_on ? (DAC_W+1)'(acc) : '0) + (DAC_W+1)'(corr);

  // The accumulator is zero after a clear.
  a_clear: assert property (@(posedge clk) disable iff (!rst_n)
    $past(clear) |-> acc == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      valid_out <= 1'b0;
      sat       <= 1'b0;
    end else begin
      valid_out <= valid_in && !clear;
      sat       <= 1'b0;
      if (clear) begin
        acc <= '0;
      end else if (valid_in) begin
        acc <= DAC_W'(sat_s(48'(next_sum), DAC_W));
        sat <= (next_sum != (DAC_W+1)'(DAC_W'(next_sum)));
      end
    end
  end

endmodule
