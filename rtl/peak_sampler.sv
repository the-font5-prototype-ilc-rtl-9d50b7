// peak_sampler: captures every ADC channel at the peak of the BPM processor
// output, once per bunch.
//
// In the FONT5 system the analogue BPM processor outputs are sampled at their
// peak by ADCs clocked at 357 MHz, the same clock as the FPGA. The ADC words
// therefore arrive one per cycle here, and the peak is picked by the strobe
// from timing_ctrl (a single sample at a programmed instant, this design's
// choice). The sampler holds the words captured in a strobe
// cycle (together with the bunch number) until the next strobe; valid is high
// for the one cycle after each capture. Latency: one cycle.
module peak_sampler
  import font5_pkg::*;
#(
  parameter int unsigned NCH = N_ADC
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               strobe,
  input  logic [BUNCH_W-1:0] bunch_in,
  input  adc_t               adc [NCH],
  output adc_t               smp [NCH],
  output logic               valid,
  output logic [BUNCH_W-1:0] bunch_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid     <= 1'b0;
      bunch_out <= '0;
      for (int c = 0; c < NCH; c++) smp[c] <= '0;
    end else begin
      valid <= strobe;
      if (strobe) begin
        bunch_out <= bunch_in;
        for (int c = 0; c < NCH; c++) smp[c] <= adc[c];
      end
    end
  end

endmodule
