// raw_delay_regs: delay registers for the raw ECG samples.
//
// The ADC delivers one sample at a time (sample_valid strobe). Each new
// sample is shifted into a chain of DEPTH registers, so taps[0] is x[n],
// taps[1] is x[n-1] and so on: the feed-forward operands of the first filter
// section. taps_valid pulses one cycle after sample_valid, when the chain
// has moved. The chain resets to zero.
// The delay-register block sits between the ADC and the filter unit in the
// published block diagram; its depth of three (one second-order section) is
// this implementation's choice.
module raw_delay_regs #(
  parameter int SAMPLE_W = cpsd_pkg::SAMPLE_W,
  parameter int DEPTH    = 3
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              sample_valid,
  input  logic signed [SAMPLE_W-1:0]        sample,
  output logic signed [SAMPLE_W-1:0]        taps [DEPTH],
  output logic                              taps_valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) taps[i] <= '0;
      taps_valid <= 1'b0;
    end else begin
      taps_valid <= sample_valid;
      if (sample_valid) begin
        taps[0] <= sample;
        for (int i = 1; i < DEPTH; i++) taps[i] <= taps[i-1];
      end
    end
  end

endmodule
