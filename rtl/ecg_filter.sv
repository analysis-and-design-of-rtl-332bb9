// ecg_filter: programmable FIR/IIR filter unit of the CPSD processor.
//
// NUM_SEC second-order sections (biquad_mac, one MAC unit each) run in
// cascade: section 0 takes its x taps from the raw-sample delay registers,
// every later section keeps a three-deep delay line of the previous
// section's outputs. With four sections the unit holds a 1-100 Hz band pass
// (one high-pass and one low-pass section) and notches at 60 Hz and 120 Hz,
// the set-up used to clean ECG of baseline drift and power-line noise.
// Coefficients come from bus registers (coef[section][b0 b1 b2 a1 a2],
// signed Q2.16). Timing: out_valid pulses 8 * NUM_SEC - 2 cycles
// after in_valid (30 cycles for four sections). Inside the cascade the
// samples carry GUARD extra fraction bits (FILT_W = 18 bits): with only
// 10-bit section states the rounding of the 1 Hz high-pass section would
// leave a dead band of several hundred LSB. Every section rounds to
// nearest and saturates to FILT_W bits; the output is rounded back to
// SAMPLE_W bits and saturated.
// That the filter is cascaded MAC units with bus-programmed coefficients,
// and its pass band and notches, follow the published design; the number of
// sections and the arithmetic are this implementation's choices.
module ecg_filter #(
  parameter int SAMPLE_W  = cpsd_pkg::SAMPLE_W,
  parameter int NUM_SEC   = cpsd_pkg::NUM_SEC,
  parameter int COEF_W    = cpsd_pkg::COEF_W,
  parameter int COEF_FRAC = cpsd_pkg::COEF_FRAC,
  parameter int GUARD     = cpsd_pkg::FILT_GUARD,
  localparam int DW       = SAMPLE_W + GUARD
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic signed [SAMPLE_W-1:0] x_taps [3],
  input  logic signed [COEF_W-1:0]   coef   [NUM_SEC][5],
  output logic                       out_valid,
  output logic signed [SAMPLE_W-1:0] out_sample
);

  logic                       sec_in_valid  [NUM_SEC];
  logic signed [DW-1:0]       sec_taps      [NUM_SEC][3];
  logic                       sec_out_valid [NUM_SEC];
  logic signed [DW-1:0]       sec_y         [NUM_SEC];

  assign sec_in_valid[0] = in_valid;
  for (genvar t = 0; t < 3; t++) begin : g_scale
    assign sec_taps[0][t] = DW'(x_taps[t]) <<< GUARD;
  end

  for (genvar s = 0; s < NUM_SEC; s++) begin : g_sec
    biquad_mac #(.DATA_W(DW), .COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC)) u_sec (
      .clk, .rst_n,
      .in_valid (sec_in_valid[s]),
      .x_taps   (sec_taps[s]),
      .coef     (coef[s]),
      .out_valid(sec_out_valid[s]),
      .y        (sec_y[s])
    );

    if (s > 0) begin : g_link
      // delay line of the previous section's outputs
      logic signed [DW-1:0] dl [3];
      logic                       dl_valid;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          dl       <= '{default: '0};
          dl_valid <= 1'b0;
        end else begin
          dl_valid <= sec_out_valid[s-1];
          if (sec_out_valid[s-1]) begin
            dl[0] <= sec_y[s-1];
            dl[1] <= dl[0];
            dl[2] <= dl[1];
          end
        end
      end
      assign sec_in_valid[s] = dl_valid;
      assign sec_taps[s]     = dl;
    end
  end

  // back to SAMPLE_W bits: round to nearest, saturate
  localparam logic signed [DW:0] OMAX = (DW+1)'((1 << (SAMPLE_W-1)) - 1);
  localparam logic signed [DW:0] OMIN = -(DW+1)'(1 << (SAMPLE_W-1));
  logic signed [DW:0] y_round;
  always_comb begin
    y_round = ((DW+1)'(sec_y[NUM_SEC-1]) + (DW+1)'(1 << (GUARD-1))) >>> GUARD;
    if (y_round > OMAX)      out_sample = OMAX[SAMPLE_W-1:0];
    else if (y_round < OMIN) out_sample = OMIN[SAMPLE_W-1:0];
    else                     out_sample = y_round[SAMPLE_W-1:0];
  end
  assign out_valid = sec_out_valid[NUM_SEC-1];

endmodule
