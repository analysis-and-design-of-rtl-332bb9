// biquad_mac: one second-order filter section built around a single
// multiply-accumulate unit.
//
// Computes y[n] = b0 x[n] + b1 x[n-1] + b2 x[n-2] - a1 y[n-1] - a2 y[n-2]
// (direct form I) on DATA_W-bit signed words. The caller supplies the
// three x taps; the section keeps its own two past outputs. On in_valid the taps are latched and the MAC
// runs one product per cycle for five cycles, then the sum is rounded to
// nearest, shifted down by COEF_FRAC and saturated to DATA_W bits.
// out_valid pulses six cycles after in_valid with the new output on y.
// With a1 = a2 = 0 the section is an FIR section. Coefficients are signed
// fixed point with COEF_FRAC fraction bits. A new in_valid while the section
// is busy is a protocol error (flagged by an assertion); at 256 sps the
// input arrives hundreds of cycles apart.
// Building the filter from cascaded MAC units follows the published design;
// the direct-form-I structure, word lengths and rounding are this
// implementation's choices.
module biquad_mac #(
  parameter int DATA_W    = cpsd_pkg::FILT_W,
  parameter int COEF_W    = cpsd_pkg::COEF_W,
  parameter int COEF_FRAC = cpsd_pkg::COEF_FRAC
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic signed [DATA_W-1:0] x_taps [3],
  input  logic signed [COEF_W-1:0]   coef   [5],   // b0 b1 b2 a1 a2
  output logic                       out_valid,
  output logic signed [DATA_W-1:0] y
);

  localparam int ACC_W = DATA_W + COEF_W + 3;
  localparam logic signed [ACC_W-1:0] YMAX = ACC_W'((1 << (DATA_W-1)) - 1);
  localparam logic signed [ACC_W-1:0] YMIN = -ACC_W'(1 << (DATA_W-1));

  logic signed [DATA_W-1:0] x0, x1, x2, y1, y2;
  logic signed [ACC_W-1:0]    acc;
  logic [2:0]                 tap;
  logic                       busy;

  // Operand and coefficient of the current tap
  logic signed [DATA_W-1:0]        op;
  logic signed [COEF_W-1:0]          cf;
  logic signed [DATA_W+COEF_W-1:0] prod;
  always_comb begin
    unique case (tap)
      3'd0:    begin op = x0; cf = coef[0]; end
      3'd1:    begin op = x1; cf = coef[1]; end
      3'd2:    begin op = x2; cf = coef[2]; end
      3'd3:    begin op = y1; cf = coef[3]; end
      default: begin op = y2; cf = coef[4]; end
    endcase
    prod = op * cf;
  end

  // Rounded, scaled and saturated result
  logic signed [ACC_W-1:0] rounded;
  logic signed [DATA_W-1:0] y_sat;
  always_comb begin
    rounded = (acc + ACC_W'(1 << (COEF_FRAC-1))) >>> COEF_FRAC;
    if (rounded > YMAX)      y_sat = YMAX[DATA_W-1:0];
    else if (rounded < YMIN) y_sat = YMIN[DATA_W-1:0];
    else                     y_sat = rounded[DATA_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {x0, x1, x2, y1, y2} <= '0;
      acc       <= '0;
      tap       <= '0;
      busy      <= 1'b0;
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid && !busy) begin
        x0   <= x_taps[0];
        x1   <= x_taps[1];
        x2   <= x_taps[2];
        acc  <= '0;
        tap  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        if (tap < 3'd5) begin
          // feed-forward taps add, feedback taps subtract
          if (tap < 3'd3) acc <= acc + ACC_W'(prod);
          else            acc <= acc - ACC_W'(prod);
          tap <= tap + 3'd1;
        end else begin
          y         <= y_sat;
          y2        <= y1;
          y1        <= y_sat;
          out_valid <= 1'b1;
          busy      <= 1'b0;
        end
      end
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> !busy)
    else $error("biquad_mac: new sample while the section is busy");

endmodule
