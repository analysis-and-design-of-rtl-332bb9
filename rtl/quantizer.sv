// quantizer: the amplitude quantizer of the phase-space construction.
//
// Maps a signed sample s to a level q in 0..L with
//     q = floor(((s' + M) * L + M) / (2M)),   s' = s saturated to [-M, M]
// where M is the largest magnitude in the reference window. Because s' lies
// in [-M, M] the quotient never exceeds L, which fits in QW bits, so the
// division is a QW-step restoring division, done combinationally (one
// cycle at the processor's low clock rate). M must be at least 1.
// The formula and the saturation follow the published algorithm; the
// divider structure is this implementation's choice.
module quantizer #(
  parameter int SAMPLE_W = cpsd_pkg::SAMPLE_W,
  parameter int QW       = cpsd_pkg::PM_QW
) (
  input  logic signed [SAMPLE_W-1:0] s,
  input  logic        [SAMPLE_W-1:0] m,       // M, unsigned, >= 1
  input  logic        [QW-1:0]       levels,  // L
  output logic        [QW-1:0]       q
);

  // (s' + M) <= 2M < 2^(SAMPLE_W+1); times L < 2^QW; plus M
  localparam int NW = SAMPLE_W + QW + 2;

  logic signed [SAMPLE_W+1:0] sx, mx, sat;
  logic [NW-1:0] num, den, rem;

  always_comb begin
    sx = (SAMPLE_W+2)'(s);
    mx = (SAMPLE_W+2)'(m);
    if (sx > mx)       sat = mx;
    else if (sx < -mx) sat = -mx;
    else               sat = sx;
    num = NW'(unsigned'(sat + mx)) * NW'(levels) + NW'(m);
    den = NW'(m) << 1;
    rem = num;
    q   = '0;
    for (int i = QW-1; i >= 0; i--) begin
      if (rem >= (den << i)) begin
        rem  = rem - (den << i);
        q[i] = 1'b1;
      end
    end
  end

endmodule
