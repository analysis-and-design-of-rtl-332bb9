// pm_diff_regs: delay registers for the phase-matrix difference stream.
//
// A DEPTH-stage register pipeline that carries the difference cells
// (valid, value, last flag) from the difference accumulator to the CPSD
// calculator, separating the two pipeline stages. Each item leaves DEPTH
// cycles after it enters; valid bits reset to zero.
// The block is named in the published block diagram; its depth is this
// implementation's choice.
module pm_diff_regs #(
  parameter int W     = cpsd_pkg::PM_CNT_W,
  parameter int DEPTH = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_diff,
  input  logic         in_last,
  output logic         out_valid,
  output logic [W-1:0] out_diff,
  output logic         out_last
);

  logic [W-1:0] d_q [DEPTH];
  logic         v_q [DEPTH];
  logic         l_q [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) begin
        d_q[i] <= '0;
        v_q[i] <= 1'b0;
        l_q[i] <= 1'b0;
      end
    end else begin
      d_q[0] <= in_diff;
      v_q[0] <= in_valid;
      l_q[0] <= in_valid && in_last;
      for (int i = 1; i < DEPTH; i++) begin
        d_q[i] <= d_q[i-1];
        v_q[i] <= v_q[i-1];
        l_q[i] <= l_q[i-1];
      end
    end
  end

  assign out_valid = v_q[DEPTH-1];
  assign out_diff  = d_q[DEPTH-1];
  assign out_last  = l_q[DEPTH-1];

endmodule
