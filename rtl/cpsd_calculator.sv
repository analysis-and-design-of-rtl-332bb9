// cpsd_calculator: complexity value and CPSD value.
//
// Counts the non-zero cells of the difference-matrix stream: that count is
// the complexity value CV (Eq. 6). clear (one cycle, before the stream)
// zeroes the count and records do_div. On the cell flagged last the count
// is final: it appears on cv, and
//   - with do_div = 0 (training) done pulses on the next cycle;
//   - with do_div = 1 (on-line) a restoring divider computes
//     cpsd = floor(CV * 2^FRAC / CV_1) (Eq. 7, FRAC fraction bits), one
//     quotient bit per cycle, and done pulses CV_W + FRAC + 1 cycles after
//     the last cell (18 cycles by default).
// cv1 must be at least 1 and is read when the division starts.
// Eqs. 6 and 7 follow the published algorithm; the fixed-point format and
// the divider are this implementation's choices.
module cpsd_calculator #(
  parameter int CNT_W = cpsd_pkg::PM_CNT_W,
  parameter int CV_W  = cpsd_pkg::CV_W,
  parameter int FRAC  = cpsd_pkg::CPSD_FRAC,
  localparam int Q_W  = CV_W + FRAC
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             do_div,
  input  logic [CV_W-1:0]  cv1,
  input  logic             diff_valid,
  input  logic [CNT_W-1:0] diff,
  input  logic             diff_last,
  output logic [CV_W-1:0]  cv,
  output logic [Q_W-1:0]   cpsd,
  output logic             busy,
  output logic             done
);

  logic [CV_W-1:0] cnt;
  logic            div_mode, dividing;
  logic [Q_W-1:0]  num;      // dividend bits still to shift in, MSB first
  logic [CV_W-1:0] rem;
  logic [CV_W-1:0] den;
  logic [$clog2(Q_W+1)-1:0] steps;

  logic [CV_W:0]   rem_sh;
  assign rem_sh = {rem, num[Q_W-1]};
  assign busy   = dividing;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      cv       <= '0;
      cpsd     <= '0;
      div_mode <= 1'b0;
      dividing <= 1'b0;
      num      <= '0;
      rem      <= '0;
      den      <= '0;
      steps    <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (clear) begin
        cnt      <= '0;
        div_mode <= do_div;
        dividing <= 1'b0;
      end else if (diff_valid) begin
        logic [CV_W-1:0] c_next;
        c_next = cnt + CV_W'(diff != '0);
        cnt    <= c_next;
        if (diff_last) begin
          cv <= c_next;
          if (div_mode) begin
            dividing <= 1'b1;
            num      <= Q_W'(c_next) << FRAC;
            rem      <= '0;
            den      <= (cv1 == '0) ? CV_W'(1) : cv1;
            steps    <= '0;
          end else begin
            done <= 1'b1;
          end
        end
      end else if (dividing) begin
        // one restoring-division step per cycle
        if (rem_sh >= {1'b0, den}) begin
          rem <= CV_W'(rem_sh - {1'b0, den});
          num <= {num[Q_W-2:0], 1'b1};
        end else begin
          rem <= CV_W'(rem_sh);
          num <= {num[Q_W-2:0], 1'b0};
        end
        steps <= steps + 1'b1;
        if (steps == ($clog2(Q_W+1))'(Q_W - 1)) begin
          dividing <= 1'b0;
          done     <= 1'b1;
          cpsd     <= (rem_sh >= {1'b0, den}) ? {num[Q_W-2:0], 1'b1} : {num[Q_W-2:0], 1'b0};
        end
      end
    end
  end

endmodule
