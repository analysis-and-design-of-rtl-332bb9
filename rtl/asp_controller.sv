// asp_controller: FSM-based controller of the CPSD processor.
//
// Sequences the phase matrix constructer (pmc), the difference accumulator
// (dacc) and the CPSD calculator (calc) over the two operating phases.
// It counts the filtered samples written since the last build started
// (buf_written) and always works on the newest W samples of the buffer,
// which start at wr_ptr - W.
//
// Training phase (after reset, after a host retrain request, and every
// ref_period CPSD outputs):
//   WAIT_CAND   wait for W new samples, then build the candidate matrix
//               into the reference SRAM, measuring M on it (BUILD_CAND);
//   WAIT_CHECK  wait for the next W samples, build the check matrix into
//               the current SRAM with the candidate's M (BUILD_CHECK) and
//               count the differing cells (DIFF_CHECK);
//   if CV < h (Eq. 8) the candidate becomes the reference and that CV
//   becomes CV_1 (at least 1); otherwise the window just checked becomes
//   the new candidate (rebuilt with its own M) and training goes on.
// On-line phase: every sps new samples (one second) build the current
// matrix (BUILD_CUR), compare it with the reference and divide by CV_1
// (DIFF_CUR); cpsd_valid pulses with the result. After ref_period outputs
// the window just used becomes a new candidate and training restarts.
// A retrain request is held until the FSM next waits for samples.
// Event pulses (train_pass, train_fail, ref_refresh) report the decisions.
// The two phases, Eq. 8, the one-second output rate and the 30 s refresh
// follow the published design; the exact state sequence, the choice of the
// newest window and the reuse of the failed window are this
// implementation's choices.
module asp_controller
  import cpsd_pkg::*;
#(
  parameter int ADDR_W = cpsd_pkg::BUF_AW
) (
  input  logic                clk,
  input  logic                rst_n,
  input  asp_cfg_t            cfg,
  input  logic                retrain,
  input  logic                buf_written,
  input  logic [ADDR_W-1:0]   wr_ptr,
  // phase matrix constructer
  output logic                pmc_start,
  output logic                pmc_find_m,
  output pm_sel_e             pmc_target,
  output logic [ADDR_W-1:0]   pmc_base,
  output logic [SAMPLE_W-1:0] m_ref,
  input  logic                pmc_done,
  input  logic [SAMPLE_W-1:0] pmc_m_out,
  // difference accumulator and CPSD calculator
  output logic                dacc_start,
  output logic                calc_clear,
  output logic                calc_do_div,
  output logic [CV_W-1:0]     cv1,
  input  logic                calc_done,
  input  logic [CV_W-1:0]     calc_cv,
  // status
  output logic                online,
  output logic                cpsd_valid,
  output logic                train_pass,
  output logic                train_fail,
  output logic                ref_refresh
);

  typedef enum logic [2:0] {
    S_WAIT_CAND, S_BUILD_CAND, S_WAIT_CHECK, S_BUILD_CHECK, S_DIFF_CHECK,
    S_WAIT_TICK, S_BUILD_CUR, S_DIFF_CUR
  } state_e;
  state_e state;

  logic [ADDR_W:0]   since;       // samples written since the last build started
  logic [ADDR_W-1:0] last_base;   // start of the window built last
  logic [7:0]        age;         // CPSD outputs since the reference was set
  logic              retrain_pend;

  logic [ADDR_W-1:0] newest_base;
  assign newest_base = wr_ptr - cfg.win_len;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_WAIT_CAND;
      since        <= '0;
      last_base    <= '0;
      age          <= '0;
      retrain_pend <= 1'b0;
      pmc_start    <= 1'b0;
      pmc_find_m   <= 1'b0;
      pmc_target   <= PM_REF;
      pmc_base     <= '0;
      m_ref        <= SAMPLE_W'(1);
      dacc_start   <= 1'b0;
      calc_clear   <= 1'b0;
      calc_do_div  <= 1'b0;
      cv1          <= CV_W'(1);
      online       <= 1'b0;
      cpsd_valid   <= 1'b0;
      train_pass   <= 1'b0;
      train_fail   <= 1'b0;
      ref_refresh  <= 1'b0;
    end else begin
      pmc_start   <= 1'b0;
      dacc_start  <= 1'b0;
      calc_clear  <= 1'b0;
      cpsd_valid  <= 1'b0;
      train_pass  <= 1'b0;
      train_fail  <= 1'b0;
      ref_refresh <= 1'b0;
      if (buf_written && since != '1) since <= since + 1'b1;
      if (retrain) retrain_pend <= 1'b1;

      unique case (state)
        S_WAIT_CAND, S_WAIT_CHECK, S_WAIT_TICK: begin
          if (retrain_pend || retrain) begin
            // restart training; samples already in the buffer count
            retrain_pend <= 1'b0;
            online       <= 1'b0;
            state        <= S_WAIT_CAND;
            if (state != S_WAIT_CAND) since <= '0;
          end else if (state == S_WAIT_CAND && since >= {1'b0, cfg.win_len}) begin
            pmc_start  <= 1'b1;
            pmc_find_m <= 1'b1;
            pmc_target <= PM_REF;
            pmc_base   <= newest_base;
            last_base  <= newest_base;
            since      <= {{ADDR_W{1'b0}}, buf_written};
            state      <= S_BUILD_CAND;
          end else if (state == S_WAIT_CHECK && since >= {1'b0, cfg.win_len}) begin
            pmc_start  <= 1'b1;
            pmc_find_m <= 1'b0;
            pmc_target <= PM_CUR;
            pmc_base   <= newest_base;
            last_base  <= newest_base;
            since      <= {{ADDR_W{1'b0}}, buf_written};
            state      <= S_BUILD_CHECK;
          end else if (state == S_WAIT_TICK && since >= {1'b0, cfg.sps}) begin
            pmc_start  <= 1'b1;
            pmc_find_m <= 1'b0;
            pmc_target <= PM_CUR;
            pmc_base   <= newest_base;
            last_base  <= newest_base;
            since      <= {{ADDR_W{1'b0}}, buf_written};
            state      <= S_BUILD_CUR;
          end
        end
        S_BUILD_CAND: if (pmc_done) begin
          m_ref <= pmc_m_out;
          state <= S_WAIT_CHECK;
        end
        S_BUILD_CHECK, S_BUILD_CUR: if (pmc_done) begin
          dacc_start  <= 1'b1;
          calc_clear  <= 1'b1;
          calc_do_div <= (state == S_BUILD_CUR);
          state       <= (state == S_BUILD_CUR) ? S_DIFF_CUR : S_DIFF_CHECK;
        end
        S_DIFF_CHECK: if (calc_done) begin
          if (calc_cv < cfg.thresh_h) begin
            // Eq. 8 holds: the candidate becomes the reference
            cv1        <= (calc_cv == '0) ? CV_W'(1) : calc_cv;
            online     <= 1'b1;
            age        <= '0;
            train_pass <= 1'b1;
            state      <= S_WAIT_TICK;
          end else begin
            // the window just checked becomes the next candidate
            train_fail <= 1'b1;
            pmc_start  <= 1'b1;
            pmc_find_m <= 1'b1;
            pmc_target <= PM_REF;
            pmc_base   <= last_base;
            state      <= S_BUILD_CAND;
          end
        end
        S_DIFF_CUR: if (calc_done) begin
          cpsd_valid <= 1'b1;
          if (age + 8'd1 >= cfg.ref_period) begin
            // periodic reference refresh: current window is the candidate
            ref_refresh <= 1'b1;
            online      <= 1'b0;
            pmc_start   <= 1'b1;
            pmc_find_m  <= 1'b1;
            pmc_target  <= PM_REF;
            pmc_base    <= last_base;
            state       <= S_BUILD_CAND;
          end else begin
            age   <= age + 8'd1;
            state <= S_WAIT_TICK;
          end
        end
        default: state <= S_WAIT_CAND;
      endcase
    end
  end

endmodule
