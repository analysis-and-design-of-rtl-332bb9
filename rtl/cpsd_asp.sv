// cpsd_asp: on-sensor processor that turns an ECG sample stream into one
// CPSD (Chaotic Phase Space Differential) value per second.
//
// Data flow (four pipelines):
//   1. adc samples -> raw_delay_regs -> ecg_filter (cascaded biquad MACs)
//      -> filt_buffer (circular SRAM, last 8 s of filtered samples);
//   2. pm_constructer scans the newest W samples, quantizes the phase
//      vectors (s[k], s[k+d]) to 0..L and counts them into the reference
//      or the current phase-matrix SRAM (pm_sram x 2);
//   3. diff_accumulator streams |current - reference| cell by cell;
//   4. pm_diff_regs -> cpsd_calculator counts the non-zero cells (CV) and
//      divides by CV_1, the CV accepted at the end of training.
// asp_controller runs training (find a stable reference window, Eq. 8)
// and then the on-line phase (one CPSD per sps samples, reference refresh
// every ref_period outputs). asp_bus_if is the Wishbone slave through which
// a host processor sets the coefficients and parameters and reads the
// results; irq signals a new CPSD value. The host compares CPSD with its
// own thresholds to call a rhythm normal, AF or VF.
// Interface: adc_valid strobes one signed SAMPLE_W-bit sample (256 per
// second in use); with the default sizes the processor needs about 4,600
// clock cycles of matrix work and 7,700 of filtering per second of ECG,
// about 12,300 in all, so a 100 kHz clock is ample.
// Samples must be at least 32 cycles apart (filter latency).
// The block structure follows the published processor; sizes not given
// there (matrix, counts, filter word lengths, register map) are this
// implementation's choices and are listed in cpsd_pkg.
module cpsd_asp
  import cpsd_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  // ADC
  input  logic                       adc_valid,
  input  logic signed [SAMPLE_W-1:0] adc_data,
  // Wishbone slave
  input  logic                       wb_cyc_i,
  input  logic                       wb_stb_i,
  input  logic                       wb_we_i,
  input  logic [7:0]                 wb_adr_i,
  input  logic [31:0]                wb_dat_i,
  output logic [31:0]                wb_dat_o,
  output logic                       wb_ack_o,
  output logic                       irq
);

  localparam int PAW   = 2*PM_QW;
  localparam int SUM_W = PM_CNT_W + PAW;

  // ---------------------------------------------------------------- bus
  asp_cfg_t                   cfg;
  logic signed [COEF_W-1:0]   coef [NUM_SEC][5];
  logic                       retrain;
  logic                       online, cpsd_valid;
  logic [CPSD_W-1:0]          cpsd;
  logic [CV_W-1:0]            cv, cv1;
  logic [SUM_W-1:0]           diff_sum;
  logic [SAMPLE_W-1:0]        m_ref;

  // ------------------------------------------------ pipeline 1: filter
  logic signed [SAMPLE_W-1:0] raw_taps [3];
  logic                       raw_valid;
  logic                       filt_valid;
  logic signed [SAMPLE_W-1:0] filt_sample;

  raw_delay_regs #(.SAMPLE_W(SAMPLE_W), .DEPTH(3)) u_dr (
    .clk, .rst_n,
    .sample_valid(adc_valid),
    .sample      (adc_data),
    .taps        (raw_taps),
    .taps_valid  (raw_valid)
  );

  ecg_filter #(.SAMPLE_W(SAMPLE_W), .NUM_SEC(NUM_SEC), .COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC)) u_filter (
    .clk, .rst_n,
    .in_valid  (raw_valid),
    .x_taps    (raw_taps),
    .coef      (coef),
    .out_valid (filt_valid),
    .out_sample(filt_sample)
  );

  logic [BUF_AW-1:0]          wr_ptr;
  logic                       buf_full;
  logic                       buf_rd_en;
  logic [BUF_AW-1:0]          buf_rd_addr;
  logic signed [SAMPLE_W-1:0] buf_rd_data;

  filt_buffer #(.SAMPLE_W(SAMPLE_W), .DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n,
    .wr_en  (filt_valid),
    .wr_data(filt_sample),
    .wr_ptr (wr_ptr),
    .full   (buf_full),
    .rd_en  (buf_rd_en),
    .rd_addr(buf_rd_addr),
    .rd_data(buf_rd_data)
  );

  // ------------------------------------------------------- controller
  logic                pmc_start, pmc_find_m, pmc_done, pmc_busy;
  pm_sel_e             pmc_target;
  logic [BUF_AW-1:0]   pmc_base;
  logic [SAMPLE_W-1:0] pmc_m_out;
  logic                dacc_start, calc_clear, calc_do_div, calc_done;
  logic                train_pass, train_fail, ref_refresh;

  asp_controller #(.ADDR_W(BUF_AW)) u_ctrl (
    .clk, .rst_n,
    .cfg, .retrain,
    .buf_written(filt_valid),
    .wr_ptr,
    .pmc_start, .pmc_find_m, .pmc_target, .pmc_base,
    .m_ref,
    .pmc_done, .pmc_m_out,
    .dacc_start, .calc_clear, .calc_do_div,
    .cv1,
    .calc_done,
    .calc_cv(cv),
    .online, .cpsd_valid, .train_pass, .train_fail, .ref_refresh
  );

  // ----------------------------------- pipeline 2: phase matrix builder
  logic                pm_re, pm_we;
  logic [PAW-1:0]      pm_raddr, pm_waddr;
  logic [PM_CNT_W-1:0] pm_rdata, pm_wdata;

  pm_constructer #(.SAMPLE_W(SAMPLE_W), .ADDR_W(BUF_AW), .QW(PM_QW), .CNT_W(PM_CNT_W)) u_pmc (
    .clk, .rst_n,
    .start      (pmc_start),
    .find_m     (pmc_find_m),
    .m_in       (m_ref),
    .base       (pmc_base),
    .win_len    (cfg.win_len),
    .delay_d    (cfg.delay_d),
    .levels     (cfg.levels),
    .busy       (pmc_busy),
    .done       (pmc_done),
    .m_out      (pmc_m_out),
    .buf_rd_en, .buf_rd_addr, .buf_rd_data,
    .pm_re, .pm_raddr, .pm_rdata,
    .pm_we, .pm_waddr, .pm_wdata
  );

  // the build writes one of the two matrices; the other one is left alone
  logic                ref_rb_re, cur_rb_re;
  logic [PAW-1:0]      ref_rb_addr, cur_rb_addr;
  logic [PM_CNT_W-1:0] ref_rdata, cur_rdata, ref_rb_data, cur_rb_data;

  pm_sram #(.QW(PM_QW), .CNT_W(PM_CNT_W)) u_ref_pm (
    .clk,
    .we     (pm_we && pmc_target == PM_REF),
    .waddr  (pm_waddr),
    .wdata  (pm_wdata),
    .re     (pm_re && pmc_target == PM_REF),
    .raddr  (pm_raddr),
    .rdata  (ref_rdata),
    .re_b   (ref_rb_re),
    .raddr_b(ref_rb_addr),
    .rdata_b(ref_rb_data)
  );

  pm_sram #(.QW(PM_QW), .CNT_W(PM_CNT_W)) u_cur_pm (
    .clk,
    .we     (pm_we && pmc_target == PM_CUR),
    .waddr  (pm_waddr),
    .wdata  (pm_wdata),
    .re     (pm_re && pmc_target == PM_CUR),
    .raddr  (pm_raddr),
    .rdata  (cur_rdata),
    .re_b   (cur_rb_re),
    .raddr_b(cur_rb_addr),
    .rdata_b(cur_rb_data)
  );

  assign pm_rdata = (pmc_target == PM_REF) ? ref_rdata : cur_rdata;

  // ------------------------------------ pipeline 3: difference accumulator
  logic                dacc_busy, dacc_done;
  logic                d_valid, d_last;
  logic [PM_CNT_W-1:0] d_val;

  diff_accumulator #(.QW(PM_QW), .CNT_W(PM_CNT_W)) u_dacc (
    .clk, .rst_n,
    .start     (dacc_start),
    .busy      (dacc_busy),
    .done      (dacc_done),
    .ref_re    (ref_rb_re),
    .ref_raddr (ref_rb_addr),
    .ref_rdata (ref_rb_data),
    .cur_re    (cur_rb_re),
    .cur_raddr (cur_rb_addr),
    .cur_rdata (cur_rb_data),
    .diff_valid(d_valid),
    .diff      (d_val),
    .diff_last (d_last),
    .diff_sum  (diff_sum)
  );

  // ------------------------------------------ pipeline 4: CPSD calculator
  logic                q_valid, q_last;
  logic [PM_CNT_W-1:0] q_val;
  logic                calc_busy;

  pm_diff_regs #(.W(PM_CNT_W), .DEPTH(2)) u_diff_dr (
    .clk, .rst_n,
    .in_valid (d_valid),
    .in_diff  (d_val),
    .in_last  (d_last),
    .out_valid(q_valid),
    .out_diff (q_val),
    .out_last (q_last)
  );

  cpsd_calculator #(.CNT_W(PM_CNT_W), .CV_W(CV_W), .FRAC(CPSD_FRAC)) u_calc (
    .clk, .rst_n,
    .clear     (calc_clear),
    .do_div    (calc_do_div),
    .cv1       (cv1),
    .diff_valid(q_valid),
    .diff      (q_val),
    .diff_last (q_last),
    .cv        (cv),
    .cpsd      (cpsd),
    .busy      (calc_busy),
    .done      (calc_done)
  );

  // ---------------------------------------------------------------- bus
  asp_bus_if #(.NSEC(NUM_SEC)) u_bus (
    .clk, .rst_n,
    .wb_cyc_i, .wb_stb_i, .wb_we_i, .wb_adr_i, .wb_dat_i, .wb_dat_o, .wb_ack_o,
    .cfg, .coef, .retrain, .irq,
    .online, .cpsd_valid, .cpsd, .cv, .cv1, .diff_sum,
    .filt_valid, .filt_sample, .m_ref,
    .train_fail, .train_pass, .ref_refresh
  );

  // A build must not start while the previous one still runs
  a_pmc_idle: assert property (@(posedge clk) disable iff (!rst_n) pmc_start |-> !pmc_busy)
    else $error("cpsd_asp: phase matrix build started while busy");

endmodule
