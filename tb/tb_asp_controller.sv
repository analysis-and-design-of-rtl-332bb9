// tb_asp_controller: self-checking test of the processor's controller FSM.
// The data path is replaced by responders: a build finishes 30 cycles
// after pmc_start, a comparison 20 cycles after dacc_start, returning CVs
// from a script. Samples arrive every 20 cycles. With W = 64, one second
// = 16 samples, h = 10 and a refresh every 3 outputs, the script makes
// training fail once (CV 50), pass (CV 4 -> CV_1 = 4), gives three on-line
// outputs, refreshes the reference (pass with CV 0 -> CV_1 = 1), gives one
// output and is then sent back to training by a host request. Every build
// is checked: its kind (M measured or not, target matrix), its window base
// (newest W samples, or the window just used) and the number of samples
// written since the previous new window was started (W in training, one
// second on-line, W after a retrain request).
module tb_asp_controller;
  import cpsd_pkg::*;
  localparam int AW = BUF_AW;
  logic clk = 0, rst_n = 0;
  asp_cfg_t cfg;
  logic retrain = 0, buf_written = 0;
  logic [AW-1:0] wr_ptr = '0;
  logic pmc_start, pmc_find_m, pmc_done = 0;
  pm_sel_e pmc_target;
  logic [AW-1:0] pmc_base;
  logic [SAMPLE_W-1:0] m_ref, pmc_m_out = '0;
  logic dacc_start, calc_clear, calc_do_div, calc_done = 0;
  logic [CV_W-1:0] cv1, calc_cv = '0;
  logic online, cpsd_valid, train_pass, train_fail, ref_refresh;
  int checks = 0, failures = 0;

  asp_controller #(.ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // sample source
  int written = 0;
  initial begin
    @(posedge rst_n);
    forever begin
      repeat (19) @(negedge clk);
      buf_written = 1;
      @(negedge clk);
      buf_written = 0;
      wr_ptr = wr_ptr + 1'b1;
      written++;
    end
  end

  // expected builds: {find_m, target, samples since previous start (-1: any), same base as before}
  typedef struct { bit fm; pm_sel_e tgt; int since; bit same_base; } exp_t;
  exp_t exp_q [$];
  int cv_script [$] = '{50, 4, 20, 30, 40, 0, 12};
  int last_start = 0;
  int retrain_at = -1;
  logic [AW-1:0] last_base = '0;
  int n_out = 0, n_pass = 0, n_fail = 0, n_refresh = 0;

  // build responder and checker
  always @(negedge clk) if (rst_n && pmc_start) begin
    exp_t e;
    e = '{0, PM_REF, -1, 0};
    check(exp_q.size() > 0, "unexpected build");
    if (exp_q.size() > 0) begin
      e = exp_q.pop_front();
      check(pmc_find_m == e.fm && pmc_target == e.tgt,
            $sformatf("build kind find_m=%0d target=%0d", pmc_find_m, pmc_target));
      if (e.since >= 0)
        check(written - last_start == e.since, $sformatf("build after %0d samples, %0d expected", written - last_start, e.since));
      if (e.same_base) check(pmc_base == last_base, "rebuild of the window just used");
      else             check(pmc_base == wr_ptr - cfg.win_len, "newest window");
    end
    // a rebuild of the same window does not restart the sample count
    if (!e.same_base) last_start = written;
    if (retrain_at >= 0) begin
      check(written - retrain_at == 64, $sformatf("candidate %0d samples after the retrain request", written - retrain_at));
      retrain_at = -1;
    end
    last_base  = pmc_base;
    fork begin
      repeat (30) @(negedge clk);
      pmc_m_out = 10'd77;
      pmc_done = 1;
      @(negedge clk);
      pmc_done = 0;
    end join_none
  end

  // comparison responder
  always @(negedge clk) if (rst_n && dacc_start) begin
    check(calc_clear, "calculator cleared with the comparison start");
    fork begin
      repeat (20) @(negedge clk);
      calc_cv = CV_W'(cv_script.pop_front());
      calc_done = 1;
      @(negedge clk);
      calc_done = 0;
    end join_none
  end

  always @(negedge clk) if (rst_n) begin
    if (cpsd_valid) begin
      n_out++;
      check(calc_do_div, "on-line comparison divides");
    end
    if (train_pass) n_pass++;
    if (train_fail) n_fail++;
    if (ref_refresh) n_refresh++;
  end

  initial begin
    cfg.win_len = 11'd64; cfg.delay_d = 11'd2; cfg.thresh_h = 9'd10;
    cfg.sps = 11'd16; cfg.ref_period = 8'd3; cfg.levels = 4'd15;
    // training: candidate, check (fail) -> rebuild candidate, check (pass)
    exp_q.push_back('{1, PM_REF, 64, 0});
    exp_q.push_back('{0, PM_CUR, 64, 0});
    exp_q.push_back('{1, PM_REF, -1, 1});
    exp_q.push_back('{0, PM_CUR, 64, 0});
    // three on-line outputs, then refresh from the last window
    exp_q.push_back('{0, PM_CUR, 16, 0});
    exp_q.push_back('{0, PM_CUR, 16, 0});
    exp_q.push_back('{0, PM_CUR, 16, 0});
    exp_q.push_back('{1, PM_REF, -1, 1});
    exp_q.push_back('{0, PM_CUR, 64, 0});
    // one output, then host retrain: a fresh candidate after W samples
    exp_q.push_back('{0, PM_CUR, 16, 0});
    exp_q.push_back('{1, PM_REF, -1, 0});
    repeat (3) @(posedge clk);
    rst_n = 1;
    // through the first pass
    wait (n_pass == 1);
    @(negedge clk);
    check(online && cv1 == 4, $sformatf("on-line with CV_1 = %0d", cv1));
    check(m_ref == 77, "M of the candidate kept");
    wait (n_refresh == 1);
    @(negedge clk);
    check(!online, "training during refresh");
    check(n_out == 3, $sformatf("%0d outputs before refresh", n_out));
    wait (n_pass == 2);
    @(negedge clk);
    check(online && cv1 == 1, "CV_1 of 0 taken as 1");
    wait (n_out == 4);
    repeat (8 * 20) @(negedge clk);
    retrain = 1;
    retrain_at = written;
    @(negedge clk);
    retrain = 0;
    @(negedge clk);
    check(!online, "host retrain leaves the on-line phase");
    wait (exp_q.size() == 0);
    repeat (100) @(negedge clk);
    check(n_fail == 1 && n_pass == 2 && n_out == 4 && n_refresh == 1,
          $sformatf("events fail %0d pass %0d out %0d refresh %0d", n_fail, n_pass, n_out, n_refresh));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
