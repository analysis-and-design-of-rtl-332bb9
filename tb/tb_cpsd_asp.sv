// tb_cpsd_asp: end-to-end test of the CPSD processor at its default sizes.
// A host model programs the four filter sections over Wishbone (1-100 Hz
// band pass as a 1 Hz high pass and a 100 Hz low pass, notches at 60 Hz
// and 120 Hz, computed here and quantized to Q2.16) and then serves the
// interrupt: on each irq it reads CPSD and CV over the bus.
// The ECG source is synthetic, 256 samples/s, one sample every 100 clock
// cycles: 4 s of noise, normal beats (75 per minute, with baseline wander
// and 60 Hz hum), a ventricular-fibrillation-like stretch from 20 s to
// 30 s, normal beats, a ventricular-tachycardia-like stretch (wide regular
// complexes, 3.2 per second) from 36 s to 41 s, normal beats again, and
// from 59 s every third beat premature (0.25 s early) and wide, 70 s in
// all. The host forces retraining once, at about 50 s.
// A reference model written here (filter arithmetic, circular window,
// Eq. 3 quantization with saturation, matrix counts, CV, Eq. 8 training,
// CPSD = CV * 256 / CV_1, 30-output refresh) predicts every filtered
// sample and every CPSD and CV value; they must match exactly. It also
// checks the one-CPSD-per-second rate and that the fibrillation,
// tachycardia and premature-beat stretches raise CPSD above the normal
// level, and counts each mechanism:
// rejected candidate, accepted reference, CPSD output, periodic refresh,
// host retrain, saturation of current samples to [-M, M], interrupt.
// A mechanism that never happens counts as a failure.
module tb_cpsd_asp;
  import cpsd_pkg::*;
  localparam int SPACING = 100;        // clock cycles per sample
  localparam int SECONDS = 70;
  localparam real PI = 3.14159265358979;
  localparam int G = FILT_GUARD;
  localparam int W = DEF_WIN, D = DEF_DELAY, L = DEF_LEVELS;
  localparam int H = DEF_THRESH_H, SPS = FS, PERIOD = DEF_REF_PERIOD;

  logic clk = 0, rst_n = 0;
  logic adc_valid = 0;
  logic signed [SAMPLE_W-1:0] adc_data = '0;
  logic wb_cyc_i = 0, wb_stb_i = 0, wb_we_i = 0, wb_ack_o, irq;
  logic [7:0] wb_adr_i = '0;
  logic [31:0] wb_dat_i = '0, wb_dat_o;
  int checks = 0, failures = 0;

  cpsd_asp dut (.*);

  always #5 clk = ~clk;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------ bus master
  task automatic wb(input bit we, input logic [7:0] a, input logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk);
    wb_cyc_i = 1; wb_stb_i = 1; wb_we_i = we; wb_adr_i = a; wb_dat_i = wd;
    do @(posedge clk); while (!wb_ack_o);
    #1 rd = wb_dat_o;
    @(negedge clk);
    wb_cyc_i = 0; wb_stb_i = 0; wb_we_i = 0;
  endtask

  // ------------------------------------------------------------ filter model
  longint cq [NUM_SEC][5];
  longint mx [NUM_SEC][3];
  longint my [NUM_SEC][2];

  function automatic longint qc(input real v);
    return longint'($floor(v * (1 << COEF_FRAC) + 0.5));
  endfunction

  task automatic set_section(input int s, input int kind, input real f0, input real q);
    real w, al, cw, a0, b0, b1, b2, a1, a2;
    w  = 2.0 * PI * f0 / real'(FS);
    cw = $cos(w);
    al = $sin(w) / (2.0 * q);
    a0 = 1.0 + al; a1 = -2.0 * cw; a2 = 1.0 - al;
    case (kind)
      0: begin b0 = (1.0 + cw) / 2.0; b1 = -(1.0 + cw); b2 = b0; end
      1: begin b0 = (1.0 - cw) / 2.0; b1 = 1.0 - cw;    b2 = b0; end
      default: begin b0 = 1.0; b1 = -2.0 * cw; b2 = 1.0; end
    endcase
    cq[s][0] = qc(b0 / a0); cq[s][1] = qc(b1 / a0); cq[s][2] = qc(b2 / a0);
    cq[s][3] = qc(a1 / a0); cq[s][4] = qc(a2 / a0);
  endtask

  function automatic longint sat(input longint v, input int w);
    longint lim;
    lim = longint'(1) << (w - 1);
    if (v > lim - 1) return lim - 1;
    if (v < -lim) return -lim;
    return v;
  endfunction

  function automatic int filt_step(input int x);
    longint v, acc;
    v = longint'(x) * (1 << G);
    for (int s = 0; s < NUM_SEC; s++) begin
      mx[s][2] = mx[s][1]; mx[s][1] = mx[s][0]; mx[s][0] = v;
      acc = cq[s][0] * mx[s][0] + cq[s][1] * mx[s][1] + cq[s][2] * mx[s][2]
          - cq[s][3] * my[s][0] - cq[s][4] * my[s][1];
      v = sat((acc + (1 << (COEF_FRAC - 1))) >>> COEF_FRAC, SAMPLE_W + G);
      my[s][1] = my[s][0]; my[s][0] = v;
    end
    return int'(sat((v + (1 << (G - 1))) >>> G, SAMPLE_W));
  endfunction

  // ------------------------------------------------------------ CPSD model
  int hist [$];                 // filtered samples
  int ref_pm [256], cur_pm [256];
  int m_ref_model = 1, cv1_model = 1, since = 0, age = 0;
  typedef enum {M_CAND, M_CHECK, M_TICK} mstate_e;
  mstate_e mstate = M_CAND;
  int exp_cpsd [$], exp_cv [$], exp_vf [$];
  int n_fail = 0, n_pass = 0, n_refresh = 0, n_sat = 0, n_retrain = 0;
  int sample_no = 0;
  int vf_start = 20 * FS, vf_end = 30 * FS;
  int vt_start = 36 * FS, vt_end = 41 * FS;
  int pvc_from = 59 * FS;  // windows from here on contain premature beats

  // class of the window [lo, hi): 1 entirely fibrillation, 3 entirely
  // tachycardia, 4 entirely in the stretch with premature beats, 0
  // entirely normal (at least 2 s after an episode), 2 mixed
  function automatic int win_class(input int lo, input int hi);
    if (lo >= vf_start && hi <= vf_end) return 1;
    if (lo >= vt_start && hi <= vt_end) return 3;
    if (lo >= pvc_from) return 4;
    if (hi > pvc_from) return 2;
    if ((hi <= vf_start || lo >= vf_end + 2 * FS) && (hi <= vt_start || lo >= vt_end + 2 * FS)) return 0;
    return 2;
  endfunction

  function automatic int quant(input int s, input int m);
    int v;
    v = (s > m) ? m : (s < -m) ? -m : s;
    return ((v + m) * L + m) / (2 * m);
  endfunction

  // build a matrix of the newest W samples; returns M used
  function automatic int build(input bit to_ref, input bit find_m, input int m_in);
    int b, m, x, y;
    int pm [256];
    b = hist.size() - W;
    m = m_in;
    if (find_m) begin
      m = 0;
      for (int k = 0; k < W; k++) begin
        int a;
        a = (hist[b + k] < 0) ? -hist[b + k] : hist[b + k];
        if (a > m) m = a;
      end
    end
    if (m == 0) m = 1;
    foreach (pm[i]) pm[i] = 0;
    for (int k = 0; k < W - D; k++) begin
      x = quant(hist[b + k], m);
      y = quant(hist[b + k + D], m);
      if (pm[x * 16 + y] < 1023) pm[x * 16 + y]++;
    end
    if (!find_m)
      for (int k = 0; k < W; k++)
        if (hist[b + k] > m || hist[b + k] < -m) n_sat++;
    if (to_ref) ref_pm = pm; else cur_pm = pm;
    return m;
  endfunction

  function automatic int cv_model();
    int c;
    c = 0;
    foreach (ref_pm[i]) if (ref_pm[i] != cur_pm[i]) c++;
    return c;
  endfunction

  function automatic void model_sample(input int f);
    int cv, dummy;
    hist.push_back(f);
    since++;
    case (mstate)
      M_CAND: if (since >= W) begin
        m_ref_model = build(1, 1, 0);
        since = 0;
        mstate = M_CHECK;
      end
      M_CHECK: if (since >= W) begin
        dummy = build(0, 0, m_ref_model);
        cv = cv_model();
        since = 0;
        $display("INFO %0d s: training check CV %0d", hist.size() / FS, cv);
        if (cv < H) begin
          cv1_model = (cv == 0) ? 1 : cv;
          mstate = M_TICK;
          age = 0;
          n_pass++;
        end else begin
          m_ref_model = build(1, 1, 0);
          n_fail++;
        end
      end
      M_TICK: if (since >= SPS) begin
        dummy = build(0, 0, m_ref_model);
        cv = cv_model();
        since = 0;
        exp_cv.push_back(cv);
        exp_cpsd.push_back((cv * 256) / cv1_model);
        exp_vf.push_back(win_class(hist.size() - W, hist.size()));
        age++;
        if (age >= PERIOD) begin
          m_ref_model = build(1, 1, 0);
          mstate = M_CHECK;
          n_refresh++;
        end
      end
      default: ;
    endcase
  endfunction

  // ------------------------------------------------------------ ECG source
  real next_beat = 0.3;
  real pvc_start = 58.5;     // premature beats after this time
  int n_beat = 0;
  bit is_pvc = 0;
  function automatic int ecg(input int n);
    real t, v, tb;
    t = real'(n) / real'(FS);
    if (n < 4 * FS) return $urandom_range(0, 400) - 200;
    v = 40.0 * $sin(2.0 * PI * 0.25 * t) + 20.0 * $sin(2.0 * PI * 60.0 * t);
    if (n >= vt_start && n < vt_end) begin
      // monomorphic tachycardia: wide regular complexes, 3.2 per second
      real ph;
      ph = 3.2 * t - $floor(3.2 * t);
      v += 220.0 * $sin(2.0 * PI * ph) * $exp(-ph * 2.0) - 40.0;
    end else if (n >= vf_start && n < vf_end) begin
      real f;
      f = 5.0 + 1.0 * $sin(2.0 * PI * 0.13 * t);
      v += (150.0 + 60.0 * $sin(2.0 * PI * 0.4 * t)) * $sin(2.0 * PI * f * t)
         + 60.0 * $sin(2.0 * PI * 2.3 * f * t + 1.0);
    end else begin
      if (t > next_beat + 0.5) begin
        next_beat += 0.8;
        n_beat++;
        // every third beat from 59 s on comes early and wide (premature
        // ventricular beat)
        is_pvc = next_beat > pvc_start && n_beat % 3 == 0;
        if (is_pvc) next_beat -= 0.25;
      end
      tb = t - next_beat;  // time from the R peak
      if (is_pvc) begin
        v += -180.0 * $exp(-((tb - 0.02) * (tb - 0.02)) / 0.0015)
             + 140.0 * $exp(-((tb - 0.09) * (tb - 0.09)) / 0.002)
             - 90.0 * $exp(-((tb - 0.30) * (tb - 0.30)) / 0.004);
        v += real'($urandom_range(0, 6)) - 3.0;
        return int'(v);
      end
      v += 30.0 * $exp(-((tb + 0.16) * (tb + 0.16)) / 0.0008);     // P
      v += 330.0 * $exp(-(tb * tb) / 0.00012);                      // R
      v -= 70.0 * $exp(-((tb - 0.03) * (tb - 0.03)) / 0.0002);      // S
      v += 80.0 * $exp(-((tb - 0.28) * (tb - 0.28)) / 0.003);       // T
    end
    v += real'($urandom_range(0, 6)) - 3.0;
    return int'(v);
  endfunction

  // ------------------------------------------------------------ main
  longint last_irq_cycle = -1;
  int n_irq = 0, n_rate = 0, n_out_seen = 0;
  real vf_sum = 0, nrm_sum = 0, vt_sum = 0, pvc_sum = 0;
  int vf_n = 0, nrm_n = 0, vt_n = 0, pvc_n = 0;
  bit irq_q = 0;
  bit retrain_sent = 0;
  bit restarted = 1;           // rate is checked only between outputs of one stretch

  initial begin
    logic [31:0] r;
    int f;
    set_section(0, 0, 1.0, 0.7071);
    set_section(1, 1, 100.0, 0.7071);
    set_section(2, 2, 60.0, 5.0);
    set_section(3, 2, 120.0, 5.0);
    for (int s = 0; s < NUM_SEC; s++) begin
      mx[s] = '{0, 0, 0};
      my[s] = '{0, 0};
    end
    repeat (5) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < NUM_SEC; s++)
      for (int t = 0; t < 5; t++)
        wb(1, 8'(8'h40 + 4 * (5 * s + t)), 32'(cq[s][t]), r);
    wb(0, 8'h10, 0, r); check(r == W, "default W");
    for (sample_no = 0; sample_no < SECONDS * FS; sample_no++) begin
      int x;
      x = ecg(sample_no);
      if (x > 511) x = 511;
      if (x < -512) x = -512;
      @(negedge clk);
      adc_data = SAMPLE_W'(x);
      adc_valid = 1;
      @(negedge clk);
      adc_valid = 0;
      f = filt_step(x);
      // the filtered sample reaches the buffer about 30 cycles later
      while (!dut.filt_valid) @(negedge clk);
      check(int'(dut.filt_sample) == f, $sformatf("filtered sample %0d: %0d vs %0d", sample_no, dut.filt_sample, f));
      model_sample(f);
      repeat (40) @(negedge clk);
      // host: serve the interrupt
      if (irq) begin
        n_irq++;
        if (!restarted) begin
          check(cycle - last_irq_cycle >= longint'(SPS * SPACING) - 1 &&
                cycle - last_irq_cycle <= longint'(SPS * SPACING) + 1,
                $sformatf("CPSD interval %0d cycles", cycle - last_irq_cycle));
          n_rate++;
        end
        restarted = 0;
        last_irq_cycle = cycle;
        wb(0, 8'h0C, 0, r);
        check(exp_cv.size() > 0, "unexpected CPSD output");
        if (exp_cv.size() > 0) begin
          int ecv, ecp, evf;
          ecv = exp_cv.pop_front();
          ecp = exp_cpsd.pop_front();
          evf = exp_vf.pop_front();
          check(int'(r[8:0]) == ecv, $sformatf("CV %0d vs %0d", r[8:0], ecv));
          check(int'(r[24:16]) == cv1_model, $sformatf("CV_1 %0d vs %0d", r[24:16], cv1_model));
          wb(0, 8'h08, 0, r);
          check(int'(r) == ecp, $sformatf("CPSD %0d vs %0d", r, ecp));
          n_out_seen++;
          $display("INFO %0d s: CPSD %0.2f (CV %0d)", sample_no / FS, real'(r) / 256.0, ecv);
          if (evf == 1) begin vf_sum += real'(r); vf_n++; end
          if (evf == 0) begin nrm_sum += real'(r); nrm_n++; end
          if (evf == 3) begin vt_sum += real'(r); vt_n++; end
          if (evf == 4) begin pvc_sum += real'(r); pvc_n++; end
        end
        check(!irq, "irq cleared by reading CPSD");
        if (mstate != M_TICK) restarted = 1;
        // host-forced retraining once, at about 50 s
        if (!retrain_sent && sample_no > 50 * FS) begin
          wb(1, 8'h00, 32'h3, r);
          retrain_sent = 1;
          n_retrain++;
          mstate = M_CAND;
          since = 0;
          restarted = 1;
        end
      end
      // keep the sample spacing fixed whatever the host did
      while (cycle % SPACING != 0) @(negedge clk);
    end
    repeat (SPACING * 10) @(negedge clk);
    check(exp_cv.size() == 0, $sformatf("%0d expected CPSD outputs missing", exp_cv.size()));
    wb(0, 8'h04, 0, r);
    check(int'(r[15:8]) == n_fail && int'(r[23:16]) == n_pass && int'(r[31:24]) == n_refresh,
          $sformatf("status counters %h", r[31:8]));
    // mechanism counts
    $display("INFO mechanisms: rejected candidates %0d, references accepted %0d, CPSD outputs %0d,",
             n_fail, n_pass, n_out_seen);
    $display("INFO   periodic refreshes %0d, host retrains %0d, saturated samples %0d, interrupts %0d, rate checks %0d",
             n_refresh, n_retrain, n_sat, n_irq, n_rate);
    check(n_fail > 0, "a candidate was rejected");
    check(n_pass > 0, "a reference was accepted");
    check(n_out_seen > 0, "CPSD values were produced");
    check(n_refresh > 0, "the reference was refreshed");
    check(n_retrain > 0, "the host forced retraining");
    check(n_sat > 0, "current samples were saturated to [-M, M]");
    check(n_irq > 0 && n_rate > 0, "interrupts and rate");
    check(vf_n > 0 && nrm_n > 0 && vt_n > 0 && pvc_n > 0,
          "normal, fibrillation, tachycardia and premature-beat windows were measured");
    if (vf_n > 0 && nrm_n > 0 && vt_n > 0 && pvc_n > 0) begin
      $display("INFO mean CPSD normal %0.2f, fibrillation %0.2f, tachycardia %0.2f, premature beats %0.2f",
               nrm_sum / nrm_n / 256.0, vf_sum / vf_n / 256.0, vt_sum / vt_n / 256.0,
               pvc_sum / pvc_n / 256.0);
      check(vf_sum / vf_n > 1.5 * (nrm_sum / nrm_n), "fibrillation raises CPSD");
      check(vt_sum / vt_n > 1.5 * (nrm_sum / nrm_n), "tachycardia raises CPSD");
      check(pvc_sum / pvc_n > 1.5 * (nrm_sum / nrm_n), "premature beats raise CPSD");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((SECONDS + 4) * FS * SPACING) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
