// tb_ecg_filter: self-checking test of the cascaded biquad filter unit.
// Programs four sections with coefficients computed here from the filter
// design formulas (high pass at 1 Hz and low pass at 100 Hz, Butterworth
// Q = 0.7071; notches at 60 Hz and 120 Hz), all at 256 samples/s and
// quantized to Q2.16, and feeds 600 samples of a test signal (offset,
// slow drift, 10 Hz tone, 60 Hz hum, noise). Every output is compared with
// an integer model written here: direct form I, round to nearest,
// saturate to 18 bits per section (8 guard bits), output rounded to 10 bits. Also checks the 30-cycle latency, that
// a 60 Hz-only input is suppressed and that a pass-band tone gets through.
module tb_ecg_filter;
  localparam int SW = 10, NSEC = 4, CW = 18, CF = 16;
  localparam real FS = 256.0;
  localparam real PI = 3.14159265358979;
  localparam int LATENCY = 8 * NSEC - 1;  // counted from the cycle after the one that samples in_valid
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic signed [SW-1:0] x_taps [3];
  logic signed [CW-1:0] coef [NSEC][5];
  logic signed [SW-1:0] out_sample;
  int checks = 0, failures = 0;

  // model state
  longint mx [NSEC][3];
  longint my [NSEC][2];
  longint cq [NSEC][5];

  ecg_filter #(.SAMPLE_W(SW), .NUM_SEC(NSEC), .COEF_W(CW), .COEF_FRAC(CF)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic longint qc(input real v);
    return longint'($floor(v * (1 << CF) + 0.5));
  endfunction

  // RBJ biquad formulas; kind 0 high pass, 1 low pass, 2 notch
  task automatic set_section(input int s, input int kind, input real f0, input real q);
    real w, al, cw, a0, b0, b1, b2, a1, a2;
    w  = 2.0 * PI * f0 / FS;
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
    for (int t = 0; t < 5; t++) coef[s][t] = CW'(cq[s][t]);
  endtask

  localparam int G = 8;  // guard bits inside the cascade
  function automatic longint sat(input longint v, input int w);
    longint lim;
    lim = longint'(1) << (w - 1);
    if (v > lim - 1) return lim - 1;
    if (v < -lim) return -lim;
    return v;
  endfunction

  function automatic longint model_step(input longint x);
    longint v, acc;
    v = x * (1 << G);
    for (int s = 0; s < NSEC; s++) begin
      mx[s][2] = mx[s][1]; mx[s][1] = mx[s][0]; mx[s][0] = v;
      acc = cq[s][0] * mx[s][0] + cq[s][1] * mx[s][1] + cq[s][2] * mx[s][2]
          - cq[s][3] * my[s][0] - cq[s][4] * my[s][1];
      v = sat((acc + (1 << (CF - 1))) >>> CF, SW + G);
      my[s][1] = my[s][0]; my[s][0] = v;
    end
    return sat((v + (1 << (G - 1))) >>> G, SW);
  endfunction

  task automatic reset_model();
    for (int s = 0; s < NSEC; s++) begin
      mx[s] = '{0, 0, 0};
      my[s] = '{0, 0};
    end
  endtask

  logic signed [SW-1:0] xh [3];

  // push one sample, wait for the output, compare; returns the output
  task automatic push(input longint x, output longint y);
    longint e;
    int lat;
    xh[2] = xh[1]; xh[1] = xh[0]; xh[0] = SW'(x);
    @(negedge clk);
    x_taps = xh;
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    lat = 1;
    while (!out_valid) begin @(negedge clk); lat++; end
    e = model_step(x);
    y = longint'(out_sample);
    check(y == e, $sformatf("output %0d vs model %0d", y, e));
    check(lat == LATENCY, $sformatf("latency %0d", lat));
    repeat (5) @(negedge clk);
  endtask

  initial begin
    longint y;
    real pk60, pk10;
    xh = '{default: '0};
    x_taps = xh;
    set_section(0, 0, 1.0, 0.7071);
    set_section(1, 1, 100.0, 0.7071);
    set_section(2, 2, 60.0, 5.0);
    set_section(3, 2, 120.0, 5.0);
    reset_model();
    repeat (3) @(posedge clk);
    rst_n = 1;
    // mixed test signal
    for (int n = 0; n < 600; n++) begin
      real t, v;
      t = n / FS;
      v = 80.0 + 60.0 * $sin(2.0 * PI * 0.3 * t) + 150.0 * $sin(2.0 * PI * 10.0 * t)
        + 40.0 * $sin(2.0 * PI * 60.0 * t) + real'($urandom_range(0, 20)) - 10.0;
      push(longint'(v), y);
    end
    // 60 Hz alone, after settling: output must be small
    pk60 = 0.0;
    for (int n = 0; n < 1000; n++) begin
      push(longint'(200.0 * $sin(2.0 * PI * 60.0 * n / FS)), y);
      if (n > 700 && ((y < 0) ? -real'(y) : real'(y)) > pk60) pk60 = ((y < 0) ? -real'(y) : real'(y));
    end
    check(pk60 < 4.0, $sformatf("60 Hz suppressed, peak %0f", pk60));
    // 10 Hz alone: passes
    pk10 = 0.0;
    for (int n = 0; n < 1000; n++) begin
      push(longint'(200.0 * $sin(2.0 * PI * 10.0 * n / FS)), y);
      if (n > 700 && ((y < 0) ? -real'(y) : real'(y)) > pk10) pk10 = ((y < 0) ? -real'(y) : real'(y));
    end
    check(pk10 > 170.0 && pk10 < 230.0, $sformatf("10 Hz passed, peak %0f", pk10));
    $display("INFO peak 60 Hz %0f, peak 10 Hz %0f", pk60, pk10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
