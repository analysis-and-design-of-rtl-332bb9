// tb_pm_constructer: self-checking test of the phase matrix constructer.
// Runs on an 8 x 8 matrix (QW = 3) so that the worked example of the
// CPSD method fits: 20 samples, d = 5, L = 6 must give M = 35 and the
// counts (4,4):3 (4,5):3 (5,4):2 (5,5):3 (5,6):2 (6,5):2, all other cells
// zero. Then random windows at a random buffer offset (wrapping), with M
// measured and with M given (samples saturated to [-M, M]), are compared
// cell by cell with counts computed here from Eq. 3, and the cycle count
// of each build is checked against W + 1 + 64 + 4 (W - d) + 2 (64 + 4 (W - d) + 1 without the M scan).
module tb_pm_constructer;
  localparam int SW = 10, AW = 6, QW = 3, CW = 10, PAW = 6;
  localparam int DEPTH = 1 << AW;
  logic clk = 0, rst_n = 0;
  logic start = 0, find_m = 0, busy, done;
  logic [SW-1:0] m_in = '0, m_out;
  logic [AW-1:0] base = '0, win_len = '0, delay_d = '0;
  logic [QW-1:0] levels = '0;
  logic buf_rd_en, pm_re, pm_we;
  logic [AW-1:0] buf_rd_addr;
  logic signed [SW-1:0] buf_rd_data;
  logic [PAW-1:0] pm_raddr, pm_waddr;
  logic [CW-1:0] pm_rdata, pm_wdata;
  int checks = 0, failures = 0;

  // behavioural memories
  logic signed [SW-1:0] bufm [DEPTH];
  logic [CW-1:0] pm [1 << PAW];
  always_ff @(posedge clk) begin
    if (buf_rd_en) buf_rd_data <= bufm[buf_rd_addr];
    if (pm_re) pm_rdata <= pm[pm_raddr];
    if (pm_we) pm[pm_waddr] <= pm_wdata;
  end

  pm_constructer #(.SAMPLE_W(SW), .ADDR_W(AW), .QW(QW), .CNT_W(CW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int quant(input int s, input int m, input int l);
    int v;
    v = (s > m) ? m : (s < -m) ? -m : s;
    return ((v + m) * l + m) / (2 * m);
  endfunction

  task automatic build(input int b, input int w, input int d, input int l, input bit fm, input int mi,
                       output int cycles);
    @(negedge clk);
    base = AW'(b); win_len = AW'(w); delay_d = AW'(d); levels = QW'(l);
    find_m = fm; m_in = SW'(mi); start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  // compare the matrix with counts from the buffer model
  task automatic compare(input int b, input int w, input int d, input int l, input int m);
    int exp_cnt [1 << PAW];
    int x, y;
    foreach (exp_cnt[i]) exp_cnt[i] = 0;
    for (int k = 0; k < w - d; k++) begin
      x = quant(int'(bufm[(b + k) % DEPTH]), m, l);
      y = quant(int'(bufm[(b + k + d) % DEPTH]), m, l);
      exp_cnt[x * 8 + y]++;
    end
    foreach (exp_cnt[i]) check(int'(pm[i]) == exp_cnt[i], $sformatf("cell %0d: %0d vs %0d", i, pm[i], exp_cnt[i]));
  endtask

  int sin_ex [20] = '{9, 16, 28, 33, 25, 17, 10, 19, 26, 35, 27, 16, 9, 18, 24, 32, 25, 18, 8, 23};

  initial begin
    int cyc, mx;
    foreach (pm[i]) pm[i] = CW'($urandom);
    foreach (bufm[i]) bufm[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // worked example
    foreach (sin_ex[i]) bufm[i] = SW'(sin_ex[i]);
    build(0, 20, 5, 6, 1'b1, 0, cyc);
    check(m_out == 35, $sformatf("M of the example %0d", m_out));
    foreach (pm[i]) begin
      int e;
      case (i)
        4*8+4: e = 3;  4*8+5: e = 3;  5*8+4: e = 2;
        5*8+5: e = 3;  5*8+6: e = 2;  6*8+5: e = 2;
        default: e = 0;
      endcase
      check(int'(pm[i]) == e, $sformatf("example cell (%0d,%0d): %0d vs %0d", i / 8, i % 8, pm[i], e));
    end
    check(cyc == 20 + 1 + 64 + 4 * 15 + 2, $sformatf("example build took %0d cycles", cyc));
    // random windows
    for (int r = 0; r < 20; r++) begin
      int b, w, d;
      foreach (bufm[i]) bufm[i] = SW'($urandom_range(0, 600) - 300);
      b = $urandom_range(0, DEPTH - 1);
      w = $urandom_range(20, DEPTH - 1);
      d = $urandom_range(1, 10);
      if (r % 2 == 0) begin
        build(b, w, d, 7, 1'b1, 0, cyc);
        mx = 0;
        for (int k = 0; k < w; k++) begin
          int a;
          a = int'(bufm[(b + k) % DEPTH]);
          if (a < 0) a = -a;
          if (a > mx) mx = a;
        end
        check(int'(m_out) == mx, $sformatf("M %0d vs %0d", m_out, mx));
        check(cyc == w + 1 + 64 + 4 * (w - d) + 2, $sformatf("build took %0d cycles", cyc));
      end else begin
        mx = $urandom_range(1, 250);   // forces saturation
        build(b, w, d, $urandom_range(1, 7), 1'b0, mx, cyc);
        check(cyc == 64 + 4 * (w - d) + 1, $sformatf("build took %0d cycles", cyc));
      end
      compare(b, w, d, int'(levels), mx);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
