// tb_diff_accumulator: self-checking test of the difference accumulator.
// Two pm_sram instances hold the matrices. First the worked example of
// the CPSD method on an 8 x 8 matrix: the reference matrix (Figure 2a
// counts) against the example's matrix (Figure 2b counts) must give the
// difference matrix of Figure 2c: six non-zero cells, differences summing
// to 8. Then random matrices on a 16 x 16 matrix, where each streamed
// cell, the last flag, the sum and the stream timing (first cell two
// cycles after start, 2^(2*QW) consecutive cells) are checked.
module tb_diff_accumulator;
  localparam int CW = 10;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- small instance for the worked example (QW = 3)
  logic s_start = 0, s_busy, s_done, s_rre, s_cre, s_dv, s_dl;
  logic [5:0] s_rra, s_cra;
  logic [CW-1:0] s_rrd, s_crd, s_d;
  logic [15:0] s_sum;
  logic s_we = 0;
  logic [5:0] s_wa = '0;
  logic [CW-1:0] s_wd = '0;
  logic s_wsel = 0;
  logic [CW-1:0] s_unused_a, s_unused_b;

  pm_sram #(.QW(3), .CNT_W(CW)) s_ref (.clk, .we(s_we && !s_wsel), .waddr(s_wa), .wdata(s_wd),
    .re(1'b0), .raddr('0), .rdata(s_unused_a), .re_b(s_rre), .raddr_b(s_rra), .rdata_b(s_rrd));
  pm_sram #(.QW(3), .CNT_W(CW)) s_cur (.clk, .we(s_we && s_wsel), .waddr(s_wa), .wdata(s_wd),
    .re(1'b0), .raddr('0), .rdata(s_unused_b), .re_b(s_cre), .raddr_b(s_cra), .rdata_b(s_crd));
  diff_accumulator #(.QW(3), .CNT_W(CW)) dut_s (.clk, .rst_n, .start(s_start), .busy(s_busy), .done(s_done),
    .ref_re(s_rre), .ref_raddr(s_rra), .ref_rdata(s_rrd), .cur_re(s_cre), .cur_raddr(s_cra), .cur_rdata(s_crd),
    .diff_valid(s_dv), .diff(s_d), .diff_last(s_dl), .diff_sum(s_sum));

  // ---- default instance (QW = 4)
  logic start = 0, busy, done, rre, cre, dv, dl;
  logic [7:0] rra, cra;
  logic [CW-1:0] rrd, crd, d;
  logic [17:0] sum;
  logic we = 0, wsel = 0;
  logic [7:0] wa = '0;
  logic [CW-1:0] wd = '0;
  logic [CW-1:0] unused_a, unused_b;

  pm_sram #(.QW(4), .CNT_W(CW)) m_ref (.clk, .we(we && !wsel), .waddr(wa), .wdata(wd),
    .re(1'b0), .raddr('0), .rdata(unused_a), .re_b(rre), .raddr_b(rra), .rdata_b(rrd));
  pm_sram #(.QW(4), .CNT_W(CW)) m_cur (.clk, .we(we && wsel), .waddr(wa), .wdata(wd),
    .re(1'b0), .raddr('0), .rdata(unused_b), .re_b(cre), .raddr_b(cra), .rdata_b(crd));
  diff_accumulator #(.QW(4), .CNT_W(CW)) dut (.clk, .rst_n, .start, .busy, .done,
    .ref_re(rre), .ref_raddr(rra), .ref_rdata(rrd), .cur_re(cre), .cur_raddr(cra), .cur_rdata(crd),
    .diff_valid(dv), .diff(d), .diff_last(dl), .diff_sum(sum));

  int rpsm [64], epsm [64];
  int rm [256], cm [256];

  initial begin
    int nz, tot, idx, first;
    foreach (rpsm[i]) begin rpsm[i] = 0; epsm[i] = 0; end
    // Figure 2a (reference) and 2b (example), cell index x*8 + y
    rpsm[5*8+6] = 2; rpsm[4*8+5] = 2; rpsm[5*8+5] = 2; rpsm[6*8+5] = 2;
    rpsm[4*8+4] = 1; rpsm[5*8+4] = 2; rpsm[2*8+3] = 1; rpsm[3*8+3] = 2; rpsm[2*8+2] = 1;
    epsm[5*8+6] = 2; epsm[4*8+5] = 3; epsm[5*8+5] = 3; epsm[6*8+5] = 2;
    epsm[4*8+4] = 3; epsm[5*8+4] = 2;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      s_we = 1; s_wsel = (i >= 64); s_wa = 6'(i % 64); s_wd = CW'((i >= 64) ? epsm[i % 64] : rpsm[i]);
    end
    @(negedge clk);
    s_we = 0; s_start = 1;
    @(negedge clk);
    s_start = 0;
    nz = 0; idx = 0;
    while (!(s_dv && s_dl)) begin
      if (s_dv) begin
        int e;
        e = epsm[idx] - rpsm[idx];
        if (e < 0) e = -e;
        check(int'(s_d) == e, $sformatf("example cell %0d", idx));
        if (s_d != 0) nz++;
        idx++;
      end
      @(negedge clk);
    end
    if (s_d != 0) nz++;
    check(idx == 63, "example stream length");
    check(nz == 6, $sformatf("example CV %0d (6 expected)", nz));
    check(s_sum == 8, $sformatf("example sum %0d (8 expected)", s_sum));
    // random matrices
    for (int r = 0; r < 10; r++) begin
      for (int i = 0; i < 512; i++) begin
        @(negedge clk);
        we = 1; wsel = (i >= 256); wa = 8'(i % 256);
        wd = ($urandom_range(0, 3) == 0) ? CW'($urandom) : CW'($urandom_range(0, 3));
        if (i >= 256) cm[i % 256] = int'(wd); else rm[i] = int'(wd);
      end
      @(negedge clk);
      we = 0; start = 1;
      @(negedge clk);
      start = 0;
      first = 0;
      while (!dv) begin @(negedge clk); first++; end
      check(first == 2, $sformatf("first cell after %0d cycles", first));
      tot = 0;
      for (int i = 0; i < 256; i++) begin
        int e;
        e = cm[i] - rm[i];
        if (e < 0) e = -e;
        tot += e;
        check(dv && int'(d) == e, $sformatf("cell %0d: %0d vs %0d", i, d, e));
        check(dl == (i == 255), "last flag");
        if (i == 255) check(done, "done with the last cell");
        @(negedge clk);
      end
      check(!dv, "stream ends");
      check(int'(sum) == tot, $sformatf("sum %0d vs %0d", sum, tot));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
