// tb_cpsd_calculator: self-checking test of the CV and CPSD calculation.
// Streams 256-cell difference matrices with a chosen number of non-zero
// cells (random positions and values, gaps in valid) and checks CV (Eq. 6)
// in training mode, and in on-line mode CPSD = floor(CV * 256 / CV_1)
// (Eq. 7) and the 18-cycle division time. Includes the worked example of
// the method: CV = 6 and CV_1 = 2 give CPSD = 3 (768 in Q9.8), and the
// extremes CV = 0 and CV = 256 with CV_1 = 1.
module tb_cpsd_calculator;
  localparam int CNT_W = 10, CV_W = 9, FRAC = 8, Q_W = CV_W + FRAC;
  logic clk = 0, rst_n = 0;
  logic clear = 0, do_div = 0, diff_valid = 0, diff_last = 0, busy, done;
  logic [CV_W-1:0] cv1 = '0, cv;
  logic [CNT_W-1:0] diff = '0;
  logic [Q_W-1:0] cpsd;
  int checks = 0, failures = 0;

  cpsd_calculator #(.CNT_W(CNT_W), .CV_W(CV_W), .FRAC(FRAC)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input int nz, input bit div, input int c1);
    bit nzmask [256];
    int placed, lat;
    foreach (nzmask[i]) nzmask[i] = 0;
    placed = 0;
    while (placed < nz) begin
      int p;
      p = $urandom_range(0, 255);
      if (!nzmask[p]) begin nzmask[p] = 1; placed++; end
    end
    @(negedge clk);
    clear = 1; do_div = div; cv1 = CV_W'(c1);
    @(negedge clk);
    clear = 0;
    for (int i = 0; i < 256; i++) begin
      while ($urandom_range(0, 3) == 0) begin diff_valid = 0; @(negedge clk); end
      diff_valid = 1;
      diff = nzmask[i] ? CNT_W'($urandom_range(1, 1023)) : '0;
      diff_last = (i == 255);
      @(negedge clk);
    end
    diff_valid = 0; diff_last = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    check(int'(cv) == nz, $sformatf("CV %0d vs %0d", cv, nz));
    if (div) begin
      int e;
      e = (nz * 256) / ((c1 == 0) ? 1 : c1);
      check(int'(cpsd) == e, $sformatf("CPSD %0d vs %0d (CV %0d, CV1 %0d)", cpsd, e, nz, c1));
      check(lat == Q_W + 1, $sformatf("division took %0d cycles", lat));
    end else begin
      check(lat == 1, $sformatf("training result after %0d cycles", lat));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(6, 1'b1, 2);
    check(cpsd == 17'd768, "worked example: CPSD 3.0");
    run(0, 1'b1, 1);
    run(256, 1'b1, 1);
    run(256, 1'b1, 255);
    for (int r = 0; r < 40; r++) run($urandom_range(0, 256), r % 3 != 0, $urandom_range(1, 300));
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
