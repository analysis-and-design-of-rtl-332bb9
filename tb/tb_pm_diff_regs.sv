// tb_pm_diff_regs: self-checking test of the difference delay registers.
// Drives a random stream of (valid, diff, last) for 500 cycles and checks
// that the output equals the input DEPTH cycles earlier, with last only
// passed on valid items.
module tb_pm_diff_regs;
  localparam int W = 10, DEPTH = 2;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_last = 0, out_valid, out_last;
  logic [W-1:0] in_diff = '0, out_diff;
  int checks = 0, failures = 0;
  logic [W+1:0] hist [500];

  pm_diff_regs #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      in_valid = 1'($urandom);
      in_last  = 1'($urandom);
      in_diff  = W'($urandom);
      hist[n]  = {in_valid, in_valid & in_last, in_diff};
      @(posedge clk);
      #1;
      // after the n-th edge the output shows the item of edge n-DEPTH+1
      if (n >= DEPTH - 1) begin
        logic [W+1:0] e;
        e = hist[n - DEPTH + 1];
        check(out_valid == e[W+1], $sformatf("valid at %0d", n));
        check(out_last == e[W], $sformatf("last at %0d", n));
        if (e[W+1]) check(out_diff == e[W-1:0], $sformatf("diff at %0d", n));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
