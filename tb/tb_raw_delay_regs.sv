// tb_raw_delay_regs: self-checking test of the raw-sample delay registers.
// Shifts 200 random samples in, at random spacing, and checks after each
// one that the taps hold the last DEPTH samples (older ones zero after
// reset) and that taps_valid pulses exactly one cycle after sample_valid.
module tb_raw_delay_regs;
  localparam int SW = 10, DEPTH = 3;
  logic clk = 0, rst_n = 0;
  logic sample_valid = 0;
  logic signed [SW-1:0] sample = '0;
  logic signed [SW-1:0] taps [DEPTH];
  logic taps_valid;
  int checks = 0, failures = 0;
  logic signed [SW-1:0] hist [$];

  raw_delay_regs #(.SAMPLE_W(SW), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) hist.push_front('0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      sample_valid = 1;
      sample = SW'($urandom);
      hist.push_front(sample);
      @(negedge clk);
      sample_valid = 0;
      check(taps_valid == 1'b1, "taps_valid after a sample");
      for (int i = 0; i < DEPTH; i++)
        check(taps[i] == hist[i], $sformatf("tap %0d after sample %0d: %0d vs %0d", i, n, taps[i], hist[i]));
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        check(taps_valid == 1'b0, "taps_valid idle");
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
