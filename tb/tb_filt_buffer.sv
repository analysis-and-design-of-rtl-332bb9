// tb_filt_buffer: self-checking test of the circular filtered-data SRAM.
// Writes 2.5 buffer lengths of random samples (so the write pointer wraps
// twice), checks wr_ptr and the full flag, then reads every slot and
// checks that it holds the newest sample written to it, with one cycle of
// read latency.
module tb_filt_buffer;
  localparam int SW = 10, DEPTH = 64, AW = 6;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic signed [SW-1:0] wr_data = '0, rd_data;
  logic [AW-1:0] wr_ptr, rd_addr = '0;
  logic full;
  int checks = 0, failures = 0;
  logic signed [SW-1:0] model [DEPTH];

  filt_buffer #(.SAMPLE_W(SW), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(wr_ptr == 0 && !full, "reset state");
    for (int n = 0; n < DEPTH * 5 / 2; n++) begin
      @(negedge clk);
      wr_en = 1;
      wr_data = SW'($urandom);
      model[n % DEPTH] = wr_data;
      @(negedge clk);
      wr_en = 0;
      check(wr_ptr == AW'(n + 1), $sformatf("wr_ptr after %0d writes", n + 1));
      check(full == (n + 1 >= DEPTH), "full flag");
    end
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      rd_en = 1;
      rd_addr = AW'(a);
      @(negedge clk);
      rd_en = 0;
      check(rd_data == model[a], $sformatf("slot %0d: %0d vs %0d", a, rd_data, model[a]));
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
