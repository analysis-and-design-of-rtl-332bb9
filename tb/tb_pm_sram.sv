// tb_pm_sram: self-checking test of the phase-matrix SRAM.
// Fills every cell with a random count, then reads all cells through both
// read ports at once and checks the data one cycle later; finally checks
// that a read in the same cycle as a write of that cell returns the old
// value and a later read the new one.
module tb_pm_sram;
  localparam int QW = 4, CW = 10, AW = 8;
  logic clk = 0;
  logic we = 0, re = 0, re_b = 0;
  logic [AW-1:0] waddr = '0, raddr = '0, raddr_b = '0;
  logic [CW-1:0] wdata = '0, rdata, rdata_b;
  int checks = 0, failures = 0;
  logic [CW-1:0] model [1 << AW];

  pm_sram #(.QW(QW), .CNT_W(CW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int a = 0; a < (1 << AW); a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = CW'($urandom); model[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int a = 0; a < (1 << AW); a++) begin
      @(negedge clk);
      re = 1; raddr = AW'(a);
      re_b = 1; raddr_b = AW'((1 << AW) - 1 - a);
      @(negedge clk);
      re = 0; re_b = 0;
      check(rdata == model[a], $sformatf("port A cell %0d", a));
      check(rdata_b == model[(1 << AW) - 1 - a], $sformatf("port B cell %0d", (1 << AW) - 1 - a));
    end
    // read during write
    @(negedge clk);
    we = 1; waddr = 8'd17; wdata = ~model[17];
    re = 1; raddr = 8'd17;
    @(negedge clk);
    we = 0;
    check(rdata == model[17], "read during write returns old value");
    @(negedge clk);
    re = 0;
    check(rdata == ~model[17], "read after write returns new value");
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
