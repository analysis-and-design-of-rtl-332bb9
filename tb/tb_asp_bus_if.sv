// tb_asp_bus_if: self-checking test of the Wishbone register file.
// Checks the reset values of every parameter register and coefficient,
// write and read-back of all of them, that the parameter and coefficient
// outputs follow the writes, the one-cycle retrain pulse, the single
// acknowledge per access, the CPSD hand-over (irq rises with a new value,
// reading CPSD returns it and drops irq; irq enable masks it) and the
// read-only status registers, including the training event counters.
module tb_asp_bus_if;
  import cpsd_pkg::*;
  localparam int NSEC = NUM_SEC;
  logic clk = 0, rst_n = 0;
  logic wb_cyc_i = 0, wb_stb_i = 0, wb_we_i = 0, wb_ack_o;
  logic [7:0] wb_adr_i = '0;
  logic [31:0] wb_dat_i = '0, wb_dat_o;
  asp_cfg_t cfg;
  logic signed [COEF_W-1:0] coef [NSEC][5];
  logic retrain, irq;
  logic online = 0, cpsd_valid = 0, filt_valid = 0;
  logic [CPSD_W-1:0] cpsd = '0;
  logic [CV_W-1:0] cv = '0, cv1 = '0;
  logic [PM_CNT_W+2*PM_QW-1:0] diff_sum = '0;
  logic signed [SAMPLE_W-1:0] filt_sample = '0;
  logic [SAMPLE_W-1:0] m_ref = '0;
  logic train_fail = 0, train_pass = 0, ref_refresh = 0;
  int checks = 0, failures = 0, retrain_pulses = 0;

  asp_bus_if #(.NSEC(NSEC)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (retrain) retrain_pulses++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wb(input bit we, input logic [7:0] a, input logic [31:0] wd, output logic [31:0] rd);
    int n;
    @(negedge clk);
    wb_cyc_i = 1; wb_stb_i = 1; wb_we_i = we; wb_adr_i = a; wb_dat_i = wd;
    n = 0;
    do begin @(posedge clk); #1; n++; end while (!wb_ack_o);
    rd = wb_dat_o;
    check(n == 1, $sformatf("ack after %0d cycles", n));
    @(negedge clk);
    wb_cyc_i = 0; wb_stb_i = 0; wb_we_i = 0;
    @(posedge clk); #1;
    check(!wb_ack_o, "single acknowledge");
  endtask

  initial begin
    logic [31:0] r;
    int vals [10];
    repeat (3) @(posedge clk);
    rst_n = 1;
    // reset values
    wb(0, 8'h10, 0, r); check(r == DEF_WIN, "WIN_LEN reset");
    wb(0, 8'h14, 0, r); check(r == DEF_DELAY, "DELAY_D reset");
    wb(0, 8'h18, 0, r); check(r == DEF_THRESH_H, "THRESH_H reset");
    wb(0, 8'h1C, 0, r); check(r == FS, "SPS reset");
    wb(0, 8'h20, 0, r); check(r == DEF_REF_PERIOD, "REF_PERIOD reset");
    wb(0, 8'h24, 0, r); check(r == DEF_LEVELS, "LEVELS reset");
    for (int i = 0; i < NSEC * 5; i++) begin
      wb(0, 8'(8'h40 + 4 * i), 0, r);
      check(r == ((i % 5 == 0) ? 32'h10000 : 0), $sformatf("coefficient %0d reset", i));
    end
    // parameters
    wb(1, 8'h10, 512, r); wb(1, 8'h14, 5, r); wb(1, 8'h18, 33, r);
    wb(1, 8'h1C, 128, r); wb(1, 8'h20, 7, r); wb(1, 8'h24, 6, r);
    @(negedge clk);
    check(cfg.win_len == 512 && cfg.delay_d == 5 && cfg.thresh_h == 33 &&
          cfg.sps == 128 && cfg.ref_period == 7 && cfg.levels == 6, "cfg outputs follow writes");
    wb(0, 8'h18, 0, r); check(r == 33, "THRESH_H read back");
    // coefficients, negative values read back sign extended
    for (int i = 0; i < NSEC * 5; i++) begin
      int v;
      v = $urandom_range(0, 262143) - 131072;
      wb(1, 8'(8'h40 + 4 * i), 32'(v), r);
      @(negedge clk);
      check(int'(coef[i / 5][i % 5]) == v, $sformatf("coefficient %0d output", i));
      wb(0, 8'(8'h40 + 4 * i), 0, r);
      check(int'(r) == v, $sformatf("coefficient %0d read back", i));
    end
    // retrain pulse
    wb(1, 8'h00, 32'h3, r);
    repeat (3) @(negedge clk);
    check(retrain_pulses == 1, $sformatf("%0d retrain pulses", retrain_pulses));
    // CPSD hand-over
    check(!irq, "no irq before a result");
    @(negedge clk);
    cpsd = 17'd768; cv = 9'd6; cv1 = 9'd2; cpsd_valid = 1; online = 1;
    @(negedge clk);
    cpsd_valid = 0; cpsd = '0;
    check(irq, "irq on a new CPSD");
    wb(0, 8'h04, 0, r); check(r[1:0] == 2'b11, "status ready and on-line");
    wb(0, 8'h0C, 0, r); check(r[8:0] == 6 && r[24:16] == 2, "CV and CV_1");
    wb(0, 8'h08, 0, r); check(r == 768, "CPSD value");
    check(!irq, "irq cleared by the read");
    // masked interrupt
    wb(1, 8'h00, 32'h0, r);
    @(negedge clk);
    cpsd = 17'd5; cpsd_valid = 1;
    @(negedge clk);
    cpsd_valid = 0;
    check(!irq, "irq masked");
    wb(0, 8'h04, 0, r); check(r[1] == 1'b1, "ready while masked");
    // status sources
    diff_sum = 18'd1234; m_ref = 10'd300;
    @(negedge clk); filt_sample = -10'sd7; filt_valid = 1;
    @(negedge clk); filt_valid = 0;
    wb(0, 8'h28, 0, r); check(r == 1234, "DIFF_SUM");
    wb(0, 8'h2C, 0, r); check(r == 32'hFFFF_FFF9, "FILT_LAST sign extended");
    wb(0, 8'h30, 0, r); check(r == 300, "M_REF");
    // training event counters
    repeat (3) begin @(negedge clk); train_fail = 1; @(negedge clk); train_fail = 0; end
    repeat (2) begin @(negedge clk); train_pass = 1; @(negedge clk); train_pass = 0; end
    @(negedge clk); ref_refresh = 1; @(negedge clk); ref_refresh = 0;
    wb(0, 8'h04, 0, r); check(r[31:8] == 24'h010203, $sformatf("event counters %h", r[31:8]));
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
