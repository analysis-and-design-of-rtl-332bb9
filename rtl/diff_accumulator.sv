// diff_accumulator: compares the current and the reference phase matrix.
//
// After a start pulse it reads cell i of both matrix SRAMs for i = 0 ..
// 2^(2*QW)-1, one cell per cycle, and emits the difference-matrix cell
// |EPSM[i] - RPSM[i]| (Eq. 5) on diff/diff_valid, with diff_last on the
// final cell. It also accumulates the sum of all differences in diff_sum.
// Timing: diff_valid first rises three clock edges after the edge that
// samples start (read, compare, register); the stream is
// 2^(2*QW) cycles long, and done pulses together with diff_last.
// Cell-by-cell comparison of the two matrix SRAMs follows the published
// design; the streaming interface and the exposed sum are this
// implementation's choices.
module diff_accumulator #(
  parameter int QW    = cpsd_pkg::PM_QW,
  parameter int CNT_W = cpsd_pkg::PM_CNT_W,
  localparam int PAW  = 2*QW,
  localparam int SUM_W = CNT_W + PAW
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic             done,
  // reference and current matrix read ports
  output logic             ref_re,
  output logic [PAW-1:0]   ref_raddr,
  input  logic [CNT_W-1:0] ref_rdata,
  output logic             cur_re,
  output logic [PAW-1:0]   cur_raddr,
  input  logic [CNT_W-1:0] cur_rdata,
  // difference stream
  output logic             diff_valid,
  output logic [CNT_W-1:0] diff,
  output logic             diff_last,
  output logic [SUM_W-1:0] diff_sum
);

  logic [PAW:0]   addr;       // one extra bit marks the end of issuing
  logic           issuing;
  logic           rd_vld, rd_last;
  logic [CNT_W-1:0] absd;

  assign ref_re    = issuing;
  assign cur_re    = issuing;
  assign ref_raddr = addr[PAW-1:0];
  assign cur_raddr = addr[PAW-1:0];
  assign absd      = (cur_rdata >= ref_rdata) ? cur_rdata - ref_rdata : ref_rdata - cur_rdata;
  assign busy      = issuing || rd_vld;
  assign done      = diff_valid && diff_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr       <= '0;
      issuing    <= 1'b0;
      rd_vld     <= 1'b0;
      rd_last    <= 1'b0;
      diff_valid <= 1'b0;
      diff       <= '0;
      diff_last  <= 1'b0;
      diff_sum   <= '0;
    end else begin
      // stage 1: issue reads
      if (start && !busy) begin
        addr     <= '0;
        issuing  <= 1'b1;
        diff_sum <= '0;
      end else if (issuing) begin
        addr <= addr + 1'b1;
        if (addr[PAW-1:0] == '1) issuing <= 1'b0;
      end
      rd_vld  <= issuing;
      rd_last <= issuing && (addr[PAW-1:0] == '1);
      // stage 2: absolute difference
      diff_valid <= rd_vld;
      diff_last  <= rd_last;
      if (rd_vld) begin
        diff     <= absd;
        diff_sum <= diff_sum + SUM_W'(absd);
      end
    end
  end

endmodule
