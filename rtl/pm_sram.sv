// pm_sram: phase-matrix SRAM.
//
// One cell per quantized coordinate pair: address {x, y}, 2^(2*QW) cells of
// CNT_W-bit visit counts (16 x 16 x 10 bits by default). The processor has
// two of them, one for the reference matrix and one for the current matrix.
// Port A (re/raddr/rdata) and the write port serve the phase matrix
// constructer's read-modify-write; port B serves the difference
// accumulator. Reads are synchronous: data appears the cycle after the read
// enable. A read and a write of the same cell in one cycle return the old
// value. The array is not reset; the constructer clears it before use.
// The two matrix SRAMs follow the published design; the port arrangement is
// this implementation's choice.
module pm_sram #(
  parameter int QW    = cpsd_pkg::PM_QW,
  parameter int CNT_W = cpsd_pkg::PM_CNT_W,
  localparam int AW   = 2*QW
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [CNT_W-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [CNT_W-1:0] rdata,
  input  logic             re_b,
  input  logic [AW-1:0]    raddr_b,
  output logic [CNT_W-1:0] rdata_b
);

  logic [CNT_W-1:0] mem [1 << AW];

  always_ff @(posedge clk) begin
    if (we)   mem[waddr] <= wdata;
    if (re)   rdata      <= mem[raddr];
    if (re_b) rdata_b    <= mem[raddr_b];
  end

endmodule
