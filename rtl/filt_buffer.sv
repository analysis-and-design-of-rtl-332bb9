// filt_buffer: SRAM for the filtered ECG samples, used as a circular buffer.
//
// Holds the last DEPTH filtered samples (2048 = 8 s at 256 sps). The filter
// writes through wr_en/wr_data; the write address advances by one per
// sample and wraps, and wr_ptr always names the slot the next sample goes
// to, so the newest W samples start at wr_ptr - W (modulo DEPTH). The phase
// matrix constructer reads through a synchronous port: rd_data is valid the
// cycle after rd_en. DEPTH must be a power of two. The array is not reset;
// only wr_ptr and the sample count are.
// The 8-second depth follows the published design; the separate read and
// write ports are this implementation's choice.
module filt_buffer #(
  parameter int SAMPLE_W = cpsd_pkg::SAMPLE_W,
  parameter int DEPTH    = cpsd_pkg::BUF_DEPTH,
  localparam int AW      = $clog2(DEPTH)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic signed [SAMPLE_W-1:0] wr_data,
  output logic [AW-1:0]              wr_ptr,
  output logic                       full,      // DEPTH samples written since reset
  input  logic                       rd_en,
  input  logic [AW-1:0]              rd_addr,
  output logic signed [SAMPLE_W-1:0] rd_data
);

  logic signed [SAMPLE_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ptr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      full   <= 1'b0;
    end else if (wr_en) begin
      wr_ptr <= wr_ptr + 1'b1;
      if (wr_ptr == AW'(DEPTH - 1)) full <= 1'b1;
    end
  end

endmodule
