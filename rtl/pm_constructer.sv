// pm_constructer: the Phase Matrix Constructer of the CPSD processor.
//
// Builds one phase-space matrix from a window of filtered samples held in
// the circular buffer. A build, started by a one-cycle start pulse, runs
// three passes over the window s[0..W-1] that begins at buffer address
// base:
//   1. (find_m only) read all W samples and take M = max |s|; otherwise
//      M = m_in, the value of the reference window. M = 0 is taken as 1.
//   2. clear all 2^(2*QW) cells of the target matrix SRAM.
//   3. for k = 0 .. W-d-1 read s[k] and s[k+d], quantize both to 0..L
//      (quantizer: saturate to [-M, M], Eq. 3), and add one to cell
//      {q(s[k]), q(s[k+d])} with a read-modify-write; counts saturate.
// Timing: W + 1 cycles (pass 1, when enabled), 2^(2*QW) cycles (pass 2),
// 4 cycles per phase vector (pass 3), then done pulses for one cycle with
// M on m_out. For W = 1024, d = 8 that is about 5,400 cycles.
// The passes and Eqs. 2-4 follow the published algorithm; the read-modify-
// write sequence, the cell_r address order {x, y} and the saturation are this
// implementation's choices.
module pm_constructer #(
  parameter int SAMPLE_W = cpsd_pkg::SAMPLE_W,
  parameter int ADDR_W   = cpsd_pkg::BUF_AW,
  parameter int QW       = cpsd_pkg::PM_QW,
  parameter int CNT_W    = cpsd_pkg::PM_CNT_W,
  localparam int PAW     = 2*QW
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // command
  input  logic                       start,
  input  logic                       find_m,
  input  logic [SAMPLE_W-1:0]        m_in,
  input  logic [ADDR_W-1:0]          base,
  input  logic [ADDR_W-1:0]          win_len,
  input  logic [ADDR_W-1:0]          delay_d,
  input  logic [QW-1:0]              levels,
  output logic                       busy,
  output logic                       done,
  output logic [SAMPLE_W-1:0]        m_out,
  // filtered-data buffer read port
  output logic                       buf_rd_en,
  output logic [ADDR_W-1:0]          buf_rd_addr,
  input  logic signed [SAMPLE_W-1:0] buf_rd_data,
  // phase-matrix SRAM port
  output logic                       pm_re,
  output logic [PAW-1:0]             pm_raddr,
  input  logic [CNT_W-1:0]           pm_rdata,
  output logic                       pm_we,
  output logic [PAW-1:0]             pm_waddr,
  output logic [CNT_W-1:0]           pm_wdata
);

  typedef enum logic [2:0] {S_IDLE, S_MSCAN, S_CLEAR, S_VX, S_VY, S_VQ, S_VI} state_e;
  state_e state;

  logic [ADDR_W-1:0]          base_r, win_r, d_r, k;
  logic [QW-1:0]              lev_r;
  logic [SAMPLE_W-1:0]        m_r;
  logic                       scan_vld;
  logic [PAW-1:0]             cell_r;
  logic signed [SAMPLE_W-1:0] xs;
  logic [ADDR_W-1:0]          nvec;    // number of phase vectors, W - d

  assign nvec  = win_r - d_r;
  assign m_out = m_r;
  assign busy  = (state != S_IDLE);

  // magnitude of the sample being scanned
  logic [SAMPLE_W:0] mag;
  always_comb begin
    mag = buf_rd_data[SAMPLE_W-1] ? (SAMPLE_W+1)'(-(SAMPLE_W+1)'(buf_rd_data))
                                  : (SAMPLE_W+1)'(buf_rd_data);
  end

  // quantizers for the two coordinates
  logic [QW-1:0] qx, qy;
  quantizer #(.SAMPLE_W(SAMPLE_W), .QW(QW)) u_qx (.s(xs),          .m(m_r), .levels(lev_r), .q(qx));
  quantizer #(.SAMPLE_W(SAMPLE_W), .QW(QW)) u_qy (.s(buf_rd_data), .m(m_r), .levels(lev_r), .q(qy));

  // memory port drive
  always_comb begin
    buf_rd_en   = 1'b0;
    buf_rd_addr = base_r + k;
    pm_re       = 1'b0;
    pm_raddr    = {qx, qy};
    pm_we       = 1'b0;
    pm_waddr    = cell_r;
    pm_wdata    = (pm_rdata == '1) ? pm_rdata : pm_rdata + 1'b1;
    unique case (state)
      S_MSCAN: buf_rd_en = (k < win_r);
      S_CLEAR: begin
        pm_we    = 1'b1;
        pm_waddr = k[PAW-1:0];
        pm_wdata = '0;
      end
      S_VX: buf_rd_en = 1'b1;
      S_VY: begin
        buf_rd_en   = 1'b1;
        buf_rd_addr = base_r + k + d_r;
      end
      S_VQ: pm_re = 1'b1;
      S_VI: pm_we = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      base_r   <= '0;
      win_r    <= '0;
      d_r      <= '0;
      lev_r    <= '0;
      k        <= '0;
      m_r      <= '0;
      scan_vld <= 1'b0;
      cell_r     <= '0;
      xs       <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          base_r <= base;
          win_r  <= win_len;
          d_r    <= delay_d;
          lev_r  <= levels;
          k      <= '0;
          scan_vld <= 1'b0;
          if (find_m) begin
            m_r   <= '0;
            state <= S_MSCAN;
          end else begin
            m_r   <= (m_in == '0) ? SAMPLE_W'(1) : m_in;
            state <= S_CLEAR;
          end
        end
        S_MSCAN: begin
          scan_vld <= (k < win_r);
          if (k < win_r) k <= k + 1'b1;
          if (scan_vld && mag[SAMPLE_W-1:0] > m_r) m_r <= mag[SAMPLE_W-1:0];
          if (k == win_r && !scan_vld) begin
            if (m_r == '0) m_r <= SAMPLE_W'(1);
            k     <= '0;
            state <= S_CLEAR;
          end
        end
        S_CLEAR: begin
          if (k == ADDR_W'((1 << PAW) - 1)) begin
            k     <= '0;
            state <= (win_r > d_r) ? S_VX : S_IDLE;
            done  <= !(win_r > d_r);
          end else begin
            k <= k + 1'b1;
          end
        end
        S_VX: state <= S_VY;
        S_VY: begin
          xs    <= buf_rd_data;
          state <= S_VQ;
        end
        S_VQ: begin
          cell_r  <= {qx, qy};
          state <= S_VI;
        end
        S_VI: begin
          if (k + 1'b1 == nvec) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            k     <= k + 1'b1;
            state <= S_VX;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
