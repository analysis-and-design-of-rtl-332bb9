// asp_bus_if: Wishbone slave register file of the CPSD processor.
//
// The host processor programs the filter coefficients and the algorithm
// parameters here, and collects each CPSD value after the interrupt.
// Wishbone classic, 32-bit data, byte addresses (word aligned, bits [1:0]
// ignored); every access is acknowledged one cycle after cyc & stb, and a
// write takes effect on that acknowledge edge.
//   0x00 CTRL       W  bit0: retrain (one-shot); RW bit1: irq enable (1)
//   0x04 STATUS     R  bit0: on-line phase, bit1: CPSD ready,
//                      [15:8] rejected candidates, [23:16] references
//                      accepted, [31:24] periodic refreshes (all
//                      saturating counts since reset)
//   0x08 CPSD       R  CPSD * 2^8 (Q9.8); reading clears CPSD ready
//   0x0C CV         R  [8:0] last CV, [24:16] CV_1
//   0x10 WIN_LEN    RW W in samples (1024)
//   0x14 DELAY_D    RW d in samples (8)
//   0x18 THRESH_H   RW training threshold h in cells (60)
//   0x1C SPS        RW samples per CPSD output (256)
//   0x20 REF_PERIOD RW CPSD outputs between reference refreshes (30)
//   0x24 LEVELS     RW L, top quantizer level (15)
//   0x28 DIFF_SUM   R  sum of |EPSM - RPSM| of the last comparison
//   0x2C FILT_LAST  R  latest filtered sample, sign extended
//   0x30 M_REF      R  M of the reference window
//   0x40 + 4*(5*s + t)  RW coefficient t (b0 b1 b2 a1 a2) of filter
//                       section s, signed Q2.16, sign extended on read;
//                       reset value makes each section a pass-through
// irq is high while CPSD ready is set and the interrupt is enabled.
// Programming the coefficients over the system bus and reading CPSD through
// an interrupt follow the published design; the register map and reset
// values are this implementation's choices.
module asp_bus_if
  import cpsd_pkg::*;
#(
  parameter int NSEC = cpsd_pkg::NUM_SEC
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // Wishbone slave
  input  logic                       wb_cyc_i,
  input  logic                       wb_stb_i,
  input  logic                       wb_we_i,
  input  logic [7:0]                 wb_adr_i,
  input  logic [31:0]                wb_dat_i,
  output logic [31:0]                wb_dat_o,
  output logic                       wb_ack_o,
  // to the processor
  output asp_cfg_t                   cfg,
  output logic signed [COEF_W-1:0]   coef [NSEC][5],
  output logic                       retrain,
  output logic                       irq,
  // from the processor
  input  logic                       online,
  input  logic                       cpsd_valid,
  input  logic [CPSD_W-1:0]          cpsd,
  input  logic [CV_W-1:0]            cv,
  input  logic [CV_W-1:0]            cv1,
  input  logic [PM_CNT_W+2*PM_QW-1:0] diff_sum,
  input  logic                       filt_valid,
  input  logic signed [SAMPLE_W-1:0] filt_sample,
  input  logic [SAMPLE_W-1:0]        m_ref,
  input  logic                       train_fail,
  input  logic                       train_pass,
  input  logic                       ref_refresh
);

  logic                       irq_en, cpsd_ready;
  logic [CPSD_W-1:0]          cpsd_q;
  logic signed [SAMPLE_W-1:0] filt_last;
  logic                       access;
  logic [5:0]                 word;
  logic [7:0]                 n_fail, n_pass, n_refresh;

  assign access = wb_cyc_i && wb_stb_i && !wb_ack_o;
  assign word   = wb_adr_i[7:2];
  assign irq    = irq_en && cpsd_ready;

  // coefficient index of a word address (0x40 and up)
  function automatic int unsigned cidx(input logic [5:0] w);
    return int'(w) - 16;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_ack_o   <= 1'b0;
      wb_dat_o   <= '0;
      irq_en     <= 1'b1;
      cpsd_ready <= 1'b0;
      cpsd_q     <= '0;
      filt_last  <= '0;
      retrain    <= 1'b0;
      n_fail     <= '0;
      n_pass     <= '0;
      n_refresh  <= '0;
      cfg.win_len    <= BUF_AW'(DEF_WIN);
      cfg.delay_d    <= BUF_AW'(DEF_DELAY);
      cfg.thresh_h   <= CV_W'(DEF_THRESH_H);
      cfg.sps        <= BUF_AW'(FS);
      cfg.ref_period <= 8'(DEF_REF_PERIOD);
      cfg.levels     <= PM_QW'(DEF_LEVELS);
      for (int s = 0; s < NSEC; s++)
        for (int t = 0; t < 5; t++)
          coef[s][t] <= (t == 0) ? COEF_W'(1 << COEF_FRAC) : '0;
    end else begin
      wb_ack_o <= access;
      retrain  <= 1'b0;
      if (filt_valid) filt_last <= filt_sample;
      if (train_fail  && n_fail    != '1) n_fail    <= n_fail + 1'b1;
      if (train_pass  && n_pass    != '1) n_pass    <= n_pass + 1'b1;
      if (ref_refresh && n_refresh != '1) n_refresh <= n_refresh + 1'b1;
      if (cpsd_valid) begin
        cpsd_q     <= cpsd;
        cpsd_ready <= 1'b1;
      end
      if (access && wb_we_i) begin
        unique case (word)
          6'h00: begin
            retrain <= wb_dat_i[0];
            irq_en  <= wb_dat_i[1];
          end
          6'h04: cfg.win_len    <= wb_dat_i[BUF_AW-1:0];
          6'h05: cfg.delay_d    <= wb_dat_i[BUF_AW-1:0];
          6'h06: cfg.thresh_h   <= wb_dat_i[CV_W-1:0];
          6'h07: cfg.sps        <= wb_dat_i[BUF_AW-1:0];
          6'h08: cfg.ref_period <= wb_dat_i[7:0];
          6'h09: cfg.levels     <= wb_dat_i[PM_QW-1:0];
          default:
            if (word >= 6'h10 && cidx(word) < NSEC*5)
              coef[cidx(word) / 5][cidx(word) % 5] <= wb_dat_i[COEF_W-1:0];
        endcase
      end
      if (access && !wb_we_i) begin
        unique case (word)
          6'h00: wb_dat_o <= {30'd0, irq_en, 1'b0};
          6'h01: wb_dat_o <= {n_refresh, n_pass, n_fail, 6'd0, cpsd_ready, online};
          6'h02: begin
            wb_dat_o <= 32'(cpsd_q);
            if (!cpsd_valid) cpsd_ready <= 1'b0;
          end
          6'h03: wb_dat_o <= 32'({7'd0, cv1, 7'd0, cv});
          6'h04: wb_dat_o <= 32'(cfg.win_len);
          6'h05: wb_dat_o <= 32'(cfg.delay_d);
          6'h06: wb_dat_o <= 32'(cfg.thresh_h);
          6'h07: wb_dat_o <= 32'(cfg.sps);
          6'h08: wb_dat_o <= 32'(cfg.ref_period);
          6'h09: wb_dat_o <= 32'(cfg.levels);
          6'h0A: wb_dat_o <= 32'(diff_sum);
          6'h0B: wb_dat_o <= 32'(signed'(filt_last));
          6'h0C: wb_dat_o <= 32'(m_ref);
          default:
            if (word >= 6'h10 && cidx(word) < NSEC*5)
              wb_dat_o <= 32'(signed'(coef[cidx(word) / 5][cidx(word) % 5]));
            else
              wb_dat_o <= '0;
        endcase
      end
    end
  end

  // Wishbone rule: acknowledge only inside a cycle with strobe
  a_ack_in_cycle: assert property (@(posedge clk) disable iff (!rst_n)
                                   wb_ack_o |-> $past(wb_cyc_i && wb_stb_i))
    else $error("asp_bus_if: acknowledge without a request");

endmodule
