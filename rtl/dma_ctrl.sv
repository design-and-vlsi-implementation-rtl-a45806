// dma_ctrl: DMA controller for block transfers between any two modules.
// It is a master on the high-speed AHB (lowest priority, so the Java core is never locked
// out during a transfer) and a slave at 0xE0000000 for its registers:
//   0x00 SRC    source byte address (word aligned)
//   0x04 DST    destination byte address (word aligned)
//   0x08 COUNT  number of 32-bit words; counts down while the transfer runs
//   0x0C CTRL   bit0 start (write 1), bit1 fixed source, bit2 fixed destination,
//               bit3 interrupt enable
//   0x10 STATUS bit0 busy, bit1 done, bit2 bus error; writing 1 to bit1/bit2 clears them
// Each word is one AHB read of SRC followed by one AHB write to DST; addresses advance by
// 4 unless fixed (for a peripheral data register). A word takes two ahb_mport transfers,
// i.e. at least 8 bus cycles. irq is high while done and interrupt enable are both set.
// Registers are zero-wait AHB slave accesses.
//
// From the SoC description: a DMA master with the lowest priority, copying between any two modules,
// configured at 0xE0000000. Registers, word-only transfers and the interrupt are this
// design's own.
module dma_ctrl
  import jsoc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // configuration slave
  input  logic     hsel,
  input  logic     hready_in,
  input  ahb_m2s_t cfg_m,
  output ahb_s2m_t cfg_s,
  // bus master
  output logic     hbusreq,
  input  logic     hgrant,
  output ahb_m2s_t mst_m,
  input  ahb_s2m_t mst_s,
  output logic     irq
);
  logic [31:0] src, dst, count, data;
  logic        src_fix, dst_fix, irq_en, st_done, st_err;

  typedef enum logic [2:0] {E_IDLE, E_RD, E_RD_W, E_WR, E_WR_W} estate_e;
  estate_e estate;

  // ---------------- register slave ----------------
  logic       wr_pend;
  logic [2:0] widx, ridx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_pend <= 1'b0;
      widx    <= '0;
      ridx    <= '0;
    end else if (hready_in) begin
      wr_pend <= hsel && cfg_m.htrans[1] && cfg_m.hwrite;
      widx    <= cfg_m.haddr[4:2];
      ridx    <= cfg_m.haddr[4:2];
    end
  end

  always_comb begin
    cfg_s = AHB_S2M_OKAY;
    case (ridx)
      3'd0: cfg_s.hrdata = src;
      3'd1: cfg_s.hrdata = dst;
      3'd2: cfg_s.hrdata = count;
      3'd3: cfg_s.hrdata = {28'h0, irq_en, dst_fix, src_fix, 1'b0};
      3'd4: cfg_s.hrdata = {29'h0, st_err, st_done, estate != E_IDLE};
      default: cfg_s.hrdata = 32'h0;
    endcase
  end

  // ---------------- transfer engine ----------------
  logic        m_req, m_write, m_busy, m_done, m_err;
  logic [31:0] m_addr, m_rdata;
  logic        start;

  assign start = wr_pend && widx == 3'd3 && cfg_m.hwdata[0] && estate == E_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src <= '0; dst <= '0; count <= '0; data <= '0;
      src_fix <= 1'b0; dst_fix <= 1'b0; irq_en <= 1'b0;
      st_done <= 1'b0; st_err <= 1'b0;
      estate <= E_IDLE;
    end else begin
      if (wr_pend && estate == E_IDLE) begin
        case (widx)
          3'd0: src   <= cfg_m.hwdata;
          3'd1: dst   <= cfg_m.hwdata;
          3'd2: count <= cfg_m.hwdata;
          3'd3: {irq_en, dst_fix, src_fix} <= cfg_m.hwdata[3:1];
          default: ;
        endcase
      end
      if (wr_pend && widx == 3'd4) begin
        if (cfg_m.hwdata[1]) st_done <= 1'b0;
        if (cfg_m.hwdata[2]) st_err  <= 1'b0;
      end
      case (estate)
        E_IDLE: if (start) begin
          st_done <= 1'b0;
          st_err  <= 1'b0;
          estate  <= (count == 0) ? E_IDLE : E_RD;
          if (count == 0) st_done <= 1'b1;
        end
        E_RD:   if (!m_busy) estate <= E_RD_W;
        E_RD_W: if (m_done) begin
          data <= m_rdata;
          if (m_err) begin st_err <= 1'b1; estate <= E_IDLE; end
          else estate <= E_WR;
        end
        E_WR:   if (!m_busy) estate <= E_WR_W;
        E_WR_W: if (m_done) begin
          if (m_err) begin
            st_err <= 1'b1;
            estate <= E_IDLE;
          end else begin
            count <= count - 1;
            if (!src_fix) src <= src + 32'd4;
            if (!dst_fix) dst <= dst + 32'd4;
            if (count == 32'd1) begin st_done <= 1'b1; estate <= E_IDLE; end
            else estate <= E_RD;
          end
        end
        default: estate <= E_IDLE;
      endcase
    end
  end

  assign m_req   = (estate == E_RD || estate == E_WR) && !m_busy;
  assign m_write = (estate == E_WR);
  assign m_addr  = m_write ? dst : src;
  assign irq     = st_done && irq_en;

  ahb_mport u_mport (
    .clk, .rst_n, .req(m_req), .addr(m_addr), .write(m_write), .wdata(data), .size(3'd2),
    .busy(m_busy), .done(m_done), .rdata(m_rdata), .err(m_err),
    .hbusreq, .hgrant, .m(mst_m), .s(mst_s)
  );
endmodule
