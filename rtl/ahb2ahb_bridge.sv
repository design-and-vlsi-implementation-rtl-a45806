// ahb2ahb_bridge: connects the high-speed AHB layer (as a slave) to the low-speed AHB
// layer (as its only master). The two layers run on separate clocks whose frequency ratio
// software may change at run time, so the bridge treats them as unrelated clocks.
// High-speed side: an accepted NONSEQ/SEQ transfer is latched (address and control in the
// address phase, HWDATA in the first data-phase cycle), HREADY is held low, and a request
// toggle is sent to the low-speed side. Low-speed side: a two-flop synchroniser sees the
// toggle, the ahb_mport engine performs the same single transfer on the low-speed layer,
// read data and error status are stored, and an acknowledge toggle goes back through a
// two-flop synchroniser. The high-speed side then completes the transfer with OKAY and the
// read data, or with the two-cycle ERROR response. The latched request and the stored
// response stay stable while the other side reads them, so only the toggles are
// synchronised. Latency: about 2 high-speed cycles plus 2 synchroniser and 3 transfer
// cycles of the low-speed clock.
//
// From the SoC description: the bridge is the high-speed layer's slave and the low-speed layer's only
// master, and the two layers run at a software-set frequency ratio. The toggle handshake,
// the synchronisers and single-transfer forwarding are this design's own choices.
module ahb2ahb_bridge
  import jsoc_pkg::*;
(
  // high-speed side (slave)
  input  logic     hclk,
  input  logic     hrst_n,
  input  logic     hsel,
  input  logic     hready_in,
  input  ahb_m2s_t hs_m,
  output ahb_s2m_t hs_s,
  // low-speed side (master)
  input  logic     lclk,
  input  logic     lrst_n,
  output ahb_m2s_t ls_m,
  input  ahb_s2m_t ls_s
);
  // ---------------- high-speed side ----------------
  typedef enum logic [2:0] {H_IDLE, H_DATA, H_WAIT, H_OK, H_ERR1, H_ERR2} hstate_e;
  hstate_e     hstate;
  logic        accept;
  logic [31:0] addr_q, wdata_q;
  logic        write_q;
  logic [2:0]  size_q;
  logic        req_tgl;
  logic [1:0]  ack_sync;
  logic        ack_tgl;          // low-speed domain
  logic [31:0] rdata_l;          // low-speed domain, stable once ack toggles
  logic        err_l;

  assign accept = hsel && hready_in && hs_m.htrans[1];

  always_ff @(posedge hclk or negedge hrst_n) begin
    if (!hrst_n) begin
      hstate   <= H_IDLE;
      addr_q   <= '0;
      wdata_q  <= '0;
      write_q  <= 1'b0;
      size_q   <= 3'd2;
      req_tgl  <= 1'b0;
      ack_sync <= '0;
    end else begin
      ack_sync <= {ack_sync[0], ack_tgl};
      case (hstate)
        H_DATA: begin
          wdata_q <= hs_m.hwdata;
          req_tgl <= ~req_tgl;
          hstate  <= H_WAIT;
        end
        H_WAIT: if (ack_sync[1] == req_tgl) hstate <= err_l ? H_ERR1 : H_OK;
        H_ERR1: hstate <= H_ERR2;
        default: begin  // H_IDLE, H_OK, H_ERR2: HREADY is high, a new transfer may start
          if (accept) begin
            addr_q  <= hs_m.haddr;
            write_q <= hs_m.hwrite;
            size_q  <= hs_m.hsize;
            hstate  <= H_DATA;
          end else begin
            hstate  <= H_IDLE;
          end
        end
      endcase
    end
  end

  always_comb begin
    hs_s        = AHB_S2M_OKAY;
    hs_s.hready = (hstate == H_IDLE) || (hstate == H_OK) || (hstate == H_ERR2);
    hs_s.hrdata = (hstate == H_OK) ? rdata_l : 32'h0;
    if (hstate == H_ERR1 || hstate == H_ERR2) hs_s.hresp = HRESP_ERROR;
  end

  // ---------------- low-speed side ----------------
  logic [1:0]  req_sync;
  logic        req_seen;
  logic        start, l_busy, l_done, l_err;
  logic [31:0] l_rdata;
  logic        unused_busreq;

  assign start = (req_sync[1] != req_seen) && !l_busy;

  always_ff @(posedge lclk or negedge lrst_n) begin
    if (!lrst_n) begin
      req_sync <= '0;
      req_seen <= 1'b0;
      ack_tgl  <= 1'b0;
      rdata_l  <= '0;
      err_l    <= 1'b0;
    end else begin
      req_sync <= {req_sync[0], req_tgl};
      if (start) req_seen <= req_sync[1];
      if (l_done) begin
        rdata_l <= l_rdata;
        err_l   <= l_err;
        ack_tgl <= req_seen;
      end
    end
  end

  ahb_mport u_mport (
    .clk(lclk), .rst_n(lrst_n),
    .req(start), .addr(addr_q), .write(write_q), .wdata(wdata_q), .size(size_q),
    .busy(l_busy), .done(l_done), .rdata(l_rdata), .err(l_err),
    .hbusreq(unused_busreq), .hgrant(1'b1), .m(ls_m), .s(ls_s)
  );
endmodule
