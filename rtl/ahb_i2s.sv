// ahb_i2s: I2S audio controller, a slave on the low-speed AHB (region 0xC).
// It is the bus master of the I2S link: it makes the bit clock SCK and the word select WS,
// sends 16-bit stereo samples on SD_OUT and receives them on SD_IN, in the standard I2S
// format (WS low = left, the MSB one SCK period after each WS change, data changed on
// the falling and sampled on the rising SCK edge). A frame is 32 SCK periods, left
// channel first.
//   0x00 TXDATA write {left[31:16], right[15:0]} into the one-sample transmit buffer
//   0x04 RXDATA the last received frame {left, right}; reading clears rx_valid
//   0x08 STATUS bit0 transmit buffer full, bit1 rx_valid, bit2 transmit underrun,
//               bit3 receive overrun (bits 2 and 3: write 1 to clear)
//   0x0C CTRL   bit0 enable, bit1 interrupt when the transmit buffer is empty, bit2
//               interrupt when a frame has been received
//   0x10 DIV    clock cycles per SCK half period (reset DIV_RESET, minimum 3)
// The transmit buffer is moved into the shift register at the start of every frame; if
// it is empty, a silent frame (zeros) is sent and underrun is set. SD_IN passes through a
// two-flop synchroniser, hence the minimum DIV. While disabled SCK, WS and SD_OUT stay
// low and the frame restarts at the left channel when enabled again.
// Register accesses are zero-wait AHB transfers.
//
// From the SoC description: an I2S controller is a slave on the low-speed AHB at
// 0xC0000000. The link format is the I2S standard's; the sample width, the single-sample
// buffers, the register map and running it from the low-speed bus clock (rather than an
// audio clock of its own) are this design's choices.
module ahb_i2s
  import jsoc_pkg::*;
#(
  parameter logic [15:0] DIV_RESET = 16'd8
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     hsel,
  input  logic     hready_in,
  input  ahb_m2s_t m,
  output ahb_s2m_t s,
  output logic     sck,
  output logic     ws,
  output logic     sd_out,
  input  logic     sd_in,
  output logic     irq
);
  // ---------------- register slave ----------------
  logic       wr_pend, rd_pend;
  logic [2:0] widx, ridx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_pend <= 1'b0; rd_pend <= 1'b0; widx <= '0; ridx <= '0;
    end else if (hready_in) begin
      wr_pend <= hsel && m.htrans[1] && m.hwrite;
      rd_pend <= hsel && m.htrans[1] && !m.hwrite;
      widx    <= m.haddr[4:2];
      ridx    <= m.haddr[4:2];
    end
  end

  logic [31:0] tx_buf, tx_sh, rx_sh, rx_data;
  logic [15:0] div, cnt;
  logic [4:0]  slot;
  logic [2:0]  ctrl;
  logic [1:0]  sd_sync;
  logic        tx_full, rx_valid, underrun, overrun, rd_rx;

  assign rd_rx = rd_pend && hready_in && ridx == 3'd1;

  always_comb begin
    s = AHB_S2M_OKAY;
    case (ridx)
      3'd0:    s.hrdata = tx_buf;
      3'd1:    s.hrdata = rx_data;
      3'd2:    s.hrdata = {28'h0, overrun, underrun, rx_valid, tx_full};
      3'd3:    s.hrdata = {29'h0, ctrl};
      3'd4:    s.hrdata = {16'h0, div};
      default: s.hrdata = 32'h0;
    endcase
  end

  // ---------------- I2S link ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_buf <= '0; tx_sh <= '0; rx_sh <= '0; rx_data <= '0; div <= DIV_RESET; cnt <= '0;
      slot <= '0; ctrl <= '0; sd_sync <= '0; sck <= 1'b0;
      tx_full <= 1'b0; rx_valid <= 1'b0; underrun <= 1'b0; overrun <= 1'b0;
    end else begin
      sd_sync <= {sd_sync[0], sd_in};
      if (rd_rx) rx_valid <= 1'b0;
      if (wr_pend) begin
        case (widx)
          3'd0: begin tx_buf <= m.hwdata; tx_full <= 1'b1; end
          3'd2: begin
            if (m.hwdata[2]) underrun <= 1'b0;
            if (m.hwdata[3]) overrun  <= 1'b0;
          end
          3'd3: begin
            ctrl <= m.hwdata[2:0];
            if (m.hwdata[0] && !ctrl[0]) begin       // enabling: start a new frame
              slot <= '0; sck <= 1'b0; cnt <= div - 16'd1;
              tx_sh   <= tx_full ? tx_buf : 32'h0;
              tx_full <= 1'b0;
              if (!tx_full) underrun <= 1'b1;
            end
          end
          3'd4: div <= (m.hwdata[15:0] < 16'd3) ? 16'd3 : m.hwdata[15:0];
          default: ;
        endcase
      end
      if (!ctrl[0]) begin
        sck <= 1'b0;
      end else if (cnt != 0) begin
        cnt <= cnt - 16'd1;
      end else begin
        cnt <= div - 16'd1;
        sck <= !sck;
        if (!sck) begin                               // rising edge: sample
          rx_sh <= {rx_sh[30:0], sd_sync[1]};
          if (slot == 5'd31) begin
            rx_data  <= {rx_sh[30:0], sd_sync[1]};
            rx_valid <= 1'b1;
            if (rx_valid && !rd_rx) overrun <= 1'b1;
          end
        end else begin                                // falling edge: next slot
          slot <= slot + 5'd1;
          if (slot == 5'd31) begin
            tx_sh <= tx_full ? tx_buf : 32'h0;
            if (!(wr_pend && widx == 3'd0)) tx_full <= 1'b0;
            if (!tx_full) underrun <= 1'b1;
          end else begin
            tx_sh <= {tx_sh[30:0], 1'b0};
          end
        end
      end
    end
  end

  // WS changes one SCK period before the MSB of each channel
  assign ws     = ctrl[0] && slot >= 5'd15 && slot != 5'd31;
  assign sd_out = ctrl[0] && tx_sh[31];
  assign irq    = ctrl[0] && ((ctrl[1] && !tx_full) || (ctrl[2] && rx_valid));
endmodule
