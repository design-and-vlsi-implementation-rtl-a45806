// apb_uart: UART on the APB, 8 data bits, no parity, 1 stop bit, LSB first.
//   0x00 DATA   write: send a byte (ignored while the transmitter is busy);
//               read: the last received byte, clears rx_valid
//   0x04 STATUS bit0 tx busy, bit1 rx_valid, bit2 overrun (a byte arrived while
//               rx_valid was set; cleared by reading DATA)
//   0x08 DIV    clock cycles per bit (reset DIV_RESET, minimum 2)
//   0x0C CTRL   bit0 receive interrupt enable
// The transmitter shifts a 10-bit frame out at DIV cycles per bit. The receiver
// synchronises rxd, waits for a falling edge, samples the start bit at half a bit time
// and each following bit one bit time later, and stores the byte if the stop bit is 1.
// irq is rx_valid AND receive interrupt enable.
//
// From the SoC description: a UART sits on the APB. Frame format, registers and sampling are this
// design's own.
module apb_uart
  import jsoc_pkg::*;
#(
  parameter logic [15:0] DIV_RESET = 16'd16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        psel,
  input  apb_m2s_t    apb,
  output logic [31:0] prdata,
  output logic        txd,
  input  logic        rxd,
  output logic        irq
);
  logic [15:0] div;
  logic        rx_ie, wr, rd_data;
  // transmitter
  logic [9:0]  tx_sh;
  logic [3:0]  tx_bits;
  logic [15:0] tx_cnt;
  // receiver
  logic [1:0]  rx_sync;
  logic        rx_busy, rx_valid, overrun;
  logic [7:0]  rx_sh, rx_data;
  logic [3:0]  rx_bits;
  logic [15:0] rx_cnt;

  assign wr      = psel && apb.penable && apb.pwrite;
  assign rd_data = psel && apb.penable && !apb.pwrite && apb.paddr[3:2] == 2'd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= DIV_RESET; rx_ie <= 1'b0;
      tx_sh <= '1; tx_bits <= '0; tx_cnt <= '0;
      rx_sync <= 2'b11; rx_busy <= 1'b0; rx_valid <= 1'b0; overrun <= 1'b0;
      rx_sh <= '0; rx_data <= '0; rx_bits <= '0; rx_cnt <= '0;
    end else begin
      // register writes
      if (wr) begin
        case (apb.paddr[3:2])
          2'd0: if (tx_bits == 0) begin
            tx_sh   <= {1'b1, apb.pwdata[7:0], 1'b0};
            tx_bits <= 4'd10;
            tx_cnt  <= div - 16'd1;
          end
          2'd2: div   <= (apb.pwdata[15:0] < 16'd2) ? 16'd2 : apb.pwdata[15:0];
          2'd3: rx_ie <= apb.pwdata[0];
          default: ;
        endcase
      end
      // transmitter
      if (tx_bits != 0) begin
        if (tx_cnt == 0) begin
          tx_sh   <= {1'b1, tx_sh[9:1]};
          tx_bits <= tx_bits - 4'd1;
          tx_cnt  <= div - 16'd1;
        end else begin
          tx_cnt <= tx_cnt - 16'd1;
        end
      end
      // receiver
      rx_sync <= {rx_sync[0], rxd};
      if (rd_data) begin rx_valid <= 1'b0; overrun <= 1'b0; end
      if (!rx_busy) begin
        if (!rx_sync[1]) begin
          rx_busy <= 1'b1;
          rx_bits <= 4'd0;
          rx_cnt  <= (div >> 1) - 16'd1;
        end
      end else if (rx_cnt != 0) begin
        rx_cnt <= rx_cnt - 16'd1;
      end else begin
        rx_cnt  <= div - 16'd1;
        rx_bits <= rx_bits + 4'd1;
        if (rx_bits == 4'd0) begin
          if (rx_sync[1]) rx_busy <= 1'b0;       // false start bit
        end else if (rx_bits <= 4'd8) begin
          rx_sh <= {rx_sync[1], rx_sh[7:1]};
        end else begin
          rx_busy <= 1'b0;
          if (rx_sync[1]) begin
            rx_data  <= rx_sh;
            rx_valid <= 1'b1;
            if (rx_valid && !rd_data) overrun <= 1'b1;
          end
        end
      end
    end
  end

  assign txd = tx_sh[0];
  assign irq = rx_valid && rx_ie;

  always_comb begin
    case (apb.paddr[3:2])
      2'd0:    prdata = {24'h0, rx_data};
      2'd1:    prdata = {29'h0, overrun, rx_valid, tx_bits != 0};
      2'd2:    prdata = {16'h0, div};
      default: prdata = {31'h0, rx_ie};
    endcase
  end
endmodule
