// apb_ps2: PS/2 host port (keyboard or mouse) on the APB.
//   0x00 DATA   read: last received byte, clears rx_valid; write: send a byte to the
//               device (ignored while a send is running)
//   0x04 STATUS bit0 rx_valid, bit1 parity error in the last received frame, bit2 send
//               busy, bit3 the device did not acknowledge the last byte sent
//   0x08 CTRL   bit0 receive interrupt enable
//   0x0C HOLD   clock-low time in clk cycles that requests a send (reset HOLD_RESET; the
//               PS/2 protocol asks for at least 100 us)
// Both lines are open drain: ps2_clk_oe / ps2_dat_oe pull the pad low, otherwise the pad
// is released to its pull-up, and the inputs are the pad levels through two-flop
// synchronisers. Receiving: the device clocks out an 11-bit frame (start 0, 8 data bits
// LSB first, odd parity, stop 1); the host samples the data line at each falling clock
// edge. A frame whose start bit is not 0 is dropped, and a frame that stalls for
// TIMEOUT cycles is abandoned. Sending: the host holds the clock low for HOLD cycles,
// pulls the data line low (start bit) and releases the clock; at each falling edge of the
// device's clock it presents the next bit (8 data bits, odd parity, stop = released), and
// at the eleventh falling edge it reads the device's acknowledge (data low).
// irq is rx_valid AND receive interrupt enable.
//
// From the SoC description: a PS2 controller sits on the APB (slot 5). The register map,
// the timeout and the use of open-drain pads through IO reuse are this design's own; the
// frame format is that of the PS/2 standard.
module apb_ps2
  import jsoc_pkg::*;
#(
  parameter logic [15:0] HOLD_RESET = 16'd5000,
  parameter int unsigned TIMEOUT    = 50000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        psel,
  input  apb_m2s_t    apb,
  output logic [31:0] prdata,
  input  logic        ps2_clk_in,
  input  logic        ps2_dat_in,
  output logic        ps2_clk_oe,
  output logic        ps2_dat_oe,
  output logic        irq
);
  typedef enum logic [1:0] {TX_IDLE, TX_HOLD, TX_SEND} tx_state_e;
  tx_state_e   tx_state;
  logic [2:0]  clk_sync;        // [2] is the previous value of [1]
  logic [1:0]  dat_sync;
  logic        fall, wr, rd_data, ie, rx_valid, perr, nack;
  logic [15:0] hold, hold_cnt;
  logic [3:0]  rx_bits, tx_bits;
  logic [9:0]  rx_sh;
  logic [7:0]  rx_data;
  logic [9:0]  tx_sh;           // {stop, parity, data}
  logic [$clog2(TIMEOUT+1)-1:0] idle_cnt;

  assign wr      = psel && apb.penable && apb.pwrite;
  assign rd_data = psel && apb.penable && !apb.pwrite && apb.paddr[3:2] == 2'd0;
  assign fall    = clk_sync[2] && !clk_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_state <= TX_IDLE; clk_sync <= '1; dat_sync <= '1;
      ie <= 1'b0; rx_valid <= 1'b0; perr <= 1'b0; nack <= 1'b0;
      hold <= HOLD_RESET; hold_cnt <= '0; rx_bits <= '0; tx_bits <= '0;
      rx_sh <= '0; rx_data <= '0; tx_sh <= '1; idle_cnt <= '0;
    end else begin
      clk_sync <= {clk_sync[1:0], ps2_clk_in};
      dat_sync <= {dat_sync[0], ps2_dat_in};
      if (rd_data) rx_valid <= 1'b0;
      if (wr) begin
        case (apb.paddr[3:2])
          2'd0: if (tx_state == TX_IDLE) begin
            tx_sh    <= {1'b1, ~^apb.pwdata[7:0], apb.pwdata[7:0]};
            tx_state <= TX_HOLD;
            hold_cnt <= hold;
            tx_bits  <= '0;
            rx_bits  <= '0;
          end
          2'd2: ie   <= apb.pwdata[0];
          2'd3: hold <= apb.pwdata[15:0];
          default: ;
        endcase
      end
      case (tx_state)
        TX_IDLE: begin
          // receiver
          if (fall) begin
            idle_cnt <= '0;
            if (rx_bits == 4'd0) begin
              if (!dat_sync[1]) rx_bits <= 4'd1;     // start bit
            end else if (rx_bits == 4'd10) begin
              rx_bits <= 4'd0;
              if (dat_sync[1]) begin                 // stop bit
                rx_data  <= rx_sh[8:1];
                rx_valid <= 1'b1;
                perr     <= !(^rx_sh[9:1]);          // odd parity over data + parity
              end
            end else begin
              rx_bits <= rx_bits + 4'd1;
            end
            rx_sh <= {dat_sync[1], rx_sh[9:1]};
          end else if (rx_bits != 0) begin
            if (idle_cnt == TIMEOUT[$bits(idle_cnt)-1:0]) begin
              rx_bits  <= '0;
              idle_cnt <= '0;
            end else begin
              idle_cnt <= idle_cnt + 1'b1;
            end
          end
        end
        TX_HOLD: begin
          if (hold_cnt != 0) hold_cnt <= hold_cnt - 16'd1;
          else               tx_state <= TX_SEND;
        end
        TX_SEND: begin
          if (fall) begin
            tx_bits <= tx_bits + 4'd1;
            if (tx_bits == 4'd10) begin
              nack     <= dat_sync[1];
              tx_state <= TX_IDLE;
            end else if (tx_bits != 4'd0) begin
              tx_sh <= {1'b1, tx_sh[9:1]};
            end
          end
        end
        default: tx_state <= TX_IDLE;
      endcase
    end
  end

  // TX_SEND, before the first falling edge: the start bit (data low); from the first
  // falling edge on, tx_sh[0] is the bit on the line; after the stop bit the line is
  // released for the acknowledge.
  always_comb begin
    ps2_clk_oe = (tx_state == TX_HOLD);
    ps2_dat_oe = 1'b0;
    if (tx_state == TX_HOLD && hold_cnt < (hold >> 1)) ps2_dat_oe = 1'b1;
    if (tx_state == TX_SEND)
      ps2_dat_oe = (tx_bits == 4'd0) || (tx_bits <= 4'd9 && !tx_sh[0]);
  end

  assign irq = rx_valid && ie;

  always_comb begin
    case (apb.paddr[3:2])
      2'd0:    prdata = {24'h0, rx_data};
      2'd1:    prdata = {28'h0, nack, tx_state != TX_IDLE, perr, rx_valid};
      2'd2:    prdata = {31'h0, ie};
      default: prdata = {16'h0, hold};
    endcase
  end
endmodule
