// apb_spi: SPI master on the APB, 8-bit transfers, mode 0 (SCLK idle low, data sampled on
// the rising edge and changed on the falling edge), most significant bit first.
//   0x00 DATA   write: send a byte and receive one (ignored while busy);
//               read: the byte received by the last transfer
//   0x04 STATUS bit0 busy, bit1 done (set at the end of a transfer; write 1 to clear,
//               also cleared by starting a transfer)
//   0x08 DIV    clock cycles per SCLK half period (reset DIV_RESET, minimum 3)
//   0x0C CTRL   bit0 slave select active (ss_n = NOT bit0), bit1 interrupt enable
// A transfer puts bit 7 on MOSI at once, then makes 16 SCLK edges DIV cycles apart:
// each rising edge samples MISO (through a two-flop synchroniser, which is why DIV is at
// least 3), each falling edge shifts the next bit out. A byte therefore takes 16*DIV
// cycles. irq is done AND interrupt enable. The slave select is under software control
// so that multi-byte transactions keep the slave selected.
//
// From the SoC description: an SPI controller sits on the APB (slot 6). The mode,
// registers and timing are this design's own choices.
module apb_spi
  import jsoc_pkg::*;
#(
  parameter logic [15:0] DIV_RESET = 16'd4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        psel,
  input  apb_m2s_t    apb,
  output logic [31:0] prdata,
  output logic        sclk,
  output logic        mosi,
  input  logic        miso,
  output logic        ss_n,
  output logic        irq
);
  logic [15:0] div, cnt;
  logic [1:0]  ctrl;
  logic [1:0]  miso_sync;
  logic        busy, done, wr;
  logic [4:0]  edges;          // SCLK edges still to make
  logic [7:0]  tx_sh, rx_sh, rx_data;

  assign wr = psel && apb.penable && apb.pwrite;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= DIV_RESET; cnt <= '0; ctrl <= '0; miso_sync <= '0;
      busy <= 1'b0; done <= 1'b0; edges <= '0; sclk <= 1'b0;
      tx_sh <= '0; rx_sh <= '0; rx_data <= '0;
    end else begin
      miso_sync <= {miso_sync[0], miso};
      if (wr) begin
        case (apb.paddr[3:2])
          2'd0: if (!busy) begin
            tx_sh <= apb.pwdata[7:0];
            busy  <= 1'b1;
            done  <= 1'b0;
            edges <= 5'd16;
            cnt   <= div - 16'd1;
          end
          2'd1: if (apb.pwdata[1]) done <= 1'b0;
          2'd2: div  <= (apb.pwdata[15:0] < 16'd3) ? 16'd3 : apb.pwdata[15:0];
          2'd3: ctrl <= apb.pwdata[1:0];
        endcase
      end
      if (busy) begin
        if (cnt != 0) begin
          cnt <= cnt - 16'd1;
        end else begin
          cnt   <= div - 16'd1;
          sclk  <= !sclk;
          edges <= edges - 5'd1;
          if (!sclk) rx_sh <= {rx_sh[6:0], miso_sync[1]};   // rising edge: sample
          else       tx_sh <= {tx_sh[6:0], 1'b0};           // falling edge: next bit
          if (edges == 5'd1) begin
            busy    <= 1'b0;
            done    <= 1'b1;
            rx_data <= rx_sh;   // the last edge is a falling one
          end
        end
      end
    end
  end

  assign mosi = tx_sh[7];
  assign ss_n = !ctrl[0];
  assign irq  = done && ctrl[1];

  always_comb begin
    case (apb.paddr[3:2])
      2'd0:    prdata = {24'h0, rx_data};
      2'd1:    prdata = {30'h0, done, busy};
      2'd2:    prdata = {16'h0, div};
      default: prdata = {30'h0, ctrl};
    endcase
  end
endmodule
