// apb_i2c: I2C bus master on the APB, driven one byte at a time by software.
//   0x00 DATA    write: byte to send; read: last byte received
//   0x04 CMD     write: bit0 START (or repeated START) first, bit2 WRITE (send DATA and
//                read the acknowledge), bit3 READ (receive a byte, then send bit4 as the
//                acknowledge: 0 ACK, 1 NACK), bit1 STOP last; any write clears done.
//                read: STATUS bit0 busy, bit1 NACK received for the last byte written,
//                bit2 done
//   0x08 DIV     clock cycles per quarter SCL period (reset DIV_RESET, minimum 3)
//   0x0C CTRL    bit0 interrupt enable
// SCL and SDA are open drain: scl_oe / sda_oe pull the line low, otherwise it is released
// to the pull-up; the inputs are the line levels through two-flop synchronisers. Every
// bus step (START, one data or acknowledge bit, STOP) takes four quarters of DIV cycles:
//   START  SCL low/SDA high, SCL released, SDA pulled low, SCL pulled low
//   bit    SDA set while SCL is low, SCL released for two quarters (SDA sampled at the
//          end of the second), SCL pulled low
//   STOP   SCL low/SDA low, SCL released, SDA released, both stay released
// A quarter in which SCL is released does not end until SCL is seen high, so a slave
// may stretch the clock. A byte takes 36 quarters. irq is done AND interrupt enable.
// Multi-master arbitration is not supported.
//
// From the SoC description: an I2C controller sits on the APB (slot 4). The command
// interface, the register map and the quarter-period timing are this design's own; the
// bus conditions are those of the I2C standard.
module apb_i2c
  import jsoc_pkg::*;
#(
  parameter logic [15:0] DIV_RESET = 16'd63
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        psel,
  input  apb_m2s_t    apb,
  output logic [31:0] prdata,
  input  logic        scl_in,
  input  logic        sda_in,
  output logic        scl_oe,
  output logic        sda_oe,
  output logic        irq
);
  typedef enum logic [1:0] {ST_IDLE, ST_START, ST_BIT, ST_STOP} step_e;
  step_e       step;
  logic [1:0]  q;               // quarter of the current step
  logic [3:0]  bitn;            // 0-7 data bits, 8 acknowledge
  logic [15:0] div, cnt;
  logic [1:0]  scl_sync, sda_sync;
  logic        do_byte, do_stop, rd_mode, ack_bit;
  logic        ie, done, nack, wr;
  logic [7:0]  sh, tx_data, rx_data;

  assign wr = psel && apb.penable && apb.pwrite;

  // value of the bit that step ST_BIT number n puts on SDA (1 = released)
  function automatic logic bit_value(input logic [3:0] n, input logic [7:0] s,
                                     input logic rd, input logic ackb);
    if (n == 4'd8) return rd ? ackb : 1'b1;
    return rd ? 1'b1 : s[7];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step <= ST_IDLE; q <= '0; bitn <= '0; div <= DIV_RESET; cnt <= '0;
      scl_sync <= '1; sda_sync <= '1; do_byte <= 1'b0; do_stop <= 1'b0; rd_mode <= 1'b0;
      ack_bit <= 1'b0; ie <= 1'b0; done <= 1'b0; nack <= 1'b0;
      sh <= '0; tx_data <= '0; rx_data <= '0; scl_oe <= 1'b0; sda_oe <= 1'b0;
    end else begin
      scl_sync <= {scl_sync[0], scl_in};
      sda_sync <= {sda_sync[0], sda_in};
      if (wr) begin
        case (apb.paddr[3:2])
          2'd0: tx_data <= apb.pwdata[7:0];
          2'd1: if (step == ST_IDLE) begin
            done    <= 1'b0;
            do_byte <= apb.pwdata[2] || apb.pwdata[3];
            do_stop <= apb.pwdata[1];
            rd_mode <= apb.pwdata[3];
            ack_bit <= apb.pwdata[4];
            sh      <= tx_data;
            bitn    <= '0;
            q       <= '0;
            cnt     <= div - 16'd1;
            if (apb.pwdata[0]) begin
              step <= ST_START; scl_oe <= 1'b1; sda_oe <= 1'b0;
            end else if (apb.pwdata[2] || apb.pwdata[3]) begin
              step <= ST_BIT; scl_oe <= 1'b1;
              sda_oe <= !bit_value(4'd0, tx_data, apb.pwdata[3], apb.pwdata[4]);
            end else if (apb.pwdata[1]) begin
              step <= ST_STOP; scl_oe <= 1'b1; sda_oe <= 1'b1;
            end
          end
          2'd2: div <= (apb.pwdata[15:0] < 16'd3) ? 16'd3 : apb.pwdata[15:0];
          2'd3: ie  <= apb.pwdata[0];
        endcase
      end
      if (step != ST_IDLE) begin
        if (cnt != 0) begin
          cnt <= cnt - 16'd1;
        end else if (scl_oe || scl_sync[1]) begin   // wait while a slave stretches SCL
          cnt <= div - 16'd1;
          q   <= q + 2'd1;
          unique case (step)
            ST_START: unique case (q)
              2'd0: scl_oe <= 1'b0;
              2'd1: sda_oe <= 1'b1;
              2'd2: scl_oe <= 1'b1;
              2'd3: begin
                if (do_byte) begin
                  step   <= ST_BIT;
                  sda_oe <= !bit_value(4'd0, sh, rd_mode, ack_bit);
                end else if (do_stop) begin
                  step <= ST_STOP; sda_oe <= 1'b1;
                end else begin
                  step <= ST_IDLE; done <= 1'b1;
                end
              end
            endcase
            ST_BIT: unique case (q)
              2'd0: scl_oe <= 1'b0;
              2'd1: ;
              2'd2: begin
                scl_oe <= 1'b1;
                if (bitn == 4'd8) nack <= rd_mode ? nack : sda_sync[1];
                else              sh   <= {sh[6:0], sda_sync[1]};
              end
              2'd3: begin
                if (bitn != 4'd8) begin
                  bitn   <= bitn + 4'd1;
                  sda_oe <= !bit_value(bitn + 4'd1, sh, rd_mode, ack_bit);
                end else begin
                  rx_data <= sh;
                  if (do_stop) begin
                    step <= ST_STOP; sda_oe <= 1'b1;
                  end else begin
                    step <= ST_IDLE; done <= 1'b1; sda_oe <= 1'b0;
                  end
                end
              end
            endcase
            ST_STOP: unique case (q)
              2'd0: scl_oe <= 1'b0;
              2'd1: sda_oe <= 1'b0;
              2'd2: ;
              2'd3: begin step <= ST_IDLE; done <= 1'b1; end
            endcase
            default: ;
          endcase
        end
      end
    end
  end

  assign irq = done && ie;

  always_comb begin
    case (apb.paddr[3:2])
      2'd0:    prdata = {24'h0, rx_data};
      2'd1:    prdata = {29'h0, done, nack, step != ST_IDLE};
      2'd2:    prdata = {16'h0, div};
      default: prdata = {31'h0, ie};
    endcase
  end
endmodule
