// apb_timer: 32-bit down-counting timer on the APB.
//   0x00 LOAD   reload value; writing it also loads the counter
//   0x04 VALUE  current count, read only
//   0x08 CTRL   bit0 enable, bit1 periodic (reload from LOAD on expiry, else stop),
//               bit2 interrupt enable
//   0x0C STATUS bit0 expired; write 1 to clear
// While enabled the counter decrements once per clock. When it reaches zero, expired is
// set and the counter reloads (periodic) or the timer disables itself (one-shot). irq is
// expired AND interrupt enable.
//
// From the SoC description: a timer sits on the APB. Its registers and modes are this design's own.
module apb_timer
  import jsoc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        psel,
  input  apb_m2s_t    apb,
  output logic [31:0] prdata,
  output logic        irq
);
  logic [31:0] load, value;
  logic        en, periodic, irq_en, expired, wr;

  assign wr = psel && apb.penable && apb.pwrite;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      load <= '0; value <= '0;
      en <= 1'b0; periodic <= 1'b0; irq_en <= 1'b0; expired <= 1'b0;
    end else begin
      if (en) begin
        if (value == 32'd0) begin
          expired <= 1'b1;
          value   <= load;
          if (!periodic) en <= 1'b0;
        end else begin
          value <= value - 32'd1;
        end
      end
      if (wr) begin
        case (apb.paddr[3:2])
          2'd0: begin load <= apb.pwdata; value <= apb.pwdata; end
          2'd2: {irq_en, periodic, en} <= apb.pwdata[2:0];
          2'd3: if (apb.pwdata[0]) expired <= 1'b0;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    case (apb.paddr[3:2])
      2'd0:    prdata = load;
      2'd1:    prdata = value;
      2'd2:    prdata = {29'h0, irq_en, periodic, en};
      default: prdata = {31'h0, expired};
    endcase
  end

  assign irq = expired && irq_en;
endmodule
