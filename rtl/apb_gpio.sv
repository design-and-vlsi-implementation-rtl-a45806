// apb_gpio: general-purpose I/O controller on the APB.
//   0x00 DOUT [W-1:0] output values
//   0x04 DIR  [W-1:0] 1 = pin driven (output enable)
//   0x08 DIN  [W-1:0] pin levels, read only, through a two-flop synchroniser
// Writes happen in the APB ENABLE cycle; reads are combinational.
//
// From the SoC description: a GPIO controller sits on the APB. Its registers are this design's own.
module apb_gpio
  import jsoc_pkg::*;
#(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         psel,
  input  apb_m2s_t     apb,
  output logic [31:0]  prdata,
  output logic [W-1:0] gpio_out,
  output logic [W-1:0] gpio_oe,
  input  logic [W-1:0] gpio_in
);
  logic [W-1:0] in_s1, in_s2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gpio_out <= '0;
      gpio_oe  <= '0;
      in_s1    <= '0;
      in_s2    <= '0;
    end else begin
      in_s1 <= gpio_in;
      in_s2 <= in_s1;
      if (psel && apb.penable && apb.pwrite) begin
        case (apb.paddr[3:2])
          2'd0: gpio_out <= apb.pwdata[W-1:0];
          2'd1: gpio_oe  <= apb.pwdata[W-1:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    case (apb.paddr[3:2])
      2'd0:    prdata = 32'(gpio_out);
      2'd1:    prdata = 32'(gpio_oe);
      2'd2:    prdata = 32'(in_s2);
      default: prdata = 32'h0;
    endcase
  end
endmodule
