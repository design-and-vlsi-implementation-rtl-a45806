// clk_manager: APB slave holding the clock and pad configuration.
//   0x00 RATIO  [3:0]    high-speed to low-speed AHB clock ratio (reset RATIO_RESET)
//   0x04 GATE   [NG-1:0] clock enables of the gateable module clocks, bit 0 the debug
//                        module (reset: all running); writing 0 shuts a clock down
//   0x08 IO_REG [NIO-1:0] pad owner select of the IO reuse multiplexers (reset 0)
// Registers are written in the APB ENABLE cycle; reads return zero-extended values.
//
// From the SoC description: clk_manager stores the frequency ratio and clock configuration and io_reg
// lives in a special register. Placing io_reg in clk_manager and the register layout are
// this design's own choices.
module clk_manager
  import jsoc_pkg::*;
#(
  parameter int NG = 2,
  parameter int NIO = 8,
  parameter logic [3:0] RATIO_RESET = 4'd2
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           psel,
  input  apb_m2s_t       apb,
  output logic [31:0]    prdata,
  output logic [3:0]     ratio,
  output logic [NG-1:0]  gate,
  output logic [NIO-1:0] io_reg
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ratio  <= RATIO_RESET;
      gate   <= '1;
      io_reg <= '0;
    end else if (psel && apb.penable && apb.pwrite) begin
      case (apb.paddr[3:2])
        2'd0: ratio  <= apb.pwdata[3:0];
        2'd1: gate   <= apb.pwdata[NG-1:0];
        2'd2: io_reg <= apb.pwdata[NIO-1:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    case (apb.paddr[3:2])
      2'd0:    prdata = 32'(ratio);
      2'd1:    prdata = 32'(gate);
      2'd2:    prdata = 32'(io_reg);
      default: prdata = 32'h0;
    endcase
  end
endmodule
