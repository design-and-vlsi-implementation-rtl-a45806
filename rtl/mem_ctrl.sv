// mem_ctrl: the memory system, an AHB slave on the low-speed layer for 0x00000000-
// 0x7FFFFFFF driving an external asynchronous memory bus shared by a flash (chip select 0,
// HADDR[30]=0) and an SRAM (chip select 1, HADDR[30]=1).
// Each AHB transfer becomes one external access: the address, byte enables and chip
// select are registered, the strobe (OE for reads, WE for writes) is held for
// WAIT_STATES+1 cycles, read data is sampled in the last strobe cycle, and HREADY returns
// high in the following cycle. Writes spend one extra cycle capturing HWDATA. The address
// and data stay valid one cycle after the strobe ends, so the memories see stable inputs.
// A read therefore takes WAIT_STATES+3 cycles, a write WAIT_STATES+4.
//
// From the SoC description: the memory system is a low-speed AHB slave for 0x0-0x7FFFFFFF and the boot
// image lives in external flash. The chip selects, the SRAM and the wait-state timing are
// this design's own.
module mem_ctrl
  import jsoc_pkg::*;
#(
  parameter int ADDR_W = 22,
  parameter int WAIT_STATES = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              hsel,
  input  logic              hready_in,
  input  ahb_m2s_t          m,
  output ahb_s2m_t          s,
  output logic [ADDR_W-1:0] ext_addr,
  output logic [31:0]       ext_wdata,
  input  logic [31:0]       ext_rdata,
  output logic              ext_data_oe,
  output logic [1:0]        ext_cs_n,
  output logic              ext_oe_n,
  output logic              ext_we_n,
  output logic [3:0]        ext_be_n
);
  typedef enum logic [1:0] {M_IDLE, M_WDATA, M_ACC, M_DONE} state_e;
  state_e      state;
  logic        accept, write_q, cs_q;
  logic [7:0]  cnt;
  logic [31:0] rdata_q;
  logic [3:0]  be;

  assign accept = hsel && hready_in && m.htrans[1];

  always_comb begin
    case (m.hsize)
      3'd0:    be = 4'b0001 << m.haddr[1:0];
      3'd1:    be = m.haddr[1] ? 4'b1100 : 4'b0011;
      default: be = 4'b1111;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= M_IDLE;
      write_q   <= 1'b0;
      cs_q      <= 1'b0;
      cnt       <= '0;
      rdata_q   <= '0;
      ext_addr  <= '0;
      ext_wdata <= '0;
      ext_be_n  <= 4'hF;
    end else begin
      case (state)
        M_WDATA: begin
          ext_wdata <= m.hwdata;
          state     <= M_ACC;
        end
        M_ACC: begin
          cnt <= cnt + 8'd1;
          if (int'(cnt) == WAIT_STATES) begin
            rdata_q <= ext_rdata;
            state   <= M_DONE;
          end
        end
        default: begin  // M_IDLE, M_DONE: HREADY high
          if (accept) begin
            ext_addr <= m.haddr[ADDR_W+1:2];
            ext_be_n <= ~be;
            cs_q     <= m.haddr[30];
            write_q  <= m.hwrite;
            cnt      <= '0;
            state    <= m.hwrite ? M_WDATA : M_ACC;
          end else begin
            state <= M_IDLE;
          end
        end
      endcase
    end
  end

  assign ext_cs_n    = (state == M_ACC) ? ~(2'b01 << cs_q) : 2'b11;
  assign ext_oe_n    = !(state == M_ACC && !write_q);
  assign ext_we_n    = !(state == M_ACC && write_q);
  assign ext_data_oe = write_q && (state == M_ACC || state == M_DONE);

  always_comb begin
    s        = AHB_S2M_OKAY;
    s.hready = (state == M_IDLE || state == M_DONE);
    s.hrdata = rdata_q;
  end
endmodule
