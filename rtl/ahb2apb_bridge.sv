// ahb2apb_bridge: AHB slave on the low-speed layer and the only APB master.
// An accepted AHB transfer is turned into one AMBA 2 APB access: a wait cycle that
// captures HWDATA, the SETUP cycle (PSEL high, PENABLE low) and the ENABLE cycle (PENABLE
// high, PRDATA sampled), after which HREADY returns high with the read data; an AHB access
// therefore takes 4 cycles. PSEL is decoded from PADDR[27:24] inside the APB window
// 0x80000000-0x8FFFFFFF: slot 0 UART, 1 Timer, 2 IRQ, 3 GPIO, 4 I2C, 5 PS2, 6 SPI,
// 7 clk_manager; the other slots select nothing and read as zero.
//
// From the SoC description: the bridge is the only APB master, its window is 0x8xxxxxxx and it serves
// eight slaves in the order listed. The slot decode on PADDR[27:24] and the 4-cycle access
// are this design's own choices.
module ahb2apb_bridge
  import jsoc_pkg::*;
#(
  parameter int NSLV = APB_NSLV
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             hsel,
  input  logic             hready_in,
  input  ahb_m2s_t         m,
  output ahb_s2m_t         s,
  output apb_m2s_t         apb,
  output logic [NSLV-1:0]  psel,
  input  logic [31:0]      prdata [NSLV]
);
  typedef enum logic [1:0] {P_IDLE, P_WDATA, P_SETUP, P_ENABLE} state_e;
  state_e      state;
  logic [31:0] rdata_q;
  logic [3:0]  slot;
  logic        accept;

  assign accept = hsel && hready_in && m.htrans[1];
  assign slot   = apb.paddr[27:24];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= P_IDLE;
      apb        <= '0;
      rdata_q    <= '0;
    end else begin
      case (state)
        P_IDLE: if (accept) begin
          apb.paddr  <= m.haddr;
          apb.pwrite <= m.hwrite;
          state      <= P_WDATA;
        end
        P_WDATA: begin
          apb.pwdata <= m.hwdata;
          state      <= P_SETUP;
        end
        P_SETUP: begin
          apb.penable <= 1'b1;
          state       <= P_ENABLE;
        end
        P_ENABLE: begin
          apb.penable <= 1'b0;
          rdata_q     <= (int'(slot) < NSLV) ? prdata[slot[$clog2(NSLV)-1:0]] : 32'h0;
          state       <= P_IDLE;
        end
        default: state <= P_IDLE;
      endcase
    end
  end

  always_comb begin
    psel = '0;
    if ((state == P_SETUP || state == P_ENABLE) && int'(slot) < NSLV)
      psel[slot[$clog2(NSLV)-1:0]] = 1'b1;
  end

  always_comb begin
    s        = AHB_S2M_OKAY;
    s.hready = (state == P_IDLE);
    s.hrdata = rdata_q;
  end
endmodule
