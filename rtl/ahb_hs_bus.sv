// ahb_hs_bus: the high-speed AHB layer.
// Three masters share it: 0 debug module, 1 Java core, 2 DMA controller, arbitrated with
// fixed priority in that order (ahb_arbiter). The address-phase signals come from the
// master that owns the address phase and HWDATA from the owner of the data phase. Three
// slaves are decoded from HADDR[31:28]: slave 0 is the AHB-to-AHB bridge to the
// low-speed layer (regions 0x0-0xD), slave 1 the DMA configuration port (0xE), slave 2 the
// default slave (0xF). The response of the data-phase slave goes back to all masters.
//
// From the SoC description: the masters, their priority and the address map (Table of AHB slaves). The
// DMA configuration port as a third slave follows the address table, which gives DMA its
// own region, where the prose names only two slaves.
module ahb_hs_bus
  import jsoc_pkg::*;
#(
  parameter int NM = 3,
  parameter int NS = 3,
  parameter int DEFAULT_MASTER = 1,
  parameter logic [15:0][7:0] MAP = {8'd2, 8'd1, {14{8'd0}}}
) (
  input  logic          clk,
  input  logic          rst_n,
  // masters
  input  ahb_m2s_t      m_in [NM],
  input  logic [NM-1:0] hbusreq,
  output logic [NM-1:0] hgrant,
  output ahb_s2m_t      m_resp,
  // slaves
  output ahb_m2s_t      s_req,
  output logic [NS-1:0] hsel,
  input  ahb_s2m_t      s_in [NS]
);
  localparam int MW = $clog2(NM);
  logic [MW-1:0] hmaster, hmaster_d;

  ahb_arbiter #(.NM(NM), .DEFAULT_MASTER(DEFAULT_MASTER)) u_arb (
    .clk, .rst_n, .hbusreq, .hready(m_resp.hready), .hgrant, .hmaster, .hmaster_d
  );

  always_comb begin
    s_req        = m_in[hmaster];
    s_req.hwdata = m_in[hmaster_d].hwdata;
  end

  ahb_slave_mux #(.NS(NS), .MAP(MAP), .RESET_SLAVE(NS - 1)) u_mux (
    .clk, .rst_n, .haddr(s_req.haddr), .hsel, .s_in, .s_out(m_resp)
  );
endmodule
