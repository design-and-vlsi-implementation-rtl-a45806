// ahb_ls_bus: the low-speed AHB layer.
// Its only master is the AHB-to-AHB bridge, so there is no arbiter. HADDR[31:28] selects
// one of seven slaves: 0 memory system (0x0-0x7), 1 AHB-to-APB bridge (0x8), 2 LCD (0x9),
// 3 VGA (0xA), 4 USB (0xB), 5 I2S (0xC), 6 Ethernet (0xD). Regions 0xE and 0xF belong to
// the high-speed layer; should one reach this layer it is answered by an internal default
// slave (index 7) with an ERROR response.
//
// From the SoC description: the single master, the seven slaves and their regions. The internal
// default slave for 0xE/0xF is this design's own choice.
module ahb_ls_bus
  import jsoc_pkg::*;
#(
  parameter int NS = 7
) (
  input  logic          clk,
  input  logic          rst_n,
  input  ahb_m2s_t      m,
  output ahb_s2m_t      m_resp,
  output logic [NS-1:0] hsel,
  input  ahb_s2m_t      s_in [NS]
);
  localparam logic [15:0][7:0] MAP = {8'd7, 8'd7, 8'd6, 8'd5, 8'd4, 8'd3, 8'd2, 8'd1, {8{8'd0}}};
  logic [NS:0] hsel_all;
  ahb_s2m_t    s_all [NS+1];

  for (genvar i = 0; i < NS; i++) begin : g_s
    assign s_all[i] = s_in[i];
  end
  assign hsel = hsel_all[NS-1:0];

  ahb_default_slave u_dflt (
    .clk, .rst_n, .hsel(hsel_all[NS]), .hready_in(m_resp.hready), .m, .s(s_all[NS])
  );

  ahb_slave_mux #(.NS(NS + 1), .MAP(MAP), .RESET_SLAVE(NS)) u_mux (
    .clk, .rst_n, .haddr(m.haddr), .hsel(hsel_all), .s_in(s_all), .s_out(m_resp)
  );
endmodule
