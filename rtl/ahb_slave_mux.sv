// ahb_slave_mux: AHB address decoder and slave-to-master response multiplexer.
// The region HADDR[31:28] is mapped to a slave index by the MAP table (one byte per
// region, region 0 in the low byte). HSEL is decoded from the current address phase;
// the slave selected at an accepted address phase (HREADY high) is remembered and its
// HRDATA/HREADY/HRESP are returned during the following data phase. After reset the data
// phase belongs to slave RESET_SLAVE, which must answer HREADY high when idle.
//
// Helper of this design; the region table it is given follows the SoC address map.
module ahb_slave_mux
  import jsoc_pkg::*;
#(
  parameter int NS = 3,
  parameter logic [15:0][7:0] MAP = '0,
  parameter int RESET_SLAVE = 0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [31:0]   haddr,
  output logic [NS-1:0] hsel,
  input  ahb_s2m_t      s_in [NS],
  output ahb_s2m_t      s_out
);
  localparam int SW = (NS > 1) ? $clog2(NS) : 1;
  logic [SW-1:0] sel_a, sel_d;

  assign sel_a = SW'(MAP[haddr[31:28]]);

  always_comb begin
    hsel = '0;
    hsel[sel_a] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            sel_d <= SW'(RESET_SLAVE);
    else if (s_out.hready) sel_d <= sel_a;
  end

  assign s_out = s_in[sel_d];
endmodule
