// ahb_default_slave: answers AHB accesses to unused address space.
// IDLE and BUSY transfers get a zero-wait OKAY. A NONSEQ or SEQ transfer gets the
// two-cycle ERROR response of AMBA 2 (HREADY low with ERROR, then HREADY high with ERROR),
// so a master reaching an unmapped address sees a bus error instead of hanging.
//
// From the SoC description: a default slave owns region 0xF. Answering with the AMBA ERROR response is
// this design's own choice.
module ahb_default_slave
  import jsoc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     hsel,
  input  logic     hready_in,
  input  ahb_m2s_t m,
  output ahb_s2m_t s
);
  typedef enum logic [1:0] {D_OK, D_ERR1, D_ERR2} state_e;
  state_e state;
  logic   access;

  assign access = hsel && hready_in && m.htrans[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= D_OK;
    else case (state)
      D_ERR1:  state <= D_ERR2;
      default: state <= access ? D_ERR1 : D_OK;
    endcase
  end

  always_comb begin
    s        = AHB_S2M_OKAY;
    s.hready = (state != D_ERR1);
    if (state != D_OK) s.hresp = HRESP_ERROR;
  end
endmodule
