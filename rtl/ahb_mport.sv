// ahb_mport: single-transfer AHB master engine shared by the bus masters (debug loader,
// DMA, low-speed side of the AHB-to-AHB bridge).
// A request (req with addr/write/wdata/size) is latched when the engine is idle. The
// engine raises HBUSREQ, waits until it is granted while HREADY is high, drives one NONSEQ
// address phase, then the data phase, and pulses done with the read data and an error
// flag (HRESP=ERROR). Bursts and locked transfers are not used: every access is a single
// NONSEQ transfer, and HBUSREQ is dropped during the address phase so that the arbiter
// can hand the next address phase to another master.
// Timing: with an immediate grant and a zero-wait slave, done comes 3 cycles after req.
//
// Helper of this design; the SoC description does not describe master interfaces.
module ahb_mport
  import jsoc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // request side
  input  logic        req,
  input  logic [31:0] addr,
  input  logic        write,
  input  logic [31:0] wdata,
  input  logic [2:0]  size,
  output logic        busy,
  output logic        done,
  output logic [31:0] rdata,
  output logic        err,
  // AHB master side
  output logic        hbusreq,
  input  logic        hgrant,
  output ahb_m2s_t    m,
  input  ahb_s2m_t    s
);
  typedef enum logic [1:0] {S_IDLE, S_REQ, S_ADDR, S_DATA} state_e;
  state_e state;
  logic [31:0] addr_q, wdata_q;
  logic        write_q;
  logic [2:0]  size_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      addr_q  <= '0;
      wdata_q <= '0;
      write_q <= 1'b0;
      size_q  <= 3'd2;
    end else begin
      case (state)
        S_IDLE: if (req) begin
          addr_q  <= addr;
          wdata_q <= wdata;
          write_q <= write;
          size_q  <= size;
          state   <= S_REQ;
        end
        S_REQ:  if (hgrant && s.hready) state <= S_ADDR;
        S_ADDR: if (s.hready) state <= S_DATA;
        S_DATA: if (s.hready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    m        = AHB_M2S_IDLE;
    m.haddr  = addr_q;
    m.hwrite = write_q;
    m.hsize  = size_q;
    m.hwdata = wdata_q;
    if (state == S_ADDR) m.htrans = HTRANS_NONSEQ;
  end

  assign hbusreq = (state == S_REQ);
  assign busy    = (state != S_IDLE);
  assign done    = (state == S_DATA) && s.hready;
  assign rdata   = s.hrdata;
  assign err     = done && (s.hresp == HRESP_ERROR);
endmodule
