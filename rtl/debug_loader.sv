// debug_loader: the debug module that initialises the Java core's inner RAMs.
// After reset it is the highest-priority master of the high-speed AHB and reads a boot
// image from external flash starting at FLASH_BASE. The image is a list of records: a
// header word {target[31:30], ram_addr[29:16], count[15:0]} followed by count data words,
// which are written to consecutive addresses of inner RAM `target` (0 microcode, 1 jump
// table, 2 variables/constants) through the ram_* write port. A header with target 3 ends
// the image: done goes high (releasing the core from reset) and the module stops
// requesting the bus, after which its clock may be shut down. A bus error stops the load
// with error set. Each word costs one AHB read through both bus layers.
//
// From the SoC description: the debug module loads microcodes, jump table and variables from external
// flash into the core's inner RAMs with the highest bus priority, then releases the bus and
// its clock may be stopped. The record format of the boot image is this design's own.
module debug_loader
  import jsoc_pkg::*;
#(
  parameter logic [31:0] FLASH_BASE = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        hbusreq,
  input  logic        hgrant,
  output ahb_m2s_t    m,
  input  ahb_s2m_t    s,
  output logic        ram_we,
  output logic [1:0]  ram_sel,
  output logic [13:0] ram_addr,
  output logic [31:0] ram_wdata,
  output logic        done,
  output logic        error
);
  typedef enum logic [2:0] {L_HDR, L_HDR_W, L_DAT, L_DAT_W, L_DONE, L_ERR} state_e;
  state_e      state;
  logic [31:0] ptr;
  logic [15:0] left;
  logic        m_req, m_busy, m_done, m_err;
  logic [31:0] m_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= L_HDR;
      ptr       <= FLASH_BASE;
      left      <= '0;
      ram_we    <= 1'b0;
      ram_sel   <= '0;
      ram_addr  <= '0;
      ram_wdata <= '0;
    end else begin
      if (ram_we) ram_addr <= ram_addr + 14'd1;
      ram_we <= 1'b0;
      case (state)
        L_HDR:   if (!m_busy) state <= L_HDR_W;
        L_HDR_W: if (m_done) begin
          ptr <= ptr + 32'd4;
          if (m_err) state <= L_ERR;
          else if (m_rdata[31:30] == 2'd3) state <= L_DONE;
          else begin
            ram_sel  <= m_rdata[31:30];
            ram_addr <= m_rdata[29:16];
            left     <= m_rdata[15:0];
            state    <= (m_rdata[15:0] == 16'd0) ? L_HDR : L_DAT;
          end
        end
        L_DAT:   if (!m_busy) state <= L_DAT_W;
        L_DAT_W: if (m_done) begin
          ptr <= ptr + 32'd4;
          if (m_err) state <= L_ERR;
          else begin
            ram_we    <= 1'b1;
            ram_wdata <= m_rdata;
            left      <= left - 16'd1;
            state     <= (left == 16'd1) ? L_HDR : L_DAT;
          end
        end
        default: ;
      endcase
    end
  end

  assign m_req = (state == L_HDR || state == L_DAT) && !m_busy;
  assign done  = (state == L_DONE);
  assign error = (state == L_ERR);

  ahb_mport u_mport (
    .clk, .rst_n, .req(m_req), .addr(ptr), .write(1'b0), .wdata(32'h0), .size(3'd2),
    .busy(m_busy), .done(m_done), .rdata(m_rdata), .err(m_err),
    .hbusreq, .hgrant, .m, .s
  );
endmodule
