// jsoc_top: the JM8BC013A Java system-on-chip, without its Java core.
// Structure (dual-AHB AMBA system):
//   high-speed AHB (hclk): masters debug module (0, highest priority), Java core (1),
//     DMA controller (2, lowest); slaves AHB-to-AHB bridge (regions 0x0-0xD),
//     DMA registers (0xE), default slave (0xF). The FPU is attached to the core directly
//     through the extension module (fpu_ext), not to the bus.
//   low-speed AHB (lclk = hclk / ratio): master AHB-to-AHB bridge; slaves memory system
//     (0x0-0x7), AHB-to-APB bridge (0x8), LCD, VGA, USB (0x9-0xB), I2S controller
//     (0xC), Ethernet (0xD).
//   APB (lclk): slots UART, Timer, IRQ, GPIO, I2C, PS2, SPI, clk_manager at 0x8n000000.
//   clk_gen makes hclk, lclk and the gated debug and FPU clocks from clk_in as set in
//     clk_manager; clk_manager also holds io_reg, which selects per pad whether the GPIO
//     or the alternate function owns it (io_reuse).
// After reset the debug module copies the boot image from external flash into the core's
// inner RAMs (ram_* port) while core_rst_n holds the core in reset; core_rst_n rises when
// the image has been loaded. The Java core and the LCD/VGA/USB/Ethernet controllers are
// outside this module: their bus ports, clocks and interrupt lines are ports of the top.
// The UART, I2C, PS2, SPI and I2S controllers reach their pads as the alternate function
// of pads 0-13 (NIO must be at least 15). Interrupt sources: 0 timer, 1 DMA, 2 UART,
// 3 I2C, 4 PS2, 5 SPI, 6 I2S, 7-10 ext_irq.
//
// From the SoC description: the bus structure, masters, slaves, priorities, address map, FPU
// placement, clocking and IO reuse. Which pads are reused and how (NIO = 16, the
// alternate functions on pads 0-13), the interrupt numbering and the widths are this
// design's own.
module jsoc_top
  import jsoc_pkg::*;
#(
  parameter int NIO        = 16,
  parameter int MEM_ADDR_W = 22,
  parameter int MEM_WAIT   = 2
) (
  input  logic             clk_in,
  input  logic             rst_n,
  // Java core
  output logic             core_clk,
  output logic             core_rst_n,
  input  ahb_m2s_t         core_m,
  input  logic             core_busreq,
  output logic             core_grant,
  output ahb_s2m_t         core_s,
  output logic             core_irq,
  output logic             ram_we,
  output logic [1:0]       ram_sel,
  output logic [13:0]      ram_addr,
  output logic [31:0]      ram_wdata,
  output logic             boot_error,
  input  logic             uc_valid,
  input  logic [7:0]       uc,
  input  logic [31:0]      tos,
  input  logic [31:0]      nos,
  output logic             fpu_stall,
  output logic             fpu_tos_we,
  output logic [31:0]      fpu_tos_wdata,
  // low-speed clock domain for the controllers outside
  output logic             ls_clk,
  output logic             ls_rst_n,
  // low-speed AHB slaves LCD, VGA, USB, Ethernet (index 0-3)
  output ahb_m2s_t         ls_m,
  output logic [3:0]       ls_hsel,
  output logic             ls_hready,
  input  ahb_s2m_t         ls_ext_s [4],
  // interrupt lines of the LCD, VGA, USB and Ethernet controllers
  input  logic [3:0]       ext_irq,
  // external memory bus (flash on cs 0, SRAM on cs 1)
  output logic [MEM_ADDR_W-1:0] ext_addr,
  output logic [31:0]      ext_wdata,
  input  logic [31:0]      ext_rdata,
  output logic             ext_data_oe,
  output logic [1:0]       ext_cs_n,
  output logic             ext_oe_n,
  output logic             ext_we_n,
  output logic [3:0]       ext_be_n,
  // reused pads: GPIO, or the alternate function (pads 0-13 UART, I2C, PS2, SPI and
  // I2S as listed below)
  output logic [NIO-1:0]   pad_out,
  output logic [NIO-1:0]   pad_oe,
  input  logic [NIO-1:0]   pad_in,
  // alternate function of pads 14 and up, for controllers outside
  input  logic [NIO-1:14]  alt_out_hi,
  input  logic [NIO-1:14]  alt_oe_hi,
  output logic [NIO-1:14]  alt_in_hi
);
  // ---------------- clocks and resets ----------------
  logic       hclk, lclk, hrst_n, lrst_n;
  logic [1:0] gclk;
  logic [3:0] ratio;
  logic [1:0] gate;
  logic [NIO-1:0] io_reg;

  rst_sync u_hrst (.clk(clk_in), .rst_in_n(rst_n), .rst_out_n(hrst_n));
  rst_sync u_lrst (.clk(lclk), .rst_in_n(rst_n), .rst_out_n(lrst_n));

  clk_gen #(.NG(2)) u_clk_gen (
    .clk_in, .rst_n(hrst_n), .ratio_cfg(ratio), .gate_cfg(gate), .hclk, .lclk, .gclk
  );

  assign core_clk = hclk;
  assign ls_clk   = lclk;
  assign ls_rst_n = lrst_n;

  // ---------------- high-speed AHB ----------------
  ahb_m2s_t hs_min [3];
  logic [2:0] hs_busreq, hs_grant;
  ahb_s2m_t hs_resp, hs_sin [3];
  ahb_m2s_t hs_sreq;
  logic [2:0] hs_hsel;
  logic boot_done, dma_irq;

  debug_loader u_debug (
    .clk(gclk[0]), .rst_n(hrst_n),
    .hbusreq(hs_busreq[0]), .hgrant(hs_grant[0]), .m(hs_min[0]), .s(hs_resp),
    .ram_we, .ram_sel, .ram_addr, .ram_wdata, .done(boot_done), .error(boot_error)
  );

  assign hs_min[1]    = core_m;
  assign hs_busreq[1] = core_busreq;
  assign core_grant   = hs_grant[1];
  assign core_s       = hs_resp;
  assign core_rst_n   = hrst_n && boot_done;

  dma_ctrl u_dma (
    .clk(hclk), .rst_n(hrst_n),
    .hsel(hs_hsel[1]), .hready_in(hs_resp.hready), .cfg_m(hs_sreq), .cfg_s(hs_sin[1]),
    .hbusreq(hs_busreq[2]), .hgrant(hs_grant[2]), .mst_m(hs_min[2]), .mst_s(hs_resp),
    .irq(dma_irq)
  );

  ahb_hs_bus u_hs_bus (
    .clk(hclk), .rst_n(hrst_n),
    .m_in(hs_min), .hbusreq(hs_busreq), .hgrant(hs_grant), .m_resp(hs_resp),
    .s_req(hs_sreq), .hsel(hs_hsel), .s_in(hs_sin)
  );

  ahb_default_slave u_dflt (
    .clk(hclk), .rst_n(hrst_n), .hsel(hs_hsel[2]), .hready_in(hs_resp.hready),
    .m(hs_sreq), .s(hs_sin[2])
  );

  // ---------------- FPU in the core's extension module ----------------
  fpu_ext u_fpu_ext (
    .clk(gclk[1]), .rst_n(hrst_n), .uc_valid, .uc, .tos, .nos,
    .stall(fpu_stall), .tos_we(fpu_tos_we), .tos_wdata(fpu_tos_wdata)
  );

  // ---------------- bridge to the low-speed AHB ----------------
  ahb_m2s_t ls_req;
  ahb_s2m_t ls_resp, ls_sin [7];
  logic [6:0] ls_sel;

  ahb2ahb_bridge u_h2l (
    .hclk, .hrst_n, .hsel(hs_hsel[0]), .hready_in(hs_resp.hready), .hs_m(hs_sreq),
    .hs_s(hs_sin[0]), .lclk, .lrst_n, .ls_m(ls_req), .ls_s(ls_resp)
  );

  ahb_ls_bus u_ls_bus (
    .clk(lclk), .rst_n(lrst_n), .m(ls_req), .m_resp(ls_resp), .hsel(ls_sel), .s_in(ls_sin)
  );

  mem_ctrl #(.ADDR_W(MEM_ADDR_W), .WAIT_STATES(MEM_WAIT)) u_mem (
    .clk(lclk), .rst_n(lrst_n), .hsel(ls_sel[0]), .hready_in(ls_resp.hready), .m(ls_req),
    .s(ls_sin[0]), .ext_addr, .ext_wdata, .ext_rdata, .ext_data_oe, .ext_cs_n, .ext_oe_n,
    .ext_we_n, .ext_be_n
  );

  logic i2s_irq, i2s_sck, i2s_ws, i2s_sd_out, i2s_sd_in;

  ahb_i2s u_i2s (
    .clk(lclk), .rst_n(lrst_n), .hsel(ls_sel[5]), .hready_in(ls_resp.hready), .m(ls_req),
    .s(ls_sin[5]), .sck(i2s_sck), .ws(i2s_ws), .sd_out(i2s_sd_out), .sd_in(i2s_sd_in),
    .irq(i2s_irq)
  );

  assign ls_sin[2] = ls_ext_s[0];
  assign ls_sin[3] = ls_ext_s[1];
  assign ls_sin[4] = ls_ext_s[2];
  assign ls_sin[6] = ls_ext_s[3];
  assign ls_m      = ls_req;
  assign ls_hsel   = {ls_sel[6], ls_sel[4:2]};
  assign ls_hready = ls_resp.hready;

  // ---------------- APB ----------------
  logic [APB_NSLV-1:0] psel;
  logic [31:0] prdata [APB_NSLV];
  logic timer_irq, uart_irq, i2c_irq, ps2_irq, spi_irq, txd, rxd;
  logic scl_oe, sda_oe, ps2_clk_oe, ps2_dat_oe, sclk, mosi, miso, ss_n;
  logic [NIO-1:0] gpio_out, gpio_oe, gpio_in, alt_out, alt_oe, alt_in;

  apb_m2s_t apb;

  ahb2apb_bridge u_h2p (
    .clk(lclk), .rst_n(lrst_n), .hsel(ls_sel[1]), .hready_in(ls_resp.hready), .m(ls_req),
    .s(ls_sin[1]), .apb, .psel, .prdata
  );

  apb_timer u_timer (
    .clk(lclk), .rst_n(lrst_n), .psel(psel[APB_TIMER]), .apb, .prdata(prdata[APB_TIMER]),
    .irq(timer_irq)
  );

  apb_irq #(.N(11)) u_irq (
    .clk(lclk), .rst_n(lrst_n), .psel(psel[APB_IRQ]), .apb, .prdata(prdata[APB_IRQ]),
    .src({ext_irq, i2s_irq, spi_irq, ps2_irq, i2c_irq, uart_irq, dma_irq, timer_irq}), .irq(core_irq)
  );

  apb_gpio #(.W(NIO)) u_gpio (
    .clk(lclk), .rst_n(lrst_n), .psel(psel[APB_GPIO]), .apb, .prdata(prdata[APB_GPIO]),
    .gpio_out, .gpio_oe, .gpio_in
  );

  clk_manager #(.NG(2), .NIO(NIO)) u_clk_mgr (
    .clk(lclk), .rst_n(lrst_n), .psel(psel[APB_CLKMGR]), .apb,
    .prdata(prdata[APB_CLKMGR]), .ratio, .gate, .io_reg
  );

  apb_uart u_uart (
    .clk(lclk), .rst_n(lrst_n), .psel(psel[APB_UART]), .apb, .prdata(prdata[APB_UART]),
    .txd, .rxd, .irq(uart_irq)
  );

  apb_i2c u_i2c (
    .clk(lclk), .rst_n(lrst_n), .psel(psel[APB_I2C]), .apb, .prdata(prdata[APB_I2C]),
    .scl_in(alt_in[2]), .sda_in(alt_in[3]), .scl_oe, .sda_oe, .irq(i2c_irq)
  );

  apb_ps2 u_ps2 (
    .clk(lclk), .rst_n(lrst_n), .psel(psel[APB_PS2]), .apb, .prdata(prdata[APB_PS2]),
    .ps2_clk_in(alt_in[4]), .ps2_dat_in(alt_in[5]), .ps2_clk_oe, .ps2_dat_oe, .irq(ps2_irq)
  );

  apb_spi u_spi (
    .clk(lclk), .rst_n(lrst_n), .psel(psel[APB_SPI]), .apb, .prdata(prdata[APB_SPI]),
    .sclk, .mosi, .miso, .ss_n, .irq(spi_irq)
  );

  // ---------------- IO reuse ----------------
  // Alternate functions: 0 TXD, 1 RXD, 2 SCL, 3 SDA, 4 PS2 clock, 5 PS2 data (the four
  // open-drain lines drive 0 when enabled), 6 SCLK, 7 MOSI, 8 MISO, 9 SS_n, 10 I2S SCK,
  // 11 I2S WS, 12 I2S SD out, 13 I2S SD in; pads 14 and up belong to the alt_* ports.
  // The inputs of deselected pads read IDLE2 (the idle level of each line).
  assign alt_out   = {alt_out_hi, 1'b0, i2s_sd_out, i2s_ws, i2s_sck, ss_n, 1'b0, mosi, sclk,
                      4'b0000, 1'b0, txd};
  assign alt_oe    = {alt_oe_hi, 1'b0, 3'b111, 1'b1, 1'b0, 1'b1, 1'b1, ps2_dat_oe, ps2_clk_oe,
                      sda_oe, scl_oe, 1'b0, 1'b1};
  assign rxd       = alt_in[1];
  assign miso      = alt_in[8];
  assign i2s_sd_in = alt_in[13];
  assign alt_in_hi = alt_in[NIO-1:14];

  io_reuse #(.W(NIO), .IDLE2(NIO'(16'h013E))) u_io (
    .sel(io_reg), .out1(gpio_out), .oe1(gpio_oe), .out2(alt_out), .oe2(alt_oe),
    .pad_out, .pad_oe, .pad_in, .in1(gpio_in), .in2(alt_in)
  );
endmodule
