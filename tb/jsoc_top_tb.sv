// jsoc_top_tb: end-to-end test of the SoC at its default parameters.
// The testbench stands in for the parts outside the top: the Java core (an AHB master
// engine plus microcode stimulus for the FPU), the external flash and SRAM, the four
// low-speed AHB controllers outside (memory slaves), and the board around the reused
// pads (loopback wires, pull-ups, a PS2 device sending one byte). Sequence: boot load by the
// debug module from flash into the inner RAMs; core accesses to SRAM, APB and external
// slaves across both bus layers; a bus frequency ratio change; a DMA block copy while the
// core keeps using the bus; DMA and timer interrupts through the IRQ controller; a
// default-slave error; debug clock shut-down; GPIO and IO reuse switching; UART and SPI
// bytes looped back through the reused pads, an unacknowledged I2C address byte on
// pull-up lines, a received PS2 byte, an I2S frame looped back; FPU add/sub/mul/div through the microcodes.
// Each of these mechanisms is counted and a mechanism that never happened is a failure.
module jsoc_top_tb;
  import jsoc_pkg::*;
  logic clk_in = 1'b0, rst_n = 1'b0;
  logic core_clk, core_rst_n, core_grant, core_irq, ram_we, boot_error;
  ahb_m2s_t core_m;
  ahb_s2m_t core_s;
  logic core_busreq;
  logic [1:0] ram_sel;
  logic [13:0] ram_addr;
  logic [31:0] ram_wdata;
  logic uc_valid = 1'b0;
  logic [7:0] uc = '0;
  logic [31:0] tos = '0, nos = '0, fpu_tos_wdata;
  logic fpu_stall, fpu_tos_we;
  logic ls_clk, ls_rst_n, ls_hready;
  ahb_m2s_t ls_m;
  logic [3:0] ls_hsel;
  ahb_s2m_t ls_ext_s [4];
  logic [3:0] ext_irq = '0;
  logic [21:0] ext_addr;
  logic [31:0] ext_wdata, ext_rdata;
  logic ext_data_oe, ext_oe_n, ext_we_n;
  logic [1:0] ext_cs_n;
  logic [3:0] ext_be_n;
  logic [15:0] pad_out, pad_oe, pad_in, pad_in_tb = '0;
  logic [15:14] alt_out_hi = '0, alt_oe_hi = '0, alt_in_hi;
  // board model: loopback wires TXD (pad 0) to RXD (pad 1), MOSI (pad 7) to MISO (pad 8)
  // and I2S SD out (pad 12) to SD in (pad 13); with od_mode the open-drain pads 2-5 have pull-ups and can also be pulled
  // low by a device (dev_low)
  logic loopback = 1'b0, od_mode = 1'b0;
  logic [5:2] dev_low = '0;
  always_comb begin
    pad_in = pad_in_tb;
    if (loopback) begin pad_in[1] = pad_out[0]; pad_in[8] = pad_out[7]; pad_in[13] = pad_out[12]; end
    if (od_mode)
      for (int i = 2; i <= 5; i++) pad_in[i] = !((pad_oe[i] && !pad_out[i]) || dev_low[i]);
  end

  int checks = 0, failures = 0;
  // mechanism counters
  int n_boot_words = 0, n_ratio_change = 0, n_dma_words = 0, n_contention = 0, n_default_err = 0;
  int n_clock_gate = 0, n_io_switch = 0, n_fpu [4] = '{0, 0, 0, 0}, n_fpu_stall = 0;
  int n_timer_irq = 0, n_dma_irq = 0, n_ls_ext = 0, n_uart = 0, n_spi = 0, n_i2c = 0, n_ps2 = 0;
  int n_i2s = 0;

  logic [31:0] ratio_list [3] = '{32'd4, 32'd3, 32'd2};
  logic [3:0]  ls_regions [4] = '{4'h9, 4'hA, 4'hB, 4'hD};
  int scl_falls = 0;
  logic [10:0] ps2_frame;
  always @(negedge pad_in[2]) if (od_mode) scl_falls++;

  always #5 clk_in = ~clk_in;

  jsoc_top dut (.*);

  ext_mem_model #(.ADDR_W(22), .DEPTH(4096)) u_ext (.ext_addr, .ext_wdata, .ext_rdata, .ext_cs_n,
    .ext_oe_n, .ext_we_n, .ext_be_n);

  for (genvar i = 0; i < 4; i++) begin : g_ls
    ahb_tb_slave #(.DEPTH(64), .MAXWAIT(1), .ERR_REGION(4'h0)) u_s (.clk(ls_clk), .rst_n(ls_rst_n),
      .hsel(ls_hsel[i]), .hready_in(ls_hready), .m(ls_m), .s(ls_ext_s[i]));
  end


  // ---------------- Java core stand-in: AHB master on core_clk ----------------
  logic c_req = 1'b0, c_write = 1'b0, c_busy, c_done, c_err;
  logic [31:0] c_addr = '0, c_wdata = '0, c_rdata;
  ahb_mport u_core (.clk(core_clk), .rst_n(core_rst_n), .req(c_req), .addr(c_addr), .write(c_write),
    .wdata(c_wdata), .size(3'd2), .busy(c_busy), .done(c_done), .rdata(c_rdata), .err(c_err),
    .hbusreq(core_busreq), .hgrant(core_grant), .m(core_m), .s(core_s));

  task automatic core_xfer(input logic [31:0] a, input logic w, input logic [31:0] d,
                           output logic [31:0] r, output logic e);
    @(negedge core_clk);
    c_addr = a; c_write = w; c_wdata = d; c_req = 1'b1;
    @(negedge core_clk);
    c_req = 1'b0;
    while (!c_done) @(negedge core_clk);
    r = c_rdata; e = c_err;
    @(negedge core_clk);
  endtask

  task automatic wr(input logic [31:0] a, input logic [31:0] d);
    logic [31:0] r; logic e;
    core_xfer(a, 1'b1, d, r, e);
    check(!e, $sformatf("write %h no error", a));
  endtask

  task automatic rd(input logic [31:0] a, output logic [31:0] r);
    logic e;
    core_xfer(a, 1'b0, 32'h0, r, e);
    check(!e, $sformatf("read %h no error", a));
  endtask

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---------------- monitors ----------------
  logic [31:0] inner [3][64];
  always @(posedge core_clk) if (rst_n) begin
    if (ram_we && ram_addr < 64) begin inner[ram_sel][ram_addr] <= ram_wdata; n_boot_words++; end
    if (dut.u_hs_bus.hbusreq[2] && dut.u_hs_bus.hbusreq[1]) n_contention++;
    if (fpu_stall) n_fpu_stall++;
  end

  int gclk0_edges = 0, lclk_edges = 0;
  always @(posedge dut.gclk[0]) gclk0_edges++;
  always @(posedge ls_clk) lclk_edges++;

  // FPU microcode: start, then ldfpu, waiting while stalled
  task automatic fpu_op(input logic [7:0] code, input logic [31:0] n, input logic [31:0] t,
                        input logic [31:0] expect_r, input int idx);
    @(negedge core_clk);
    uc_valid = 1'b1; uc = code; nos = n; tos = t;
    @(negedge core_clk);
    uc = UC_LDFPU;
    #1;
    while (fpu_stall) begin @(negedge core_clk); #1; end
    check(fpu_tos_we && fpu_tos_wdata == expect_r,
          $sformatf("FPU microcode %h: %h expected %h", code, fpu_tos_wdata, expect_r));
    n_fpu[idx]++;
    @(negedge core_clk);
    uc_valid = 1'b0;
  endtask

  localparam logic [31:0] SRAM = 32'h4000_0000;
  localparam logic [31:0] CLKM = 32'h8700_0000;

  initial begin
    logic [31:0] r, boot [3][16];
    logic e;
    int p, t0, e0, cnt [3];
    cnt = '{16, 8, 8};
    // boot image in flash: microcode, jump table, variables, end marker
    p = 0;
    for (int s = 0; s < 3; s++) begin
      u_ext.flash[p++] = {2'(s), 14'(s * 8), 16'(cnt[s])};
      for (int i = 0; i < cnt[s]; i++) begin boot[s][i] = $urandom; u_ext.flash[p++] = boot[s][i]; end
    end
    u_ext.flash[p] = 32'hC000_0000;

    repeat (5) @(negedge clk_in);
    rst_n = 1'b1;
    // 1. boot load
    t0 = 0;
    while (!core_rst_n && t0 < 20000) begin @(negedge clk_in); t0++; end
    check(core_rst_n && !boot_error, "core released after boot load");
    for (int s = 0; s < 3; s++)
      for (int i = 0; i < cnt[s]; i++)
        check(inner[s][s * 8 + i] == boot[s][i], $sformatf("inner RAM %0d word %0d", s, i));
    check(n_boot_words == 32, $sformatf("%0d boot words", n_boot_words));

    // 2. SRAM through both bus layers and the memory system
    for (int i = 0; i < 16; i++) wr(SRAM + 32'(4 * i), 32'hA000_0000 + 32'(i * 3));
    for (int i = 0; i < 16; i++) begin
      rd(SRAM + 32'(4 * i), r);
      check(r == 32'hA000_0000 + 32'(i * 3), "SRAM readback");
    end
    check(u_ext.sram[5] == 32'hA000_000F, "SRAM chip written");

    // 3. low-speed bus ratio change: 2 -> 4 -> 2
    rd(CLKM, r); check(r == 32'd2, "reset ratio 2");
    foreach (ratio_list[k]) begin
      wr(CLKM, ratio_list[k]);
      repeat (20) @(negedge clk_in);
      e0 = lclk_edges;
      repeat (96) @(negedge clk_in);
      check(lclk_edges - e0 == 96 / int'(ratio_list[k]), $sformatf("ratio %0d: %0d lclk edges", ratio_list[k], lclk_edges - e0));
      n_ratio_change++;
      rd(SRAM + 32'd8, r); check(r == 32'hA000_0006, "bus works at new ratio");
    end

    // 4. DMA copy of 16 words in SRAM while the core keeps using the bus
    wr(32'h8200_0004, 32'h3);                  // IRQ enable: timer, DMA
    wr(32'hE000_0000, SRAM);
    wr(32'hE000_0004, SRAM + 32'h100);
    wr(32'hE000_0008, 32'd16);
    wr(32'hE000_000C, 32'h9);                  // start, interrupt enable
    // the core keeps reading SRAM, timed so that its requests meet those of the DMA
    for (int k = 0; k < 8; k++) begin
      t0 = 0;
      do begin @(negedge core_clk); t0++; end while (!dut.u_dma.m_done && t0 < 1000);
      rd(SRAM + 32'(4 * k), r);
      check(r == 32'hA000_0000 + 32'(k * 3), "core reads SRAM during DMA");
    end
    t0 = 0;
    do begin
      rd(32'hE000_0010, r);
      t0++;
    end while (r[0] && t0 < 2000);
    check(r[2:0] == 3'b010, "DMA done without error");
    for (int i = 0; i < 16; i++) begin
      check(u_ext.sram[64 + i] == 32'hA000_0000 + 32'(i * 3), $sformatf("DMA word %0d", i));
      if (u_ext.sram[64 + i] == 32'hA000_0000 + 32'(i * 3)) n_dma_words++;
    end
    repeat (20) @(negedge clk_in);
    check(core_irq, "DMA interrupt reaches the core");
    rd(32'h8200_000C, r);
    check(r[31] && r[4:0] == 5'd1, "IRQ controller names the DMA");
    if (core_irq && r[4:0] == 5'd1) n_dma_irq++;
    wr(32'hE000_0010, 32'h2);
    repeat (20) @(negedge clk_in);
    check(!core_irq, "interrupt cleared");

    // 5. default slave
    core_xfer(32'hF000_0000, 1'b0, 32'h0, r, e);
    check(e, "default slave returns ERROR");
    if (e) n_default_err++;

    // 6. controllers outside the top: low-speed AHB slaves LCD, VGA, USB, Ethernet
    for (int i = 0; i < 4; i++) begin
      wr({ls_regions[i], 28'h10}, 32'h5500_0000 + 32'(i));
      rd({ls_regions[i], 28'h10}, r);
      check(r == 32'h5500_0000 + 32'(i), $sformatf("low-speed slave %0d", i));
      if (r == 32'h5500_0000 + 32'(i)) n_ls_ext++;
    end

    // 7. timer interrupt
    wr(32'h8100_0000, 32'd30);
    wr(32'h8100_0008, 32'h5);                  // enable, one-shot, interrupt
    t0 = 0;
    while (!core_irq && t0 < 5000) begin @(negedge clk_in); t0++; end
    check(core_irq, "timer interrupt");
    rd(32'h8200_000C, r);
    check(r[4:0] == 5'd0, "IRQ controller names the timer");
    if (core_irq && r[4:0] == 5'd0) n_timer_irq++;
    wr(32'h8100_000C, 32'h1);

    // 8. debug clock shut-down and restart
    wr(CLKM + 4, 32'h2);
    repeat (10) @(negedge clk_in);
    e0 = gclk0_edges;
    repeat (50) @(negedge clk_in);
    check(gclk0_edges == e0, "debug clock stopped");
    if (gclk0_edges == e0) n_clock_gate++;
    wr(CLKM + 4, 32'h3);
    repeat (10) @(negedge clk_in);
    e0 = gclk0_edges;
    repeat (50) @(negedge clk_in);
    check(gclk0_edges - e0 == 50, "debug clock restarted");

    // 9. GPIO and IO reuse
    // alternate-function outputs while the controllers are idle: TXD 1, SS_n 1, the rest
    // 0; enables: TXD, SCLK, MOSI, SS_n, I2S SCK/WS/SD out and the alt_* pads
    wr(32'h8300_0000, 32'h5A5A);
    wr(32'h8300_0004, 32'hFFFF);
    alt_out_hi = 2'b11; alt_oe_hi = 2'b01; pad_in_tb = 16'h9696;
    repeat (4) @(negedge clk_in);
    check(pad_out == 16'h5A5A && pad_oe == 16'hFFFF && alt_in_hi == 2'h0, "pads owned by GPIO");
    rd(32'h8300_0008, r); check(r == 32'h9696, "GPIO reads pads");
    wr(CLKM + 8, 32'hFC0F);
    repeat (2) @(negedge clk_in);
    check(pad_out == ((16'hFC0F & 16'hC201) | (16'h03F0 & 16'h5A5A)) &&
          pad_oe == ((16'hFC0F & 16'h5EC1) | 16'h03F0) && alt_in_hi == 2'h2,
          $sformatf("pads switched to alternate functions: out %h oe %h", pad_out, pad_oe));
    rd(32'h8300_0008, r); check(r == (32'h9696 & 32'h03F0), "GPIO sees idle level on switched pads");
    if (pad_out[15:14] == 2'b11) n_io_switch++;

    // UART on pads 0/1, looped back outside the chip
    loopback = 1'b1;
    wr(32'h8000_0008, 32'd4);                  // 4 low-speed cycles per bit
    wr(32'h8000_000C, 32'h1);                  // receive interrupt
    wr(32'h8200_0004, 32'h7);                  // IRQ enable: timer, DMA, UART
    wr(32'h8000_0000, 32'hA7);
    t0 = 0;
    while (!core_irq && t0 < 5000) begin @(negedge clk_in); t0++; end
    rd(32'h8200_000C, r); check(core_irq && r[4:0] == 5'd2, "UART receive interrupt");
    rd(32'h8000_0000, r); check(r[7:0] == 8'hA7, $sformatf("UART loopback byte %h", r[7:0]));
    if (r[7:0] == 8'hA7) n_uart++;

    // SPI on pads 6-9, MOSI looped back to MISO
    wr(CLKM + 8, 32'h03FF);
    wr(32'h8600_0008, 32'd3);
    wr(32'h8600_000C, 32'h3);                  // slave selected, interrupt enable
    wr(32'h8200_0004, 32'h20);                 // IRQ enable: SPI only
    check(pad_out[9] == 1'b0, "SS_n low on pad 9");
    wr(32'h8600_0000, 32'hC5);
    t0 = 0;
    while (!core_irq && t0 < 5000) begin @(negedge clk_in); t0++; end
    rd(32'h8200_000C, r); check(core_irq && r[4:0] == 5'd5, "SPI interrupt");
    rd(32'h8600_0000, r); check(r[7:0] == 8'hC5, $sformatf("SPI loopback byte %h", r[7:0]));
    if (r[7:0] == 8'hC5) n_spi++;
    wr(32'h8600_000C, 32'h0);
    loopback = 1'b0;

    // I2C on pads 2/3 with pull-ups and no device: the address byte is not acknowledged
    od_mode = 1'b1;
    scl_falls = 0;
    wr(32'h8400_0008, 32'd3);
    wr(32'h8400_0000, 32'hA0);
    wr(32'h8400_0004, 32'h7);                  // START, WRITE, STOP
    t0 = 0;
    do begin rd(32'h8400_0004, r); t0++; end while (!r[2] && t0 < 500);
    check(r[2:0] == 3'b110, $sformatf("I2C done with NACK, status %b", r[2:0]));
    check(scl_falls == 11, $sformatf("%0d SCL falling edges on pad 2", scl_falls));
    check(pad_in[3:2] == 2'b11, "I2C lines released after STOP");
    if (r[2:0] == 3'b110 && scl_falls == 11) n_i2c++;

    // PS2 on pads 4/5: a device sends one byte
    wr(32'h8500_0008, 32'h1);
    wr(32'h8200_0004, 32'h10);                 // IRQ enable: PS2 only
    ps2_frame = {1'b1, ~^8'h3C, 8'h3C, 1'b0};
    for (int i = 0; i < 11; i++) begin
      dev_low[5] = !ps2_frame[i];
      #400; dev_low[4] = 1'b1;
      #400; dev_low[4] = 1'b0;
    end
    dev_low = '0;
    repeat (40) @(negedge clk_in);
    rd(32'h8200_000C, r); check(core_irq && r[4:0] == 5'd4, "PS2 interrupt");
    rd(32'h8500_0000, r); check(r[7:0] == 8'h3C, $sformatf("PS2 byte %h", r[7:0]));
    if (r[7:0] == 8'h3C) n_ps2++;
    od_mode = 1'b0;

    // I2S on pads 10-13, SD out looped back to SD in: one frame sent and received
    loopback = 1'b1;
    wr(CLKM + 8, 32'h3C00);
    wr(32'hC000_0010, 32'd3);
    wr(32'hC000_0000, 32'h1234_ABCD);
    wr(32'hC000_000C, 32'h5);                  // enable, receive interrupt
    wr(32'h8200_0004, 32'h40);                 // IRQ enable: I2S only
    e0 = 0; t0 = 0;
    while (!core_irq && t0 < 5000) begin
      @(negedge clk_in); t0++;
      if (pad_out[11] != pad_out[10]) e0++;
    end
    rd(32'h8200_000C, r); check(core_irq && r[4:0] == 5'd6, "I2S interrupt");
    rd(32'hC000_0004, r); check(r == 32'h1234_ABCD, $sformatf("I2S loopback frame %h", r));
    check(e0 > 0, "I2S SCK and WS on pads 10/11");
    if (r == 32'h1234_ABCD) n_i2s++;
    wr(32'hC000_000C, 32'h0);
    loopback = 1'b0;
    wr(CLKM + 8, 32'h00);

    // 10. FPU through the extension module
    fpu_op(UC_STFADD, 32'h3FC00000, 32'h40100000, 32'h40700000, 0);  // 1.5 + 2.25 = 3.75
    fpu_op(UC_STFSUB, 32'h3FC00000, 32'h40100000, 32'hBF400000, 1);  // 1.5 - 2.25 = -0.75
    fpu_op(UC_STFMUL, 32'h3FC00000, 32'h40100000, 32'h40580000, 2);  // 1.5 * 2.25 = 3.375
    fpu_op(UC_STFDIV, 32'h40580000, 32'h3FC00000, 32'h40100000, 3);  // 3.375 / 1.5 = 2.25

    // mechanisms
    check(n_boot_words > 0, "mechanism: boot load");
    check(n_ratio_change > 0, "mechanism: bus clock ratio change");
    check(n_dma_words > 0, "mechanism: DMA transfer");
    check(n_contention > 0, "mechanism: DMA waits for the core");
    check(n_default_err > 0, "mechanism: default slave error");
    check(n_clock_gate > 0, "mechanism: clock shut-down");
    check(n_io_switch > 0, "mechanism: IO reuse switch");
    for (int i = 0; i < 4; i++) check(n_fpu[i] > 0, $sformatf("mechanism: FPU op %0d", i));
    check(n_fpu_stall > 0, "mechanism: FPU stall");
    check(n_timer_irq > 0 && n_dma_irq > 0, "mechanism: interrupts");
    check(n_ls_ext == 4, "mechanism: external controllers reached");
    check(n_spi > 0 && n_i2c > 0 && n_ps2 > 0, "mechanism: SPI, I2C, PS2 through reused pads");
    check(n_uart > 0, "mechanism: UART through reused pads");
    check(n_i2s > 0, "mechanism: I2S controller through reused pads");
    $display("boot words %0d, ratio changes %0d, DMA words %0d, contention cycles %0d, default errors %0d",
             n_boot_words, n_ratio_change, n_dma_words, n_contention, n_default_err);
    $display("clock gates %0d, IO switches %0d, FPU ops %0d/%0d/%0d/%0d, FPU stall cycles %0d, irqs %0d/%0d, SPI/I2C/PS2/I2S %0d/%0d/%0d/%0d",
             n_clock_gate, n_io_switch, n_fpu[0], n_fpu[1], n_fpu[2], n_fpu[3], n_fpu_stall,
             n_timer_irq, n_dma_irq, n_spi, n_i2c, n_ps2, n_i2s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  initial begin
    repeat (200000) @(posedge clk_in);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
