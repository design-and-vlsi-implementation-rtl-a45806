// dma_ctrl_tb: the DMA controller programmed through its AHB register port copies blocks
// inside a memory slave. Checks the copied words, that nothing past the block is
// touched, the fixed-source and fixed-destination modes, STATUS/COUNT/interrupt
// behaviour, a bus error (source in the error region), and that a word costs at least
// 8 bus cycles (one read and one write transfer).
module dma_ctrl_tb;
  import jsoc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req = 1'b0, write = 1'b0, busy, done, err, unused_req;
  logic [31:0] addr = '0, wdata = '0, rdata;
  ahb_m2s_t cfg_m, mst_m;
  ahb_s2m_t cfg_s, mst_s;
  logic hbusreq, irq;
  int checks = 0, failures = 0, now = 0;

  always @(posedge clk) now++;

  always #5 clk = ~clk;

  ahb_mport u_cpu (.clk, .rst_n, .req, .addr, .write, .wdata, .size(3'd2), .busy, .done, .rdata, .err,
                   .hbusreq(unused_req), .hgrant(1'b1), .m(cfg_m), .s(cfg_s));
  dma_ctrl dut (.clk, .rst_n, .hsel(1'b1), .hready_in(cfg_s.hready), .cfg_m, .cfg_s,
                .hbusreq, .hgrant(1'b1), .mst_m, .mst_s, .irq);
  ahb_tb_slave #(.DEPTH(1024), .MAXWAIT(1), .ERR_REGION(4'hF)) u_mem (.clk, .rst_n, .hsel(1'b1),
    .hready_in(mst_s.hready), .m(mst_m), .s(mst_s));

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic reg_wr(input logic [7:0] off, input logic [31:0] d);
    @(negedge clk); addr = {24'hE00000, off}; write = 1'b1; wdata = d; req = 1'b1;
    @(negedge clk); req = 1'b0;
    while (!done) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic reg_rd(input logic [7:0] off, output logic [31:0] d);
    @(negedge clk); addr = {24'hE00000, off}; write = 1'b0; req = 1'b1;
    @(negedge clk); req = 1'b0;
    while (!done) @(negedge clk);
    d = rdata;
  endtask

  task automatic run_dma(input int src_w, input int dst_w, input int n, input logic [3:0] ctrl,
                         output int cycles);
    logic [31:0] st;
    reg_wr(8'h00, 32'(src_w * 4));
    reg_wr(8'h04, 32'(dst_w * 4));
    reg_wr(8'h08, 32'(n));
    reg_wr(8'h0C, {28'h0, ctrl[3:1], 1'b1});
    cycles = now;
    do begin
      repeat (4) @(negedge clk);
      reg_rd(8'h10, st);
    end while (st[0] && now - cycles < 20000);
    cycles = now - cycles;
  endtask

  initial begin
    logic [31:0] d;
    int cyc, n, src, dst;
    logic [31:0] img [1024];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1024; i++) begin img[i] = $urandom; u_mem.mem[i] = img[i]; end
    // incrementing copies of random size
    for (int k = 0; k < 6; k++) begin
      n = $urandom_range(1, 40);
      src = $urandom_range(0, 200);
      dst = 512 + $urandom_range(0, 200);
      run_dma(src, dst, n, 4'b1000, cyc);
      for (int i = 0; i < n; i++) img[dst + i] = img[src + i];
      for (int i = dst - 2; i < dst + n + 2; i++)
        check(u_mem.mem[i] == img[i], $sformatf("copy %0d word %0d", k, i));
      reg_rd(8'h10, d); check(d[2:0] == 3'b010, "STATUS done, no error");
      reg_rd(8'h08, d); check(d == 0, "COUNT counted down to 0");
      check(irq, "interrupt raised");
      check(cyc >= 8 * n, $sformatf("%0d words took %0d cycles", n, cyc));
      reg_wr(8'h10, 32'h2);
      check(!irq, "done cleared by write 1");
    end
    // fixed source (peripheral data register) to incrementing destination
    run_dma(100, 700, 5, 4'b0010, cyc);
    for (int i = 0; i < 5; i++) begin
      img[700 + i] = img[100];
      check(u_mem.mem[700 + i] == img[100], "fixed source");
    end
    check(!irq, "no interrupt when disabled");
    // incrementing source to fixed destination: last word remains
    run_dma(300, 800, 4, 4'b0100, cyc);
    img[800] = img[303];
    check(u_mem.mem[800] == img[303] && u_mem.mem[801] == img[801], "fixed destination");
    // bus error
    reg_wr(8'h00, 32'hF000_0000);
    reg_wr(8'h04, 32'h0000_0000);
    reg_wr(8'h08, 32'd3);
    reg_wr(8'h0C, 32'h1);
    repeat (40) @(negedge clk);
    reg_rd(8'h10, d); check(d[2:0] == 3'b100, $sformatf("STATUS error %b", d[2:0]));
    check(u_mem.mem[0] == img[0], "nothing written after error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
