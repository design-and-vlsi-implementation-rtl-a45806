// debug_loader_tb: a boot image of four records (microcode, jump table, an empty record,
// variables) and an end marker is placed in a memory slave. The debug module must write
// every data word to the right inner RAM and address, raise done, and stop requesting the
// bus. A second instance whose flash base lies in the error region must stop with error
// set and write nothing.
module debug_loader_tb;
  import jsoc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  ahb_m2s_t m, m2;
  ahb_s2m_t s, s2;
  logic hbusreq, hbusreq2, ram_we, ram_we2, done, done2, error, error2;
  logic [1:0] ram_sel, ram_sel2;
  logic [13:0] ram_addr, ram_addr2;
  logic [31:0] ram_wdata, ram_wdata2;
  logic [31:0] inner [3][16384];
  bit written [3][16384];
  int checks = 0, failures = 0, nwrites = 0, bad_writes = 0, req_after_done = 0;

  always #5 clk = ~clk;

  debug_loader #(.FLASH_BASE(32'h0000_0100)) dut (.clk, .rst_n, .hbusreq, .hgrant(1'b1), .m, .s,
    .ram_we, .ram_sel, .ram_addr, .ram_wdata, .done, .error);
  ahb_tb_slave #(.DEPTH(1024), .MAXWAIT(2), .ERR_REGION(4'hF)) u_flash (.clk, .rst_n, .hsel(1'b1),
    .hready_in(s.hready), .m, .s);

  debug_loader #(.FLASH_BASE(32'hF000_0000)) dut_err (.clk, .rst_n, .hbusreq(hbusreq2), .hgrant(1'b1),
    .m(m2), .s(s2), .ram_we(ram_we2), .ram_sel(ram_sel2), .ram_addr(ram_addr2), .ram_wdata(ram_wdata2),
    .done(done2), .error(error2));
  ahb_tb_slave #(.DEPTH(16), .MAXWAIT(0), .ERR_REGION(4'hF)) u_flash2 (.clk, .rst_n, .hsel(1'b1),
    .hready_in(s2.hready), .m(m2), .s(s2));

  always @(posedge clk) if (rst_n) begin
    if (ram_we) begin
      inner[ram_sel][ram_addr] <= ram_wdata;
      written[ram_sel][ram_addr] <= 1'b1;
      nwrites++;
    end
    if (ram_we2) bad_writes++;
    if (done && hbusreq) req_after_done++;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    int p, t;
    int sel [4] = '{0, 1, 0, 2};
    int base [4] = '{0, 256, 77, 5};
    int cnt [4] = '{20, 8, 0, 10};
    logic [31:0] img [4][20];
    for (int r = 0; r < 4; r++) for (int i = 0; i < 20; i++) img[r][i] = $urandom;
    p = 16'h100 / 4;
    for (int r = 0; r < 4; r++) begin
      u_flash.mem[p] = {2'(sel[r]), 14'(base[r]), 16'(cnt[r])};
      p++;
      for (int i = 0; i < cnt[r]; i++) begin u_flash.mem[p] = img[r][i]; p++; end
    end
    u_flash.mem[p] = 32'hC000_0000;
    u_flash.mem[p + 1] = 32'h0000_0005;  // beyond the end marker: must not be read as data
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    t = 0;
    while (!done && t < 5000) begin @(negedge clk); t++; end
    check(done && !error, "boot image loaded");
    check(t >= 3 * 43, $sformatf("43 words read in %0d cycles", t));
    for (int r = 0; r < 4; r++)
      for (int i = 0; i < cnt[r]; i++)
        check(written[sel[r]][base[r] + i] && inner[sel[r]][base[r] + i] == img[r][i],
              $sformatf("record %0d word %0d", r, i));
    check(nwrites == 38, $sformatf("%0d inner RAM writes", nwrites));
    repeat (50) @(negedge clk);
    check(req_after_done == 0 && !hbusreq, "bus released after loading");
    check(nwrites == 38, "no writes after done");
    check(error2 && !done2 && bad_writes == 0, $sformatf("bus error stops the load: %0d %0d %0d", error2, done2, bad_writes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
