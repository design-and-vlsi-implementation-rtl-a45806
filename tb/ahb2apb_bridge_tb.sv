// ahb2apb_bridge_tb: AHB writes and reads through the bridge to eight behavioural APB
// register files, one per slot. Checks the data, that only the addressed slot is
// selected, the APB protocol (SETUP with PENABLE low, then ENABLE, PSEL held, address and
// write data stable), that slots 8-15 read zero, and the 4-cycle access (3 wait cycles).
module ahb2apb_bridge_tb;
  import jsoc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req = 1'b0, write = 1'b0, busy, done, err, hbusreq;
  logic [31:0] addr = '0, wdata = '0, rdata;
  ahb_m2s_t m;
  ahb_s2m_t s;
  apb_m2s_t apb;
  logic [7:0] psel;
  logic [31:0] prdata [8];
  logic [31:0] regs [8][4];
  int checks = 0, failures = 0, waits = 0, proto_err = 0, setup_cnt = 0, mapped = 0;
  logic [7:0] psel_prev = '0;
  apb_m2s_t apb_prev;

  always #5 clk = ~clk;

  ahb_mport u_m (.clk, .rst_n, .req, .addr, .write, .wdata, .size(3'd2), .busy, .done, .rdata, .err,
                 .hbusreq, .hgrant(1'b1), .m, .s);
  ahb2apb_bridge dut (.clk, .rst_n, .hsel(1'b1), .hready_in(s.hready), .m, .s, .apb, .psel, .prdata);

  for (genvar i = 0; i < 8; i++) begin : g_p
    assign prdata[i] = regs[i][apb.paddr[3:2]];
    always @(posedge clk) if (psel[i] && apb.penable && apb.pwrite) regs[i][apb.paddr[3:2]] <= apb.pwdata;
  end

  always @(posedge clk) begin
    if (!s.hready) waits++;
    if ($countones(psel) > 1) proto_err++;
    if (psel != 0 && !apb.penable) setup_cnt++;
    // ENABLE must follow SETUP with the same PSEL, address and write data
    if (psel != 0 && apb.penable && (psel_prev != psel || apb_prev.penable ||
        apb_prev.paddr != apb.paddr || apb_prev.pwdata != apb.pwdata)) proto_err++;
    psel_prev <= psel;
    apb_prev  <= apb;
  end

  task automatic xfer(input logic [31:0] a, input logic w, input logic [31:0] d, output logic [31:0] r);
    @(negedge clk);
    addr = a; write = w; wdata = d; req = 1'b1;
    @(negedge clk);
    req = 1'b0;
    while (!done) @(negedge clk);
    r = rdata;
    @(negedge clk);
  endtask

  initial begin
    logic [31:0] a, d, r;
    int slot, w0;
    for (int i = 0; i < 8; i++) for (int j = 0; j < 4; j++) regs[i][j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 300; k++) begin
      slot = $urandom_range(0, 15);
      a = {4'h8, 4'(slot), 20'($urandom), 2'($urandom), 2'b00};
      d = $urandom;
      if (slot < 8) mapped += 2;
      w0 = waits;
      xfer(a, 1'b1, d, r);
      checks++;
      if (waits - w0 != 3) begin failures++; $display("FAIL write took %0d wait cycles", waits - w0); end
      xfer(a, 1'b0, 32'h0, r);
      checks++;
      if (r != ((slot < 8) ? d : 32'h0)) begin failures++; $display("FAIL slot %0d read %h expected %h", slot, r, d); end
    end
    checks++;
    if (proto_err != 0 || setup_cnt != mapped) begin
      failures++; $display("FAIL APB protocol errors %0d, setup cycles %0d", proto_err, setup_cnt);
    end
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
