// ahb2ahb_bridge_tb: random reads and writes from a high-speed master through the bridge
// to a memory slave on the low-speed side, which runs on an unrelated clock (period
// 10 ns against 23 ns, then 10 ns against 7 ns). Data must match a shadow copy, an access
// to the error region must return the two-cycle ERROR on the high-speed side, and the
// high-speed side must see at least the two synchroniser delays per access.
module ahb2ahb_bridge_tb;
  import jsoc_pkg::*;
  logic hclk = 1'b0, lclk = 1'b0, rst_n = 1'b0;
  logic req = 1'b0, write = 1'b0, busy, done, err, hbusreq;
  logic [31:0] addr = '0, wdata = '0, rdata;
  ahb_m2s_t hs_m, ls_m;
  ahb_s2m_t hs_s, ls_s;
  int checks = 0, failures = 0;
  realtime lper = 23.0;
  logic [31:0] shadow [64];
  int err_cycles = 0;

  always #5 hclk = ~hclk;
  always #(lper / 2) lclk = ~lclk;

  ahb_mport u_m (.clk(hclk), .rst_n, .req, .addr, .write, .wdata, .size(3'd2), .busy, .done, .rdata,
                 .err, .hbusreq, .hgrant(1'b1), .m(hs_m), .s(hs_s));
  ahb2ahb_bridge dut (.hclk, .hrst_n(rst_n), .hsel(1'b1), .hready_in(hs_s.hready), .hs_m, .hs_s,
                      .lclk, .lrst_n(rst_n), .ls_m, .ls_s);
  ahb_tb_slave #(.DEPTH(64), .MAXWAIT(3), .ERR_REGION(4'hF)) u_s (.clk(lclk), .rst_n, .hsel(1'b1),
    .hready_in(ls_s.hready), .m(ls_m), .s(ls_s));

  always @(posedge hclk) if (hs_s.hresp == HRESP_ERROR) err_cycles++;

  task automatic xfer(input logic [31:0] a, input logic w, input logic [31:0] d,
                      output logic [31:0] r, output logic e, output int cyc);
    @(negedge hclk);
    addr = a; write = w; wdata = d; req = 1'b1; cyc = 0;
    @(negedge hclk);
    req = 1'b0;
    while (!done) begin @(negedge hclk); cyc++; end
    r = rdata; e = err;
    @(negedge hclk);
  endtask

  initial begin
    logic [31:0] a, d, r; logic e; int i6, cyc, e0;
    for (int i = 0; i < 64; i++) shadow[i] = '0;
    repeat (4) @(negedge lclk);
    rst_n = 1'b1;
    for (int phase = 0; phase < 2; phase++) begin
      if (phase == 1) lper = 7.0;
      for (int k = 0; k < 200; k++) begin
        i6 = $urandom_range(0, 63);
        a = {4'($urandom_range(0, 13)), 20'h0, 6'(i6), 2'b00};
        d = $urandom;
        if ($urandom_range(0, 1)) begin
          xfer(a, 1'b1, d, r, e, cyc);
          shadow[i6] = d;
        end else begin
          xfer(a, 1'b0, 32'h0, r, e, cyc);
          checks++;
          if (r != shadow[i6] || e) begin failures++; $display("FAIL read %h got %h expected %h", a, r, shadow[i6]); end
        end
        checks++;
        if (real'(cyc) * 10.0 < 2.0 * lper) begin failures++; $display("FAIL access took only %0d cycles", cyc); end
      end
      e0 = err_cycles;
      xfer(32'hF000_0010, 1'b0, 32'h0, r, e, cyc);
      checks++;
      if (!e || err_cycles - e0 != 2) begin failures++; $display("FAIL error response e=%0d cycles=%0d", e, err_cycles - e0); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge hclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
