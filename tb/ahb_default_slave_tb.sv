// ahb_default_slave_tb: IDLE/BUSY transfers must see zero-wait OKAY, NONSEQ/SEQ
// transfers the two-cycle ERROR response (HREADY low + ERROR, then HREADY high + ERROR),
// and unselected transfers nothing.
module ahb_default_slave_tb;
  import jsoc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic hsel = 1'b0;
  ahb_m2s_t m = AHB_M2S_IDLE;
  ahb_s2m_t s;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ahb_default_slave dut (.clk, .rst_n, .hsel, .hready_in(s.hready), .m, .s);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic xfer(input htrans_e t, input logic sel, input bit expect_err);
    @(negedge clk);
    hsel = sel; m.htrans = t; m.haddr = $urandom;
    @(negedge clk);
    hsel = 1'b0; m.htrans = HTRANS_IDLE;
    if (expect_err) begin
      check(!s.hready && s.hresp == HRESP_ERROR, "first error cycle");
      @(negedge clk);
      check(s.hready && s.hresp == HRESP_ERROR, "second error cycle");
    end else begin
      check(s.hready && s.hresp == HRESP_OKAY, $sformatf("okay for htrans=%0d sel=%0d", t, sel));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20; i++) begin
      xfer(HTRANS_IDLE, 1'b1, 1'b0);
      xfer(HTRANS_BUSY, 1'b1, 1'b0);
      xfer(HTRANS_NONSEQ, 1'b1, 1'b1);
      xfer(HTRANS_SEQ, 1'b1, 1'b1);
      xfer(HTRANS_NONSEQ, 1'b0, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
