// apb_irq_tb: random source levels and enables; after the two-cycle synchroniser RAW,
// PENDING, the request line and the ID of the lowest-numbered pending source must match
// the values computed here.
module apb_irq_tb;
  import jsoc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, psel = 1'b0;
  apb_m2s_t apb = '0;
  logic [31:0] prdata;
  logic [7:0] src = '0;
  logic irq;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  apb_irq #(.N(8)) dut (.clk, .rst_n, .psel, .apb, .prdata, .src, .irq);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic apb_write(input logic [31:0] addr, input logic [31:0] data);
    @(negedge clk); psel = 1'b1; apb.paddr = addr; apb.pwrite = 1'b1; apb.pwdata = data; apb.penable = 1'b0;
    @(negedge clk); apb.penable = 1'b1;
    @(negedge clk); psel = 1'b0; apb.penable = 1'b0; apb.pwrite = 1'b0;
  endtask

  task automatic apb_read(input logic [31:0] addr, output logic [31:0] data);
    @(negedge clk); psel = 1'b1; apb.paddr = addr; apb.pwrite = 1'b0; apb.penable = 1'b0;
    @(negedge clk); apb.penable = 1'b1; data = prdata;
    @(negedge clk); psel = 1'b0; apb.penable = 1'b0;
  endtask

  initial begin
    logic [31:0] d; logic [7:0] en, p; int id;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 100; i++) begin
      en = 8'($urandom); src = 8'($urandom);
      apb_write(32'h82000004, 32'(en));
      p = en & src;
      id = 0;
      for (int b = 7; b >= 0; b--) if (p[b]) id = b;
      check(irq == (p != 0), "request line");
      apb_read(32'h82000000, d); check(d == 32'(src), "RAW");
      apb_read(32'h82000008, d); check(d == 32'(p), "PENDING");
      apb_read(32'h8200000C, d);
      check(d[31] == (p != 0) && (p == 0 || d[4:0] == 5'(id)), $sformatf("ID %h for pending %b", d, p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
