// clk_manager_tb: APB writes and reads of the RATIO, GATE and IO_REG registers, their
// reset values and that a write with PSEL low changes nothing.
module clk_manager_tb;
  import jsoc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, psel = 1'b0;
  apb_m2s_t apb = '0;
  logic [31:0] prdata;
  logic [3:0] ratio;
  logic [1:0] gate;
  logic [7:0] io_reg;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  clk_manager #(.NG(2), .NIO(8)) dut (.clk, .rst_n, .psel, .apb, .prdata, .ratio, .gate, .io_reg);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic apb_write(input logic [31:0] addr, input logic [31:0] data, input logic sel = 1'b1);
    @(negedge clk); psel = sel; apb.paddr = addr; apb.pwrite = 1'b1; apb.pwdata = data; apb.penable = 1'b0;
    @(negedge clk); apb.penable = 1'b1;
    @(negedge clk); psel = 1'b0; apb.penable = 1'b0; apb.pwrite = 1'b0;
  endtask

  task automatic apb_read(input logic [31:0] addr, output logic [31:0] data);
    @(negedge clk); psel = 1'b1; apb.paddr = addr; apb.pwrite = 1'b0; apb.penable = 1'b0;
    @(negedge clk); apb.penable = 1'b1; data = prdata;
    @(negedge clk); psel = 1'b0; apb.penable = 1'b0;
  endtask

  initial begin
    logic [31:0] d;
    logic [3:0] r; logic [1:0] g; logic [7:0] io;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(ratio == 4'd2 && gate == 2'b11 && io_reg == 8'h00, "reset values");
    for (int i = 0; i < 50; i++) begin
      r = 4'($urandom); g = 2'($urandom); io = 8'($urandom);
      apb_write(32'h87000000, {28'hFFFFFFF, r});
      apb_write(32'h87000004, 32'(g));
      apb_write(32'h87000008, 32'(io));
      apb_write(32'h87000000, 32'($urandom), 1'b0);
      check(ratio == r && gate == g && io_reg == io, "register outputs");
      apb_read(32'h87000000, d); check(d == 32'(r), "read RATIO");
      apb_read(32'h87000004, d); check(d == 32'(g), "read GATE");
      apb_read(32'h87000008, d); check(d == 32'(io), "read IO_REG");
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
