// apb_gpio_tb: DOUT/DIR writes reach the pins, DIN reads the pin levels after the
// two-cycle synchroniser.
module apb_gpio_tb;
  import jsoc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, psel = 1'b0;
  apb_m2s_t apb = '0;
  logic [31:0] prdata;
  logic [7:0] gpio_out, gpio_oe, gpio_in = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  apb_gpio #(.W(8)) dut (.clk, .rst_n, .psel, .apb, .prdata, .gpio_out, .gpio_oe, .gpio_in);

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
    logic [31:0] d; logic [7:0] v, o;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(gpio_out == 0 && gpio_oe == 0, "reset: all pins inputs");
    for (int i = 0; i < 50; i++) begin
      v = 8'($urandom); o = 8'($urandom);
      apb_write(32'h83000000, 32'(v));
      apb_write(32'h83000004, 32'(o));
      check(gpio_out == v && gpio_oe == o, "pins driven");
      apb_read(32'h83000000, d); check(d == 32'(v), "read DOUT");
      gpio_in = 8'($urandom);
      @(negedge clk);
      apb_read(32'h83000008, d); check(d == 32'(gpio_in), "read DIN");
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
