// apb_timer_tb: one-shot and periodic modes. The time from enabling to the expired flag
// must be LOAD+1 clock cycles, the interrupt must follow the enable bit, STATUS must clear
// on a write of 1, and a periodic timer must expire again after another LOAD+1 cycles.
module apb_timer_tb;
  import jsoc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, psel = 1'b0;
  apb_m2s_t apb = '0;
  logic [31:0] prdata;
  logic irq;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  apb_timer dut (.clk, .rst_n, .psel, .apb, .prdata, .irq);

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
    logic [31:0] d, load;
    int n;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 6; k++) begin
      load = 32'($urandom_range(5, 60));
      apb_write(32'h81000000, load);
      apb_write(32'h8100000C, 32'h1);
      // enable is written in the ENABLE cycle; count the cycles until expiry
      @(negedge clk); psel = 1'b1; apb.paddr = 32'h81000008; apb.pwrite = 1'b1;
      apb.pwdata = {29'h0, 1'b1, 1'(k % 2), 1'b1}; apb.penable = 1'b0;
      @(negedge clk); apb.penable = 1'b1;
      @(negedge clk); psel = 1'b0; apb.penable = 1'b0; apb.pwrite = 1'b0;
      n = 0;
      while (!irq && n < 1000) begin @(negedge clk); n++; end
      check(n == int'(load) + 1, $sformatf("expiry after %0d cycles, LOAD=%0d", n, load));
      apb_read(32'h8100000C, d); check(d[0], "STATUS expired");
      apb_write(32'h8100000C, 32'h1);
      check(!irq, "STATUS cleared");
      if (k % 2 == 1) begin
        n = 0;
        while (!irq && n < 1000) begin @(negedge clk); n++; end
        check(n > 0 && n <= int'(load) + 1, $sformatf("periodic re-expiry after %0d", n));
      end else begin
        apb_read(32'h81000008, d); check(d[0] == 1'b0, "one-shot disabled itself");
      end
      apb_write(32'h81000008, 32'h0);
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
