// apb_uart_tb: the UART's transmit line is looped back to its receive line. Random bytes
// are sent at two bit rates; each byte must come back in DATA with rx_valid and the
// interrupt set. The transmit frame is also checked bit by bit at its sampling points
// (start bit, 8 data bits LSB first, stop bit, each DIV cycles long), and an overrun is
// provoked by not reading a received byte.
module apb_uart_tb;
  import jsoc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, psel = 1'b0;
  apb_m2s_t apb = '0;
  logic [31:0] prdata;
  logic txd, irq;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  apb_uart #(.DIV_RESET(16'd16)) dut (.clk, .rst_n, .psel, .apb, .prdata, .txd, .rxd(txd), .irq);

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
    logic [31:0] d; logic [7:0] b; logic [9:0] frame;
    int div;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    apb_write(32'h8000000C, 32'h1);
    for (int k = 0; k < 20; k++) begin
      div = (k < 10) ? 16 : 5;
      if (k == 0 || k == 10) apb_write(32'h80000008, 32'(div));
      b = 8'($urandom);
      apb_write(32'h80000000, 32'(b));   // transmission starts at the ENABLE edge
      // sample the frame in the middle of each bit
      frame = '0;
      repeat (div / 2 - 2) @(negedge clk);
      for (int i = 0; i < 10; i++) begin
        frame[i] = txd;
        repeat (div) @(negedge clk);
      end
      check(frame == {1'b1, b, 1'b0}, $sformatf("frame %b for byte %h", frame, b));
      repeat (2 * div) @(negedge clk);
      check(irq, "receive interrupt");
      apb_read(32'h80000004, d); check(d[2:0] == 3'b010, $sformatf("status %b", d[2:0]));
      apb_read(32'h80000000, d); check(d[7:0] == b, $sformatf("received %h expected %h", d[7:0], b));
      check(!irq, "rx_valid cleared by reading");
    end
    // overrun: two bytes without reading
    apb_write(32'h80000000, 32'h11);
    repeat (12 * 5) @(negedge clk);
    apb_write(32'h80000000, 32'h22);
    repeat (12 * 5) @(negedge clk);
    apb_read(32'h80000004, d); check(d[2:1] == 2'b11, "overrun flagged");
    apb_read(32'h80000000, d); check(d[7:0] == 8'h22, "newest byte kept");
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
