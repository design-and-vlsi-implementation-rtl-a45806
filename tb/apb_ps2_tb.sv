// apb_ps2_tb: a PS/2 device model written here shares two open-drain lines with the
// host port. The device sends random bytes as 11-bit frames (one with a wrong parity bit,
// one with a bad start bit that must be dropped, one cut short that must time out), and
// the host must deliver each byte with rx_valid, the interrupt and the right parity
// flag. The host then sends random bytes: the device model checks that the clock was held
// low for at least HOLD cycles, reads the frame on its rising clock edges and checks data,
// odd parity and stop bit, and acknowledges all but one byte, whose missing acknowledge
// must show in STATUS.
module apb_ps2_tb;
  import jsoc_pkg::*;
  localparam int HOLD = 40, HALF = 150;   // host request time, device half clock (ns)
  logic clk = 1'b0, rst_n = 1'b0, psel = 1'b0;
  apb_m2s_t apb = '0;
  logic [31:0] prdata;
  logic clk_oe, dat_oe, irq;
  logic dev_clk_low = 1'b0, dev_dat_low = 1'b0;
  wire  ps2_clk = !(clk_oe || dev_clk_low);
  wire  ps2_dat = !(dat_oe || dev_dat_low);
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  apb_ps2 #(.HOLD_RESET(16'd40), .TIMEOUT(400)) dut (.clk, .rst_n, .psel, .apb, .prdata,
    .ps2_clk_in(ps2_clk), .ps2_dat_in(ps2_dat), .ps2_clk_oe(clk_oe), .ps2_dat_oe(dat_oe), .irq);

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

  // device to host: data changes while the clock is high, host reads at the falling edge
  task automatic dev_send(input logic [10:0] frame, input int nbits);
    for (int i = 0; i < nbits; i++) begin
      dev_dat_low = !frame[i];
      #HALF; dev_clk_low = 1'b1;
      #HALF; dev_clk_low = 1'b0;
    end
    dev_dat_low = 1'b0;
    #(4 * HALF);
  endtask

  function automatic logic [10:0] make_frame(input logic [7:0] b, input bit bad_parity);
    return {1'b1, (~^b) ^ bad_parity, b, 1'b0};
  endfunction

  // host to device: wait for the request, clock the frame in on rising edges
  task automatic dev_receive(output logic [9:0] bits, output int held, input bit ack);
    held = 0;
    while (ps2_clk) #10;
    while (!ps2_clk) begin #10; held++; end
    check(!ps2_dat, "start bit (data low) when the clock is released");
    #HALF;
    for (int i = 0; i < 10; i++) begin
      dev_clk_low = 1'b1; #HALF;
      dev_clk_low = 1'b0; bits[i] = ps2_dat; #HALF;
    end
    dev_dat_low = ack;
    dev_clk_low = 1'b1; #HALF;
    dev_clk_low = 1'b0; #HALF;
    dev_dat_low = 1'b0;
    #(4 * HALF);
  endtask

  initial begin
    logic [31:0] d; logic [7:0] b; logic [9:0] bits; int held;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    apb_write(32'h85000008, 32'h1);
    for (int k = 0; k < 12; k++) begin
      b = 8'($urandom);
      dev_send(make_frame(b, k == 3), 11);
      check(irq, "receive interrupt");
      apb_read(32'h85000004, d);
      check(d[1:0] == {k == 3, 1'b1}, $sformatf("status %b (parity error expected %0d)", d[1:0], k == 3));
      apb_read(32'h85000000, d); check(d[7:0] == b, $sformatf("received %h expected %h", d[7:0], b));
      check(!irq, "rx_valid cleared by reading");
      if (k == 5) begin            // a frame without a start bit is dropped
        dev_send(11'h7FF, 11);
        check(!irq, "frame without start bit ignored");
      end
      if (k == 7) begin            // a frame cut short is abandoned after the timeout
        dev_send(make_frame(8'h5A, 1'b0), 6);
        #(500 * 10);
        check(!irq, "partial frame not delivered");
      end
    end
    for (int k = 0; k < 8; k++) begin
      b = 8'($urandom);
      apb_write(32'h85000000, 32'(b));
      dev_receive(bits, held, k != 4);
      check(held >= HOLD, $sformatf("clock held low %0d cycles", held));
      check(bits[7:0] == b, $sformatf("device received %h expected %h", bits[7:0], b));
      check(bits[8] == ~^b, "odd parity bit");
      check(bits[9], "stop bit");
      apb_read(32'h85000004, d);
      check(d[3:2] == {k == 4, 1'b0}, $sformatf("send status %b", d[3:2]));
    end
    // receiving still works after sending
    b = 8'($urandom);
    dev_send(make_frame(b, 1'b0), 11);
    apb_read(32'h85000000, d); check(d[7:0] == b, "receive after send");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
