// apb_spi_tb: the SPI master exchanges random bytes with a mode-0 slave model written
// here (it samples MOSI on the rising SCLK edge and shifts MISO on the falling edge, MSB
// first). Checks both received bytes, the slave select, SCLK idle low, the 16*DIV cycle
// transfer time at two rates, STATUS, the interrupt, and that a write while busy is
// ignored.
module apb_spi_tb;
  import jsoc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, psel = 1'b0;
  apb_m2s_t apb = '0;
  logic [31:0] prdata;
  logic sclk, mosi, miso, ss_n, irq;
  int checks = 0, failures = 0;
  // slave model
  logic [7:0] s_tx = '0, s_rx = '0;
  int s_edges = 0;

  always #5 clk = ~clk;

  apb_spi #(.DIV_RESET(16'd4)) dut (.clk, .rst_n, .psel, .apb, .prdata, .sclk, .mosi, .miso,
    .ss_n, .irq);

  assign miso = s_tx[7];
  always @(posedge sclk) begin s_rx <= {s_rx[6:0], mosi}; s_edges++; end
  always @(negedge sclk) s_tx <= {s_tx[6:0], 1'b0};

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
    logic [31:0] d; logic [7:0] mb, sb;
    int div, cyc;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(ss_n && !sclk, "idle: slave not selected, SCLK low");
    apb_write(32'h8600000C, 32'h3);
    check(!ss_n, "slave select follows CTRL bit0");
    for (int k = 0; k < 24; k++) begin
      div = (k < 12) ? 4 : 7;
      if (k == 0 || k == 12) apb_write(32'h86000008, 32'(div));
      mb = 8'($urandom); sb = 8'($urandom);
      s_tx = sb; s_edges = 0;
      // the write takes effect at the ENABLE-cycle edge; count cycles from there
      @(negedge clk); psel = 1'b1; apb.paddr = 32'h86000000; apb.pwrite = 1'b1; apb.pwdata = 32'(mb);
      @(negedge clk); apb.penable = 1'b1;
      @(negedge clk); psel = 1'b0; apb.penable = 1'b0; apb.pwrite = 1'b0;
      cyc = 0;
      if (k == 5) begin                       // a second write while busy is ignored
        apb_write(32'h86000000, 32'h0);
        cyc += 3;
      end
      while (!irq && cyc < 1000) begin @(negedge clk); cyc++; end
      check(cyc == 16 * div, $sformatf("transfer took %0d cycles, expected %0d", cyc, 16 * div));
      check(s_edges == 8, $sformatf("%0d rising SCLK edges", s_edges));
      check(!sclk, "SCLK back to idle low");
      check(s_rx == mb, $sformatf("slave received %h expected %h", s_rx, mb));
      apb_read(32'h86000004, d); check(d[1:0] == 2'b10, $sformatf("status %b", d[1:0]));
      apb_read(32'h86000000, d); check(d[7:0] == sb, $sformatf("master received %h expected %h", d[7:0], sb));
      apb_write(32'h86000004, 32'h2);
      check(!irq, "done cleared by writing 1");
    end
    apb_write(32'h8600000C, 32'h0);
    check(ss_n, "slave deselected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
