// mem_ctrl_tb: random word, halfword and byte reads and writes to the flash and SRAM
// regions through one AHB master, against a shadow copy of both memories kept here.
// Also checks the number of wait cycles of a data phase: WAIT_STATES+1 for a read and
// WAIT_STATES+2 for a write.
module mem_ctrl_tb;
  import jsoc_pkg::*;
  localparam int WAIT = 2, DEPTH = 256;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req = 1'b0, write = 1'b0, busy, done, err, hbusreq;
  logic [31:0] addr = '0, wdata = '0, rdata;
  logic [2:0] size = 3'd2;
  ahb_m2s_t m;
  ahb_s2m_t s;
  logic [21:0] ext_addr;
  logic [31:0] ext_wdata, ext_rdata;
  logic ext_data_oe, ext_oe_n, ext_we_n;
  logic [1:0] ext_cs_n;
  logic [3:0] ext_be_n;
  logic [31:0] shadow [2][DEPTH];
  int checks = 0, failures = 0, waits = 0;

  always #5 clk = ~clk;

  ahb_mport u_m (.clk, .rst_n, .req, .addr, .write, .wdata, .size, .busy, .done, .rdata, .err,
                 .hbusreq, .hgrant(1'b1), .m, .s);
  mem_ctrl #(.ADDR_W(22), .WAIT_STATES(WAIT)) dut (.clk, .rst_n, .hsel(1'b1), .hready_in(s.hready),
    .m, .s, .ext_addr, .ext_wdata, .ext_rdata, .ext_data_oe, .ext_cs_n, .ext_oe_n, .ext_we_n, .ext_be_n);
  ext_mem_model #(.ADDR_W(22), .DEPTH(DEPTH)) u_ext (.ext_addr, .ext_wdata, .ext_rdata, .ext_cs_n,
    .ext_oe_n, .ext_we_n, .ext_be_n);

  always @(posedge clk) if (!s.hready) waits++;

  task automatic xfer(input logic [31:0] a, input logic w, input logic [31:0] d, input logic [2:0] sz,
                      output logic [31:0] r);
    @(negedge clk);
    addr = a; write = w; wdata = d; size = sz; req = 1'b1;
    @(negedge clk);
    req = 1'b0;
    while (!done) @(negedge clk);
    r = rdata;
    @(negedge clk);
  endtask

  initial begin
    logic [31:0] a, d, r, e;
    int bank, w0, wi;
    logic [2:0] sz;
    for (int b = 0; b < 2; b++) for (int i = 0; i < DEPTH; i++) shadow[b][i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      bank = $urandom_range(0, 1);
      wi = $urandom_range(0, DEPTH - 1);
      sz = 3'($urandom_range(0, 2));
      a = {1'b0, 1'(bank), 20'h0, 8'(wi), 2'b00};
      if (sz == 3'd0) a[1:0] = 2'($urandom);
      if (sz == 3'd1) a[1] = 1'($urandom);
      d = $urandom;
      w0 = waits;
      if ($urandom_range(0, 1)) begin
        xfer(a, 1'b1, d, sz, r);
        for (int b = 0; b < 4; b++)
          if (sz == 3'd2 || (sz == 3'd1 && b / 2 == int'(a[1])) || (sz == 3'd0 && b == int'(a[1:0])))
            shadow[bank][wi][8*b +: 8] = d[8*b +: 8];
        checks++;
        if (waits - w0 != WAIT + 2) begin failures++; $display("FAIL write waits %0d", waits - w0); end
      end else begin
        xfer(a, 1'b0, 32'h0, sz, r);
        e = shadow[bank][wi];
        checks++;
        if (r != e) begin failures++; $display("FAIL read %h got %h expected %h", a, r, e); end
        checks++;
        if (waits - w0 != WAIT + 1) begin failures++; $display("FAIL read waits %0d", waits - w0); end
      end
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
