// ahb_ls_bus_tb: the low-speed AHB decoder and response multiplexer. One master writes a
// tagged word to a random address in every region and reads it back; each write must land
// in the slave the address map names (memory 0x0-0x7, APB bridge 0x8, LCD 0x9, VGA 0xA,
// USB 0xB, I2S 0xC, Ethernet 0xD) and in no other, and regions 0xE/0xF must get an ERROR.
module ahb_ls_bus_tb;
  import jsoc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req = 1'b0, write = 1'b0, busy, done, err, hbusreq;
  logic [31:0] addr = '0, wdata = '0, rdata;
  ahb_m2s_t m;
  ahb_s2m_t s, s_in [7];
  logic [6:0] hsel;
  int checks = 0, failures = 0;
  int cnt_before [7];

  always #5 clk = ~clk;

  ahb_mport u_m (.clk, .rst_n, .req, .addr, .write, .wdata, .size(3'd2), .busy, .done, .rdata, .err,
                 .hbusreq, .hgrant(1'b1), .m, .s);
  ahb_ls_bus dut (.clk, .rst_n, .m, .m_resp(s), .hsel, .s_in);
  for (genvar i = 0; i < 7; i++) begin : g_s
    ahb_tb_slave #(.DEPTH(64), .MAXWAIT(2), .ERR_REGION(4'hF)) u_s (.clk, .rst_n, .hsel(hsel[i]),
      .hready_in(s.hready), .m, .s(s_in[i]));
  end

  function automatic int counts(input int i);
    case (i)
      0: return g_s[0].u_s.accesses;
      1: return g_s[1].u_s.accesses;
      2: return g_s[2].u_s.accesses;
      3: return g_s[3].u_s.accesses;
      4: return g_s[4].u_s.accesses;
      5: return g_s[5].u_s.accesses;
      default: return g_s[6].u_s.accesses;
    endcase
  endfunction

  task automatic xfer(input logic [31:0] a, input logic w, input logic [31:0] d,
                      output logic [31:0] r, output logic e);
    @(negedge clk);
    addr = a; write = w; wdata = d; req = 1'b1;
    @(negedge clk);
    req = 1'b0;
    while (!done) @(negedge clk);
    r = rdata; e = err;
    @(negedge clk);
  endtask

  initial begin
    logic [31:0] a, d, r; logic e;
    int target;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 10; k++) begin
      for (int reg_n = 0; reg_n < 16; reg_n++) begin
        target = (reg_n < 8) ? 0 : (reg_n < 14) ? reg_n - 7 : -1;
        a = {4'(reg_n), 20'($urandom), 6'($urandom), 2'b00};
        a[29:28] = (reg_n < 8) ? 2'($urandom) : a[29:28];
        if (reg_n < 8) a[31:28] = 4'(reg_n);
        d = {4'(reg_n), 28'($urandom)};
        for (int i = 0; i < 7; i++) cnt_before[i] = counts(i);
        xfer(a, 1'b1, d, r, e);
        xfer(a, 1'b0, 32'h0, r, e);
        checks++;
        if (target < 0) begin
          if (!e) begin failures++; $display("FAIL region %h: no error", reg_n); end
        end else begin
          if (e || r != d) begin failures++; $display("FAIL region %h: read %h expected %h", reg_n, r, d); end
          for (int i = 0; i < 7; i++) begin
            checks++;
            if (counts(i) - cnt_before[i] != ((i == target) ? 2 : 0)) begin
              failures++; $display("FAIL region %h reached slave %0d", reg_n, i);
            end
          end
        end
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
