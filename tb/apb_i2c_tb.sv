// apb_i2c_tb: the I2C master talks to a slave model written here: a 256-byte register
// memory at 7-bit address 0x50 with an auto-incrementing pointer (first byte written
// after the address), which samples SDA on rising SCL edges, drives it after falling
// edges, and detects START and STOP as SDA changes while SCL is high. Software sequences
// (START+address, pointer, data bytes, repeated START, reads with ACK and a final NACK,
// STOP) write random bytes and read them back. Also checked: a wrong address is not
// acknowledged, the slave can stretch the clock, the 36-quarter byte time, the
// interrupt, and that the master never changes SDA while SCL is high except for START
// and STOP.
module apb_i2c_tb;
  import jsoc_pkg::*;
  localparam int DIV = 5;
  localparam logic [6:0] SADDR = 7'h50;
  logic clk = 1'b0, rst_n = 1'b0, psel = 1'b0;
  apb_m2s_t apb = '0;
  logic [31:0] prdata;
  logic scl_oe, sda_oe, irq;
  logic dev_scl_low = 1'b0, dev_sda_low = 1'b0;
  wire  scl = !(scl_oe || dev_scl_low);
  wire  sda = !(sda_oe || dev_sda_low);
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  apb_i2c #(.DIV_RESET(16'd5)) dut (.clk, .rst_n, .psel, .apb, .prdata, .scl_in(scl),
    .sda_in(sda), .scl_oe, .sda_oe, .irq);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---------------- slave model ----------------
  typedef enum {S_IDLE, S_ADDR, S_WDATA, S_RDATA, S_WAIT} sstate_e;
  sstate_e s_state = S_IDLE;
  logic [7:0] s_mem [256];
  logic [7:0] s_sh = '0, s_ptr = '0;
  int   s_bit = 0, starts = 0, stops = 0;
  bit   s_first = 1'b0, stretch = 1'b0;
  int   stretched = 0;

  always @(negedge sda) if (scl && rst_n) begin
    s_state = S_ADDR; s_bit = 0; dev_sda_low = 1'b0; starts++;
  end
  always @(posedge sda) if (scl && rst_n) begin
    s_state = S_IDLE; dev_sda_low = 1'b0; stops++;
  end
  always @(posedge scl) if (s_state != S_IDLE) begin
    if (s_bit < 8) begin
      if (s_state != S_RDATA) s_sh = {s_sh[6:0], sda};
    end else if (s_state == S_RDATA && sda) begin
      s_state = S_WAIT;                       // master NACK: stop sending
    end
    s_bit++;
  end
  always @(negedge scl) if (s_state != S_IDLE) begin
    if (s_bit == 8) begin                     // acknowledge slot
      case (s_state)
        S_ADDR: if (s_sh[7:1] == SADDR) begin
          dev_sda_low = 1'b1;
          s_state = s_sh[0] ? S_RDATA : S_WDATA;
          s_first = 1'b1;
        end else begin
          s_state = S_WAIT;
        end
        S_WDATA: begin
          if (s_first) s_ptr = s_sh; else begin s_mem[s_ptr] = s_sh; s_ptr++; end
          s_first = 1'b0;
          dev_sda_low = 1'b1;
        end
        default: dev_sda_low = 1'b0;
      endcase
      if (stretch) begin
        dev_scl_low = 1'b1;
        stretched++;
        dev_scl_low <= #(40 * DIV * 10) 1'b0;
      end
    end else if (s_bit == 9) begin
      s_bit = 0;
      dev_sda_low = 1'b0;
      if (s_state == S_RDATA) begin
        s_sh = s_mem[s_ptr]; s_ptr++;
        dev_sda_low = !s_sh[7];
      end
    end else if (s_state == S_RDATA) begin
      dev_sda_low = !s_sh[7 - s_bit];
    end
  end

  // SDA driven by the master may only change while SCL is low, except in START/STOP
  logic sda_oe_q = 1'b0, in_cond = 1'b0;
  int   bad_changes = 0;
  always @(posedge clk) begin
    if (rst_n && scl && sda_oe != sda_oe_q && !in_cond) bad_changes++;
    sda_oe_q <= sda_oe;
  end

  // ---------------- APB ----------------
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

  // run one command, wait for done, return the number of cycles it took
  task automatic cmd(input logic [31:0] c, output int cyc);
    in_cond = c[0] || c[1];
    apb_write(32'h84000004, c);
    cyc = 0;
    while (!irq && cyc < 100000) begin @(negedge clk); cyc++; end
    check(irq, "command done interrupt");
    in_cond = 1'b0;
  endtask

  task automatic write_byte(input logic [7:0] b, input logic [3:0] flags, output logic nack);
    logic [31:0] d; int cyc;
    apb_write(32'h84000000, 32'(b));
    cmd(32'h4 | 32'(flags), cyc);
    apb_read(32'h84000004, d);
    nack = d[1];
  endtask

  task automatic read_byte(input bit last, output logic [7:0] b);
    logic [31:0] d; int cyc;
    cmd(last ? 32'h1A : 32'h08, cyc);          // last: NACK and STOP
    apb_read(32'h84000000, d);
    b = d[7:0];
  endtask

  initial begin
    logic [31:0] d; logic [7:0] b, ptr; logic nack; int cyc, n;
    logic [7:0] shadow [256];
    foreach (s_mem[i]) begin s_mem[i] = 8'($urandom); shadow[i] = s_mem[i]; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    apb_write(32'h8400000C, 32'h1);
    apb_write(32'h84000008, 32'(DIV));
    // byte timing: one data byte without START/STOP takes 36 quarters
    for (int t = 0; t < 10; t++) begin
      n = 1 + int'($urandom_range(0, 5));
      ptr = 8'($urandom);
      write_byte({SADDR, 1'b0}, 4'h1, nack);  // START + address, write
      check(!nack, "address acknowledged");
      apb_write(32'h84000000, 32'(ptr));
      cmd(32'h4, cyc);
      check(cyc >= 36 * DIV && cyc <= 36 * DIV + 2, $sformatf("byte took %0d cycles", cyc));
      for (int i = 0; i < n; i++) begin
        b = 8'($urandom);
        shadow[8'(ptr + i)] = b;
        stretch = (t == 3 && i == 0);
        write_byte(b, (i == n - 1) ? 4'h2 : 4'h0, nack);
        stretch = 1'b0;
        check(!nack, "data acknowledged");
      end
      // read back: START + address write, pointer, repeated START + address read
      write_byte({SADDR, 1'b0}, 4'h1, nack);
      write_byte(ptr, 4'h0, nack);
      write_byte({SADDR, 1'b1}, 4'h1, nack);
      check(!nack, "read address acknowledged");
      for (int i = 0; i < n + 1; i++) begin
        read_byte(i == n, b);
        check(b == shadow[8'(ptr + i)], $sformatf("read %h expected %h at %h", b, shadow[8'(ptr + i)], 8'(ptr + i)));
      end
      apb_read(32'h84000004, d); check(!d[0], "not busy after STOP");
      check(s_state == S_IDLE, "slave saw STOP");
    end
    // a wrong address is not acknowledged
    write_byte({7'h23, 1'b0}, 4'h3, nack);
    check(nack, "wrong address NACKed");
    check(stretched > 0, "clock stretching exercised");
    check(bad_changes == 0, $sformatf("%0d SDA changes while SCL high", bad_changes));
    check(starts == 31 && stops == 21, $sformatf("%0d STARTs, %0d STOPs", starts, stops));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
