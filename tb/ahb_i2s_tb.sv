// ahb_i2s_tb: the I2S controller is programmed over AHB by an ahb_mport master. Its
// SD_OUT is looped back to SD_IN, and an I2S receiver model written here decodes the
// link independently: on each rising SCK edge it shifts SD in, and a WS change marks the
// bit just taken as the LSB of the channel that ended (left when WS rises, right when it
// falls). Random stereo samples are streamed by refilling the transmit buffer whenever
// it is empty; the model must see exactly that sequence, and RXDATA must return each
// frame through the loopback. Also checked: SCK period 2*DIV and frame period 64*DIV
// cycles, WS low for the left channel, underrun with silent frames when software stops
// writing, receive overrun, the interrupt conditions, the DIV minimum, and disable.
module ahb_i2s_tb;
  import jsoc_pkg::*;
  localparam int DIV = 4, N = 12;
  logic clk = 1'b0, rst_n = 1'b0, req = 1'b0, write = 1'b0;
  logic busy, done, err, unused_req;
  logic [31:0] addr = '0, wdata = '0, rdata;
  ahb_m2s_t m;
  ahb_s2m_t s;
  logic sck, ws, sd_out, irq;
  int checks = 0, failures = 0, now = 0;

  always #5 clk = ~clk;
  always @(posedge clk) now++;

  ahb_mport u_cpu (.clk, .rst_n, .req, .addr, .write, .wdata, .size(3'd2), .busy, .done, .rdata, .err,
                   .hbusreq(unused_req), .hgrant(1'b1), .m, .s);
  ahb_i2s #(.DIV_RESET(16'd8)) dut (.clk, .rst_n, .hsel(1'b1), .hready_in(s.hready), .m, .s,
    .sck, .ws, .sd_out, .sd_in(sd_out), .irq);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic reg_wr(input logic [7:0] off, input logic [31:0] d);
    @(negedge clk); addr = {24'hC00000, off}; write = 1'b1; wdata = d; req = 1'b1;
    @(negedge clk); req = 1'b0;
    while (!done) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic reg_rd(input logic [7:0] off, output logic [31:0] d);
    @(negedge clk); addr = {24'hC00000, off}; write = 1'b0; req = 1'b1;
    @(negedge clk); req = 1'b0;
    while (!done) @(negedge clk);
    d = rdata;
    @(negedge clk);
  endtask

  // ---------------- receiver model ----------------
  logic [31:0] m_sh = '0;
  logic [15:0] m_left = '0;
  logic        m_ws_q = 1'b0;
  logic [31:0] frames [$];
  int sck_rise_t = 0, sck_period = 0, ws_fall_t = 0, frame_period = 0;

  always @(posedge sck) begin
    m_sh = {m_sh[30:0], sd_out};
    if (ws != m_ws_q) begin
      if (ws) m_left = m_sh[15:0];                 // left word ended
      else    frames.push_back({m_left, m_sh[15:0]});
    end
    m_ws_q = ws;
    sck_period = now - sck_rise_t; sck_rise_t = now;
  end
  always @(negedge ws) begin frame_period = now - ws_fall_t; ws_fall_t = now; end

  initial begin
    logic [31:0] d, smp [N];
    foreach (smp[i]) smp[i] = $urandom;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    reg_rd(8'h10, d); check(d == 32'd8, "DIV reset value");
    reg_wr(8'h10, 32'd1);
    reg_rd(8'h10, d); check(d == 32'd3, "DIV clamped to 3");
    reg_wr(8'h10, 32'(DIV));
    reg_wr(8'h00, smp[0]);
    reg_rd(8'h08, d); check(d[0], "transmit buffer full after write");
    reg_wr(8'h0C, 32'h3);                          // enable, transmit-empty interrupt
    repeat (4) @(negedge clk);
    check(irq, "transmit-empty interrupt after the buffer moved to the shift register");
    for (int k = 1; k < N; k++) begin
      do reg_rd(8'h08, d); while (d[0]);
      reg_wr(8'h00, smp[k]);
      if (k == 1) check(!irq, "interrupt drops when the buffer is refilled");
      do reg_rd(8'h08, d); while (!d[1]);
      reg_rd(8'h04, d);
      check(d == smp[k - 1], $sformatf("loopback frame %0d: %h expected %h", k - 1, d, smp[k - 1]));
      if (k == 4) begin
        check(sck_period == 2 * DIV, $sformatf("SCK period %0d cycles", sck_period));
        check(frame_period == 64 * DIV, $sformatf("frame period %0d cycles", frame_period));
      end
    end
    reg_rd(8'h08, d); check(d[3:2] == 2'b00, $sformatf("no underrun/overrun while streaming: %b", d[3:2]));
    // stop writing: two silent frames after the last sample, with underrun
    repeat (3 * 64 * DIV) @(negedge clk);
    reg_rd(8'h08, d); check(d[2], "underrun flagged");
    check(d[3], "overrun flagged (received frames not read)");
    reg_wr(8'h08, 32'hC);
    reg_rd(8'h08, d); check(d[3:2] == 2'b00, "flags cleared by writing 1");
    // receive interrupt
    reg_wr(8'h0C, 32'h5);
    reg_rd(8'h04, d);
    check(!irq, "no receive interrupt right after reading");
    repeat (64 * DIV + 8) @(negedge clk);
    check(irq, "receive interrupt");
    reg_wr(8'h0C, 32'h0);
    repeat (4 * DIV) @(negedge clk);
    check(!sck && !ws && !sd_out && !irq, "disabled: link idle");
    // the model must have seen the samples in order, then silence
    check(frames.size() >= N + 2, $sformatf("%0d frames seen", frames.size()));
    for (int i = 0; i < N && i < frames.size(); i++)
      check(frames[i] == smp[i], $sformatf("model frame %0d: %h expected %h", i, frames[i], smp[i]));
    for (int i = N; i < frames.size(); i++)
      check(frames[i] == 32'h0, $sformatf("silent frame %0d: %h", i, frames[i]));
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
