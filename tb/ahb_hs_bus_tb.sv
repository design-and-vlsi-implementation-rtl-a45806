// ahb_hs_bus_tb: three masters (debug, core, DMA positions) issue random reads and writes
// at the same time over the high-speed AHB to three memory slaves (regions 0x0-0xD,
// 0xE, 0xF). Each master owns its own words, so every read can be checked against that
// master's shadow copy. Every cycle the grant must go to the highest-priority requester;
// the test also counts the cycles in which a lower-priority master had to wait for a
// higher one and fails if such contention never happened.
module ahb_hs_bus_tb;
  import jsoc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] req = '0, write = '0, busy, done, err, hbusreq, hgrant, hsel;
  logic [31:0] addr [3], wdata [3], rdata [3];
  ahb_m2s_t m_in [3], s_req;
  ahb_s2m_t m_resp, s_in [3];
  int checks = 0, failures = 0, contention = 0, dma_blocked = 0;
  logic [31:0] shadow [3][3][16];  // [master][slave][word]

  always #5 clk = ~clk;

  for (genvar i = 0; i < 3; i++) begin : g_m
    ahb_mport u_m (.clk, .rst_n, .req(req[i]), .addr(addr[i]), .write(write[i]), .wdata(wdata[i]),
      .size(3'd2), .busy(busy[i]), .done(done[i]), .rdata(rdata[i]), .err(err[i]),
      .hbusreq(hbusreq[i]), .hgrant(hgrant[i]), .m(m_in[i]), .s(m_resp));
  end

  ahb_hs_bus dut (.clk, .rst_n, .m_in, .hbusreq, .hgrant, .m_resp, .s_req, .hsel, .s_in);

  for (genvar i = 0; i < 3; i++) begin : g_s
    ahb_tb_slave #(.DEPTH(64), .MAXWAIT(2), .ERR_REGION(4'h1)) u_s (.clk, .rst_n,
      .hsel(hsel[i]), .hready_in(m_resp.hready), .m(s_req), .s(s_in[i]));
  end

  always @(negedge clk) if (rst_n) begin
    logic [2:0] exp_g;
    exp_g = hbusreq[0] ? 3'b001 : hbusreq[1] ? 3'b010 : hbusreq[2] ? 3'b100 : 3'b010;
    checks++;
    if (hgrant != exp_g) begin failures++; $display("FAIL grant %b for requests %b", hgrant, hbusreq); end
    if ($countones(hbusreq) > 1) contention++;
    if (hbusreq[2] && hbusreq[1]) dma_blocked++;
  end

  task automatic run_master(input int mi, input int n);
    int sl, w;
    logic [31:0] a, d;
    for (int k = 0; k < n; k++) begin
      sl = $urandom_range(0, 2);
      w = $urandom_range(0, 15);
      a = {(sl == 0) ? 4'($urandom_range(2, 13)) : (sl == 1) ? 4'hE : 4'hF, 20'h0, 2'(mi), 4'(w), 2'b00};
      d = $urandom;
      @(negedge clk);
      addr[mi] = a; write[mi] = $urandom_range(0, 1); wdata[mi] = d; req[mi] = 1'b1;
      @(negedge clk);
      req[mi] = 1'b0;
      while (!done[mi]) @(negedge clk);
      if (write[mi]) shadow[mi][sl][w] = d;
      else begin
        checks++;
        if (rdata[mi] != shadow[mi][sl][w] || err[mi]) begin
          failures++;
          $display("FAIL master %0d read %h got %h expected %h", mi, a, rdata[mi], shadow[mi][sl][w]);
        end
      end
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
  endtask

  initial begin
    for (int i = 0; i < 3; i++) begin
      addr[i] = '0; wdata[i] = '0;
      for (int j = 0; j < 3; j++) for (int k = 0; k < 16; k++) shadow[i][j][k] = '0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    fork
      run_master(0, 100);
      run_master(1, 400);
      run_master(2, 400);
    join
    checks++;
    if (contention == 0 || dma_blocked == 0) begin
      failures++; $display("FAIL no contention seen (%0d, %0d)", contention, dma_blocked);
    end
    $display("contention cycles %0d, DMA waiting for core %0d", contention, dma_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
