// clk_gen_tb: for several ratios, lclk must rise exactly once every `ratio` root clock
// cycles (ratio 0 and 1: every cycle) and never produce a pulse shorter than half a root
// period; a gate bit of 0 must stop its gated clock and 1 restart it. Ratio and gate
// changes are applied while the clocks run, as software would.
module clk_gen_tb;
  logic clk_in = 1'b0, rst_n = 1'b0;
  logic [3:0] ratio_cfg = 4'd2;
  logic [1:0] gate_cfg = 2'b11, gclk;
  logic hclk, lclk;
  int checks = 0, failures = 0;
  int ledges = 0, gedges0 = 0, gedges1 = 0;
  realtime lrise = 0;

  always #5 clk_in = ~clk_in;

  clk_gen #(.NG(2)) dut (.clk_in, .rst_n, .ratio_cfg, .gate_cfg, .hclk, .lclk, .gclk);

  always @(posedge lclk) begin ledges++; lrise = $realtime; end
  always @(negedge lclk) if (rst_n) begin
    checks++;
    if ($realtime - lrise < 4.99) begin failures++; $display("FAIL short lclk pulse at %0t rise %0t", $realtime, lrise); end
  end
  always @(posedge gclk[0]) gedges0++;
  always @(posedge gclk[1]) gedges1++;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    int r, n0;
    repeat (3) @(negedge clk_in);
    rst_n = 1'b1;
    foreach (r_list[k]) begin
      r = r_list[k];
      ratio_cfg = 4'(r);
      repeat (40) @(negedge clk_in);   // let the new ratio through the synchroniser
      n0 = ledges;
      repeat (12 * 16) @(negedge clk_in);
      check(ledges - n0 == 12 * 16 / ((r < 2) ? 1 : r), $sformatf("ratio %0d: %0d lclk edges in %0d cycles", r, ledges - n0, 12 * 16));
      check(hclk == clk_in, "hclk is the root clock");
    end
    gate_cfg = 2'b10;
    repeat (4) @(negedge clk_in);
    n0 = gedges0;
    r = gedges1;
    repeat (20) @(negedge clk_in);
    check(gedges0 == n0, "gated clock 0 stopped");
    check(gedges1 - r == 20, "clock 1 still running");
    gate_cfg = 2'b11;
    repeat (4) @(negedge clk_in);
    n0 = gedges0;
    repeat (20) @(negedge clk_in);
    check(gedges0 - n0 == 20, "gated clock 0 restarted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int r_list[7] = '{2, 3, 1, 4, 0, 6, 2};

  initial begin
    repeat (20000) @(posedge clk_in);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
