// ahb_arbiter_tb: random request patterns against the fixed-priority rule
// (master 0 > 1 > 2, default master 1 when idle), with random HREADY. Checks the grant
// every cycle and the address/data-phase owner pipeline (hmaster follows the grant at each
// HREADY edge, hmaster_d follows hmaster).
module ahb_arbiter_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] hbusreq = '0, hgrant;
  logic hready = 1'b1;
  logic [1:0] hmaster, hmaster_d;
  int checks = 0, failures = 0;
  logic [1:0] exp_m = 2'd1, exp_md = 2'd1, pick;

  always #5 clk = ~clk;

  ahb_arbiter #(.NM(3), .DEFAULT_MASTER(1)) dut (.clk, .rst_n, .hbusreq, .hready, .hgrant,
                                                 .hmaster, .hmaster_d);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      hbusreq = 3'($urandom);
      hready  = ($urandom_range(0, 3) != 0);
      #1;
      pick = hbusreq[0] ? 2'd0 : hbusreq[1] ? 2'd1 : hbusreq[2] ? 2'd2 : 2'd1;
      checks++;
      if (hgrant != (3'b001 << pick)) begin
        failures++; $display("FAIL grant %b for req %b", hgrant, hbusreq);
      end
      checks++;
      if (hmaster != exp_m || hmaster_d != exp_md) begin
        failures++; $display("FAIL owners %0d/%0d expected %0d/%0d", hmaster, hmaster_d, exp_m, exp_md);
      end
      @(posedge clk);
      if (hready) begin exp_md = exp_m; exp_m = pick; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
