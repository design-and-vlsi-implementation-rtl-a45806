// fpu_ext_tb: checks the FPU microcode interface of the Java core's extension module.
// It issues stfadd/stfsub/stfmul/stfdiv with NOS and TOS operands, then ldfpu, and checks
// the value written back to TOS and the number of stall cycles when ldfpu comes two
// cycles after the start (none after add/sub/mul, 27 after div), that a start while busy
// stalls, and that other microcodes are ignored. Expected values are exactly
// representable results.
module fpu_ext_tb;
  import jsoc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic uc_valid = 1'b0;
  logic [7:0] uc = '0;
  logic [31:0] tos = '0, nos = '0, tos_wdata;
  logic stall, tos_we;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fpu_ext dut (.clk, .rst_n, .uc_valid, .uc, .tos, .nos, .stall, .tos_we, .tos_wdata);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // issue one microcode; returns the number of stall cycles and the written TOS value
  task automatic issue(input logic [7:0] code, output int stalls, output logic [31:0] wval,
                       output bit wrote);
    @(negedge clk);
    uc_valid = 1'b1; uc = code;
    stalls = 0; wrote = 1'b0;
    #1;
    while (stall) begin @(negedge clk); #1 stalls++; end
    wrote = tos_we; wval = tos_wdata;
    @(posedge clk);
    @(negedge clk);
    uc_valid = 1'b0;
  endtask

  task automatic op(input logic [7:0] code, input logic [31:0] n, input logic [31:0] t,
                    input logic [31:0] expect_r, input int expect_stalls, input string name);
    int s; logic [31:0] v; bit w;
    nos = n; tos = t;
    issue(code, s, v, w);
    check(s == 0 && !w, {name, ": start accepted without stall"});
    issue(UC_LDFPU, s, v, w);
    check(w, {name, ": ldfpu writes TOS"});
    check(v == expect_r, $sformatf("%s: result %h expected %h", name, v, expect_r));
    check(s == expect_stalls, $sformatf("%s: %0d stall cycles, expected %0d", name, s, expect_stalls));
  endtask

  initial begin
    int s; logic [31:0] v; bit w;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    op(UC_STFADD, 32'h40400000, 32'h3F800000, 32'h40800000, 0, "fadd 3+1");
    op(UC_STFSUB, 32'h40400000, 32'h3F800000, 32'h40000000, 0, "fsub 3-1");
    op(UC_STFMUL, 32'h40400000, 32'hC0000000, 32'hC0C00000, 0, "fmul 3*-2");
    op(UC_STFDIV, 32'h41100000, 32'h40400000, 32'h40400000, 27, "fdiv 9/3");
    // start while the divider is busy stalls until it is free
    nos = 32'h3F800000; tos = 32'h40000000;
    issue(UC_STFDIV, s, v, w);
    issue(UC_STFADD, s, v, w);
    check(s == 27, $sformatf("start while busy stalls %0d cycles", s));
    issue(UC_LDFPU, s, v, w);
    check(v == 32'h40400000 && w, "second start used after divider finished (1+2=3)");
    // an unrelated microcode neither stalls nor writes
    issue(8'h55, s, v, w);
    check(s == 0 && !w, "other microcode ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
