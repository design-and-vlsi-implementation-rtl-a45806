// fpu_tb: self-checking test of the single-precision FPU.
// Reference results are computed with double-precision real arithmetic and rounded to
// single precision (ties to even) in the testbench; since a double holds more than twice
// the single-precision significand, this double rounding gives the correctly rounded
// single result for add, sub, mul and div. Random normal operands are kept in an exponent
// range whose results stay normal (the FPU flushes subnormals). Special values and the
// latencies (1 cycle for add/sub/mul, 28 for div) are checked as well.
module fpu_tb;
  import jsoc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, busy, done;
  fpu_op_e op = FPU_ADD;
  logic [31:0] a = '0, b = '0, result;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fpu dut (.clk, .rst_n, .start, .op, .a, .b, .busy, .done, .result);

  function automatic real s2r(input logic [31:0] x);
    logic [63:0] d;
    if (x[30:23] == 8'h00) return 0.0;
    d = {x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'h0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2s(input real r);
    logic [63:0] d;
    logic [24:0] m;
    int e;
    d = $realtobits(r);
    if (r == 0.0) return {d[63], 31'h0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {2'b01, d[51:29]} + 25'((d[28] && (d[27:0] != 0 || d[29])) ? 1 : 0);
    if (m[24]) begin m = m >> 1; e++; end
    if (e >= 255) return {d[63], 8'hFF, 23'h0};
    if (e <= 0) return {d[63], 31'h0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  task automatic run(input fpu_op_e o, input logic [31:0] x, input logic [31:0] y,
                     input logic [31:0] expect_r, input int expect_lat);
    int lat;
    @(negedge clk);
    op = o; a = x; b = y; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 0;
    while (!done) begin @(negedge clk); lat++; end
    checks++;
    if (result !== expect_r) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h got %h expected %h", o, x, y, result, expect_r);
    end
    if (expect_lat > 0) begin
      checks++;
      if (lat != expect_lat) begin
        failures++;
        $display("FAIL latency op=%0d %0d expected %0d", o, lat, expect_lat);
      end
    end
  endtask

  function automatic logic [31:0] rnd_num();
    return {1'($urandom), 8'(64 + $urandom_range(0, 126)), 23'($urandom)};
  endfunction

  initial begin
    logic [31:0] x, y;
    real rx, ry, rr;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      x = rnd_num();
      y = (i % 4 == 0) ? {1'($urandom), x[30:23] - 8'($urandom_range(0, 2)), 23'($urandom)} : rnd_num();
      rx = s2r(x); ry = s2r(y);
      case (i % 4)
        0: begin rr = rx + ry; run(FPU_ADD, x, y, r2s(rr), 1); end
        1: begin rr = rx - ry; run(FPU_SUB, x, y, r2s(rr), 1); end
        2: begin rr = rx * ry; run(FPU_MUL, x, y, r2s(rr), 1); end
        default: begin rr = rx / ry; run(FPU_DIV, x, y, r2s(rr), 28); end
      endcase
    end
    // exact cancellation, ties and special values
    run(FPU_SUB, 32'h3FC00000, 32'h3FC00000, 32'h00000000, 1);  // 1.5 - 1.5 = +0
    run(FPU_ADD, 32'h3F800000, 32'h33800000, 32'h3F800000, 1);  // 1 + 2^-24: tie to even
    run(FPU_ADD, 32'h3F800001, 32'h33800000, 32'h3F800002, 1);  // tie rounds up to even
    run(FPU_MUL, 32'h40000000, 32'h40400000, 32'h40C00000, 1);  // 2*3 = 6
    run(FPU_DIV, 32'h40C00000, 32'h40400000, 32'h40000000, 28); // 6/3 = 2
    run(FPU_DIV, 32'h3F800000, 32'h00000000, 32'h7F800000, 28); // 1/0 = +inf
    run(FPU_DIV, 32'h00000000, 32'h00000000, 32'h7FC00000, 28); // 0/0 = NaN
    run(FPU_MUL, 32'h7F800000, 32'h00000000, 32'h7FC00000, 1);  // inf*0 = NaN
    run(FPU_SUB, 32'h7F800000, 32'h7F800000, 32'h7FC00000, 1);  // inf-inf = NaN
    run(FPU_ADD, 32'h7F800000, 32'h3F800000, 32'h7F800000, 1);  // inf+1 = inf
    run(FPU_MUL, 32'h7F000000, 32'h40000000, 32'h7F800000, 1);  // overflow
    run(FPU_ADD, 32'h7FC00000, 32'h3F800000, 32'h7FC00000, 1);  // NaN propagates
    run(FPU_ADD, 32'h80000000, 32'h80000000, 32'h80000000, 1);  // -0 + -0 = -0
    run(FPU_MUL, 32'hC0000000, 32'h3F000000, 32'hBF800000, 1);  // -2*0.5 = -1
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
