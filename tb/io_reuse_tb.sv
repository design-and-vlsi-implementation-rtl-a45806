// io_reuse_tb: random select, output and pad values; each pad must carry controller 1
// when its select bit is 0 and controller 2 when it is 1, and the unconnected controller
// must see its idle level.
module io_reuse_tb;
  localparam int W = 8;
  localparam logic [W-1:0] IDLE1 = 8'hA5, IDLE2 = 8'h0F;
  logic [W-1:0] sel, out1, oe1, out2, oe2, pad_out, pad_oe, pad_in, in1, in2;
  int checks = 0, failures = 0;

  io_reuse #(.W(W), .IDLE1(IDLE1), .IDLE2(IDLE2)) dut (.*);

  initial begin
    for (int i = 0; i < 1000; i++) begin
      {sel, out1, oe1} = {8'($urandom), 8'($urandom), 8'($urandom)};
      {out2, oe2, pad_in} = {8'($urandom), 8'($urandom), 8'($urandom)};
      #1;
      for (int b = 0; b < W; b++) begin
        checks++;
        if (pad_out[b] != (sel[b] ? out2[b] : out1[b]) || pad_oe[b] != (sel[b] ? oe2[b] : oe1[b])
            || in1[b] != (sel[b] ? IDLE1[b] : pad_in[b]) || in2[b] != (sel[b] ? pad_in[b] : IDLE2[b])) begin
          failures++;
          $display("FAIL bit %0d sel=%b", b, sel[b]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
