// clk_gen: generates the SoC clocks from the root clock as configured in clk_manager.
//   hclk    high-speed AHB clock (Java core, FPU, DMA, debug module): the root clock
//   lclk    low-speed AHB/APB clock: the root clock with only one rising edge every
//           `ratio` cycles (ratio 0 and 1 both give the root clock)
//   gclk[i] hclk, shut down while gate[i] is 0 (gclk[0] is the debug module clock)
// lclk is made by gating the root clock with a pulse that is high for one root cycle in
// every `ratio`, through clk_gate, so its rising edges coincide with hclk edges and a
// ratio change never produces a short pulse; the new ratio takes effect at the end of the
// current period. The configuration comes from the low-speed domain and is passed
// through two-flop synchronisers. lclk has a duty cycle of 1/(2*ratio).
//
// From the SoC description: clk_gen derives the clocks from the settings in clk_manager, the two AHB
// layers run at a configurable ratio and idle modules can have their clocks shut down. The
// gating-based divider and the register-to-clock synchronisation are this design's own.
module clk_gen #(
  parameter int NG = 2,
  parameter logic [3:0] RATIO_RESET = 4'd2
) (
  input  logic          clk_in,
  input  logic          rst_n,
  input  logic [3:0]    ratio_cfg,
  input  logic [NG-1:0] gate_cfg,
  output logic          hclk,
  output logic          lclk,
  output logic [NG-1:0] gclk
);
  logic [3:0]    ratio_s1, ratio_s2, ratio_q, cnt;
  logic [NG-1:0] gate_s1, gate_s2;
  logic          ls_en;

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) begin
      ratio_s1 <= RATIO_RESET;
      ratio_s2 <= RATIO_RESET;
      ratio_q  <= RATIO_RESET;
      gate_s1  <= '1;
      gate_s2  <= '1;
      cnt      <= '0;
    end else begin
      ratio_s1 <= ratio_cfg;
      ratio_s2 <= ratio_s1;
      gate_s1  <= gate_cfg;
      gate_s2  <= gate_s1;
      if (cnt + 4'd1 >= ratio_q) begin
        cnt     <= '0;
        ratio_q <= ratio_s2;
      end else begin
        cnt <= cnt + 4'd1;
      end
    end
  end

  assign ls_en = (cnt == 4'd0);
  assign hclk  = clk_in;

  clk_gate u_ls (.clk(clk_in), .en(ls_en), .gclk(lclk));

  for (genvar i = 0; i < NG; i++) begin : g_gate
    clk_gate u_g (.clk(clk_in), .en(gate_s2[i]), .gclk(gclk[i]));
  end
endmodule
