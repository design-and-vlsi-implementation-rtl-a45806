// io_reuse: shares W chip pads between two peripheral controllers.
// For each pad bit i, sel[i]=0 connects the pad to controller 1 and sel[i]=1 to
// controller 2. Output direction: pad_out/pad_oe come from out1/oe1 or out2/oe2. Input
// direction: the pad value goes to in1 or in2; the controller that is not connected sees
// its idle level (IDLE1/IDLE2), e.g. 1 for a UART receive line. sel comes from io_reg.
// Purely combinational.
//
// From the SoC description: the multiplexing rule (sel=0 controller 1, sel=1 controller 2) and io_reg.
// The idle levels seen by the unconnected controller are this design's own.
module io_reuse #(
  parameter int W = 8,
  parameter logic [W-1:0] IDLE1 = '0,
  parameter logic [W-1:0] IDLE2 = '0
) (
  input  logic [W-1:0] sel,
  input  logic [W-1:0] out1,
  input  logic [W-1:0] oe1,
  input  logic [W-1:0] out2,
  input  logic [W-1:0] oe2,
  output logic [W-1:0] pad_out,
  output logic [W-1:0] pad_oe,
  input  logic [W-1:0] pad_in,
  output logic [W-1:0] in1,
  output logic [W-1:0] in2
);
  always_comb begin
    for (int i = 0; i < W; i++) begin
      pad_out[i] = sel[i] ? out2[i] : out1[i];
      pad_oe[i]  = sel[i] ? oe2[i]  : oe1[i];
      in1[i]     = sel[i] ? IDLE1[i] : pad_in[i];
      in2[i]     = sel[i] ? pad_in[i] : IDLE2[i];
    end
  end
endmodule
