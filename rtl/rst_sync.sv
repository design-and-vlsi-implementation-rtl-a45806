// rst_sync: reset synchroniser. Asserts rst_out_n asynchronously with rst_in_n and
// releases it two clk edges after rst_in_n rises, so each clock domain leaves reset
// synchronously to its own clock.
//
// Helper of this design; the SoC description does not describe resets.
module rst_sync (
  input  logic clk,
  input  logic rst_in_n,
  output logic rst_out_n
);
  logic r1;
  always_ff @(posedge clk or negedge rst_in_n) begin
    if (!rst_in_n) {rst_out_n, r1} <= 2'b00;
    else           {rst_out_n, r1} <= {r1, 1'b1};
  end
endmodule
