// apb_irq: interrupt request controller on the APB.
// N level-sensitive sources (passed through two-flop synchronisers, since some come from
// the high-speed clock domain) are masked by an enable register and combined into one
// request to the Java core; a fixed priority encoder (source 0 highest) names the
// request to serve.
//   0x00 RAW     synchronised source levels, read only
//   0x04 ENABLE  per-source enable
//   0x08 PENDING RAW AND ENABLE, read only
//   0x0C ID      bit31 valid, [4:0] lowest-numbered pending source, read only
//
// From the SoC description: an interrupt request controller sits on the APB. Its sources, registers
// and priority rule are this design's own.
module apb_irq
  import jsoc_pkg::*;
#(
  parameter int N = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        psel,
  input  apb_m2s_t    apb,
  output logic [31:0] prdata,
  input  logic [N-1:0] src,
  output logic        irq
);
  logic [N-1:0] s1, raw, enable, pending;
  logic [4:0]   id;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0; raw <= '0; enable <= '0;
    end else begin
      s1  <= src;
      raw <= s1;
      if (psel && apb.penable && apb.pwrite && apb.paddr[3:2] == 2'd1)
        enable <= apb.pwdata[N-1:0];
    end
  end

  assign pending = raw & enable;
  assign irq     = |pending;

  always_comb begin
    id = '0;
    for (int i = N - 1; i >= 0; i--)
      if (pending[i]) id = 5'(i);
  end

  always_comb begin
    case (apb.paddr[3:2])
      2'd0:    prdata = 32'(raw);
      2'd1:    prdata = 32'(enable);
      2'd2:    prdata = 32'(pending);
      default: prdata = {irq, 26'h0, id};
    endcase
  end
endmodule
