// ahb_arbiter: fixed-priority arbiter of the high-speed AHB.
// Master 0 has the highest priority (debug module), then master 1 (Java core), then
// master 2 (DMA controller), so the core always wins over a running DMA transfer. HGRANT
// is the one-hot grant of the highest-priority requester, or of DEFAULT_MASTER when none
// requests. A master owns the address phase in the cycle after it saw HGRANT with HREADY
// high; hmaster names that owner and hmaster_d the owner of the current data phase (for
// the write-data multiplexer). Since all masters issue single transfers, grants may move
// after every transfer; HLOCK and SPLIT/RETRY are not supported.
//
// From the SoC description: the three masters and their priority order. The grant timing and the
// default master (the Java core) are this design's own choices.
module ahb_arbiter #(
  parameter int NM = 3,
  parameter int DEFAULT_MASTER = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NM-1:0]         hbusreq,
  input  logic                  hready,
  output logic [NM-1:0]         hgrant,
  output logic [$clog2(NM)-1:0] hmaster,
  output logic [$clog2(NM)-1:0] hmaster_d
);
  localparam int MW = $clog2(NM);
  logic [MW-1:0] pick;

  always_comb begin
    pick = MW'(DEFAULT_MASTER);
    for (int i = NM - 1; i >= 0; i--)
      if (hbusreq[i]) pick = MW'(i);
  end

  always_comb begin
    hgrant = '0;
    hgrant[pick] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hmaster   <= MW'(DEFAULT_MASTER);
      hmaster_d <= MW'(DEFAULT_MASTER);
    end else if (hready) begin
      hmaster   <= pick;
      hmaster_d <= hmaster;
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(hgrant));
endmodule
