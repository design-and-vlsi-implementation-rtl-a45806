// ext_mem_model: behavioural model of the external flash (chip select 0) and SRAM (chip
// select 1) on the memory-system bus. Not synthesizable logic of the SoC: it stands for
// two asynchronous memory chips. Reads are combinational while CS and OE are low; writes
// happen while CS and WE are low, per byte enable. Each chip holds DEPTH words indexed by
// the low address bits. Testbenches preload the flash through the flash array.
module ext_mem_model #(
  parameter int ADDR_W = 22,
  parameter int DEPTH = 4096
) (
  input  logic [ADDR_W-1:0] ext_addr,
  input  logic [31:0]       ext_wdata,
  output logic [31:0]       ext_rdata,
  input  logic [1:0]        ext_cs_n,
  input  logic              ext_oe_n,
  input  logic              ext_we_n,
  input  logic [3:0]        ext_be_n
);
  logic [31:0] flash [DEPTH];
  logic [31:0] sram [DEPTH];
  int idx;

  assign idx = int'(ext_addr) % DEPTH;

  initial begin
    for (int i = 0; i < DEPTH; i++) begin flash[i] = '0; sram[i] = '0; end
  end

  always_comb begin
    ext_rdata = 32'hDEAD_BEEF;
    if (!ext_oe_n && !ext_cs_n[0]) ext_rdata = flash[idx];
    if (!ext_oe_n && !ext_cs_n[1]) ext_rdata = sram[idx];
  end

  always @(ext_we_n or ext_cs_n or ext_wdata or idx or ext_be_n) begin
    if (!ext_we_n && !ext_cs_n[1])
      for (int b = 0; b < 4; b++)
        if (!ext_be_n[b]) sram[idx][8*b +: 8] = ext_wdata[8*b +: 8];
    if (!ext_we_n && !ext_cs_n[0])
      for (int b = 0; b < 4; b++)
        if (!ext_be_n[b]) flash[idx][8*b +: 8] = ext_wdata[8*b +: 8];
  end
endmodule
