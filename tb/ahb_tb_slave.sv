// ahb_tb_slave: behavioural AHB memory slave used by the testbenches of the bus masters
// and bridges. DEPTH words indexed by HADDR[..:2]; each transfer gets a random number of
// wait states up to MAXWAIT; a transfer to region ERR_REGION (HADDR[31:28]) gets the
// two-cycle ERROR response. Byte and halfword writes update only their lanes. accesses
// counts the transfers it has completed.
module ahb_tb_slave
  import jsoc_pkg::*;
#(
  parameter int DEPTH = 1024,
  parameter int MAXWAIT = 2,
  parameter logic [3:0] ERR_REGION = 4'hF
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     hsel,
  input  logic     hready_in,
  input  ahb_m2s_t m,
  output ahb_s2m_t s
);
  logic [31:0] mem [DEPTH];
  logic        active = 1'b0, wr_q = 1'b0, err_q = 1'b0;
  logic [1:0]  errph = '0;
  logic [31:0] addr_q = '0;
  logic [2:0]  size_q = '0;
  int          wcnt = 0, accesses = 0;

  initial for (int i = 0; i < DEPTH; i++) mem[i] = '0;

  function automatic int widx(input logic [31:0] a);
    return int'(a[31:2]) % DEPTH;
  endfunction

  always_comb begin
    s = AHB_S2M_OKAY;
    s.hrdata = mem[widx(addr_q)];
    if (active && !err_q) s.hready = (wcnt == 0);
    if (active && err_q) begin
      s.hresp  = HRESP_ERROR;
      s.hready = (errph == 2'd1);
    end
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      active <= 1'b0;
    end else begin
      if (active && !err_q && wcnt > 0) wcnt <= wcnt - 1;
      if (active && err_q && errph == 2'd0) errph <= 2'd1;
      if (s.hready) begin
        if (active) accesses <= accesses + 1;
        if (active && wr_q && !err_q)
          for (int b = 0; b < 4; b++)
            if (size_q == 3'd2 || (size_q == 3'd1 && b / 2 == int'(addr_q[1])) ||
                (size_q == 3'd0 && b == int'(addr_q[1:0])))
              mem[widx(addr_q)][8*b +: 8] <= m.hwdata[8*b +: 8];
        active <= hsel && hready_in && m.htrans[1];
        addr_q <= m.haddr;
        wr_q   <= m.hwrite;
        size_q <= m.hsize;
        err_q  <= (m.haddr[31:28] == ERR_REGION);
        errph  <= 2'd0;
        wcnt   <= $urandom_range(0, MAXWAIT);
      end
    end
  end
endmodule
