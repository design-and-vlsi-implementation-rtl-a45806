// fpu: 32-bit IEEE 754 single-precision floating-point unit (add, sub, mul, div).
// Operands are latched on start. Add, subtract and multiply are computed in one cycle
// from the latched operands (done one cycle after start); divide uses a restoring
// radix-2 divider that produces one quotient bit per cycle (done 28 cycles after start).
// All results are rounded to nearest, ties to even. Special values follow IEEE 754: NaN
// in or an invalid operation (inf-inf, 0*inf, 0/0, inf/inf) gives the quiet NaN
// 0x7FC00000, overflow gives a signed infinity, x/0 a signed infinity. Subnormal numbers
// are not supported: subnormal inputs are read as zero and results below the normal range
// are flushed to a signed zero.
// Interface: start with op/a/b for one cycle while busy is low; result is valid from the
// cycle done pulses until the next start.
//
// From the SoC description: a 32-bit FPU with add, subtract, multiply and divide. Latencies, rounding
// mode and the handling of special values and subnormals are this design's own choices.
module fpu
  import jsoc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  fpu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        busy,
  output logic        done,
  output logic [31:0] result
);
  localparam logic [31:0] QNAN = 32'h7FC0_0000;
  localparam int DIV_BITS = 27;

  // Round a normalised 24-bit significand with guard and sticky bits, then pack.
  function automatic logic [31:0] round_pack(input logic sign, input logic signed [11:0] exp,
                                             input logic [23:0] mant, input logic g,
                                             input logic st);
    logic [24:0]       r;
    logic signed [11:0] e;
    r = {1'b0, mant} + 25'((g && (st || mant[0])) ? 1 : 0);
    e = exp;
    if (r[24]) begin
      r = r >> 1;
      e = e + 12'sd1;
    end
    if (e >= 12'sd255)    return {sign, 8'hFF, 23'h0};
    else if (e <= 12'sd0) return {sign, 31'h0};
    else                  return {sign, e[7:0], r[22:0]};
  endfunction

  function automatic logic [31:0] fp_add(input logic [31:0] x, input logic [31:0] y);
    logic        sx, sy, sr, xnan, ynan, xinf, yinf, xz, yz;
    logic [7:0]  ex, ey;
    logic [23:0] mx, my;
    logic [7:0]  d;
    logic [27:0] ax, ay, sum;  // significand << 3 (guard, round, sticky), one carry bit
    logic signed [11:0] e;
    int          lz;
    sx = x[31]; sy = y[31]; ex = x[30:23]; ey = y[30:23];
    xnan = (ex == 8'hFF) && (x[22:0] != 0); ynan = (ey == 8'hFF) && (y[22:0] != 0);
    xinf = (ex == 8'hFF) && (x[22:0] == 0); yinf = (ey == 8'hFF) && (y[22:0] == 0);
    xz = (ex == 8'h00); yz = (ey == 8'h00);
    if (xnan || ynan) return QNAN;
    if (xinf && yinf) return (sx == sy) ? x : QNAN;
    if (xinf) return x;
    if (yinf) return y;
    if (xz && yz) return {sx & sy, 31'h0};
    if (xz) return y;
    if (yz) return x;
    // order so that |x| >= |y|
    if (y[30:0] > x[30:0]) begin
      {sx, ex, mx} = {sy, ey, 1'b1, y[22:0]};
      {sy, ey, my} = {x[31], x[30:23], 1'b1, x[22:0]};
    end else begin
      mx = {1'b1, x[22:0]};
      my = {1'b1, y[22:0]};
    end
    d  = ex - ey;
    ax = {1'b0, mx, 3'b000};
    ay = {1'b0, my, 3'b000};
    if (d >= 8'd27) ay = 28'd1;
    else if (d != 0) ay = (ay >> d) | 28'((ay & ((28'd1 << d) - 28'd1)) != 0 ? 1 : 0);
    sr = sx;
    e  = 12'(ex);
    if (sx == sy) begin
      sum = ax + ay;
      if (sum[27]) begin
        sum = (sum >> 1) | 28'(sum[0]);
        e   = e + 12'sd1;
      end
    end else begin
      sum = ax - ay;
      if (sum == 0) return 32'h0;
      lz = 0;
      for (int i = 26; i >= 0; i--) begin
        if (sum[i]) break;
        lz++;
      end
      sum = sum << lz;
      e   = e - 12'(lz);
    end
    return round_pack(sr, e, sum[26:3], sum[2], |sum[1:0]);
  endfunction

  function automatic logic [31:0] fp_mul(input logic [31:0] x, input logic [31:0] y);
    logic        s, xnan, ynan, xinf, yinf, xz, yz;
    logic [47:0] p;
    logic signed [11:0] e;
    s = x[31] ^ y[31];
    xnan = (x[30:23] == 8'hFF) && (x[22:0] != 0); ynan = (y[30:23] == 8'hFF) && (y[22:0] != 0);
    xinf = (x[30:23] == 8'hFF) && (x[22:0] == 0); yinf = (y[30:23] == 8'hFF) && (y[22:0] == 0);
    xz = (x[30:23] == 8'h00); yz = (y[30:23] == 8'h00);
    if (xnan || ynan || (xinf && yz) || (yinf && xz)) return QNAN;
    if (xinf || yinf) return {s, 8'hFF, 23'h0};
    if (xz || yz) return {s, 31'h0};
    p = {24'h0, 1'b1, x[22:0]} * {24'h0, 1'b1, y[22:0]};
    e = 12'(x[30:23]) + 12'(y[30:23]) - 12'sd127;
    if (p[47]) return round_pack(s, e + 12'sd1, p[47:24], p[23], |p[22:0]);
    else       return round_pack(s, e, p[46:23], p[22], |p[21:0]);
  endfunction

  // ---------------- control ----------------
  typedef enum logic [1:0] {F_IDLE, F_EXEC, F_DIV} state_e;
  state_e      state;
  fpu_op_e     op_q;
  logic [31:0] a_q, b_q;
  logic [25:0] rem;
  logic [DIV_BITS-1:0] quo;
  logic [4:0]  cnt;
  logic        div_special;
  logic [31:0] div_special_res;

  // division special cases, decided from the latched operands
  always_comb begin
    logic anan, bnan, ainf, binf, az, bz, s;
    s    = a_q[31] ^ b_q[31];
    anan = (a_q[30:23] == 8'hFF) && (a_q[22:0] != 0);
    bnan = (b_q[30:23] == 8'hFF) && (b_q[22:0] != 0);
    ainf = (a_q[30:23] == 8'hFF) && (a_q[22:0] == 0);
    binf = (b_q[30:23] == 8'hFF) && (b_q[22:0] == 0);
    az   = (a_q[30:23] == 8'h00);
    bz   = (b_q[30:23] == 8'h00);
    div_special = 1'b1;
    if (anan || bnan || (ainf && binf) || (az && bz)) div_special_res = QNAN;
    else if (ainf || bz)                             div_special_res = {s, 8'hFF, 23'h0};
    else if (az || binf)                             div_special_res = {s, 31'h0};
    else begin
      div_special     = 1'b0;
      div_special_res = 32'h0;
    end
  end

  logic [31:0] div_res;
  always_comb begin
    logic signed [11:0] e;
    e = 12'(a_q[30:23]) - 12'(b_q[30:23]) + 12'sd127;
    if (quo[26]) div_res = round_pack(a_q[31] ^ b_q[31], e, quo[26:3], quo[2], |quo[1:0] || rem != 0);
    else         div_res = round_pack(a_q[31] ^ b_q[31], e - 12'sd1, quo[25:2], quo[1], quo[0] || rem != 0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= F_IDLE;
      op_q   <= FPU_ADD;
      a_q    <= '0;
      b_q    <= '0;
      rem    <= '0;
      quo    <= '0;
      cnt    <= '0;
      result <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        F_IDLE: if (start) begin
          op_q  <= op;
          a_q   <= a;
          b_q   <= b;
          state <= (op == FPU_DIV) ? F_DIV : F_EXEC;
          rem   <= {2'b00, 1'b1, a[22:0]};
          quo   <= '0;
          cnt   <= '0;
        end
        F_EXEC: begin
          case (op_q)
            FPU_ADD: result <= fp_add(a_q, b_q);
            FPU_SUB: result <= fp_add(a_q, {~b_q[31], b_q[30:0]});
            default: result <= fp_mul(a_q, b_q);
          endcase
          done  <= 1'b1;
          state <= F_IDLE;
        end
        F_DIV: begin
          if (int'(cnt) == DIV_BITS) begin
            result <= div_special ? div_special_res : div_res;
            done   <= 1'b1;
            state  <= F_IDLE;
          end else begin
            if (rem >= {2'b00, 1'b1, b_q[22:0]}) begin
              rem <= (rem - {2'b00, 1'b1, b_q[22:0]}) << 1;
              quo <= {quo[DIV_BITS-2:0], 1'b1};
            end else begin
              rem <= rem << 1;
              quo <= {quo[DIV_BITS-2:0], 1'b0};
            end
            cnt <= cnt + 5'd1;
          end
        end
        default: state <= F_IDLE;
      endcase
    end
  end

  assign busy = (state != F_IDLE);
endmodule
