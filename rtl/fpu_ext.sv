// fpu_ext: the Java core's extension module link to the FPU.
// The FPU sits next to the core rather than on the AMBA bus. Four microcodes start an
// operation with the two top stack words as operands: stfadd (0x0E), stfsub (0x06),
// stfmul (0x07) and stfdiv (0x1A) compute NOS op TOS (value1 op value2 of the Java
// bytecode). ldfpu (0xE6) returns the result to the top of stack: tos_we pulses with
// tos_wdata. If the FPU is still busy when a start or ldfpu microcode arrives, stall is
// raised in the same cycle and the core holds the microcode until stall drops, so fadd,
// fsub, fmul and fdiv become short microcode sequences (start, then ldfpu).
// Timing: ldfpu issued the cycle after an add/sub/mul start stalls 1 cycle; after a
// divide it stalls until the divider finishes (28 cycles after start).
//
// From the SoC description: the microcodes and their numbers, the operands coming from the stack and
// ldfpu writing the top of stack. The stall handshake and operand order are this design's
// own choices.
module fpu_ext
  import jsoc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        uc_valid,
  input  logic [7:0]  uc,
  input  logic [31:0] tos,
  input  logic [31:0] nos,
  output logic        stall,
  output logic        tos_we,
  output logic [31:0] tos_wdata
);
  logic    is_start, is_ld, f_busy, f_done, f_start;
  fpu_op_e f_op;

  always_comb begin
    is_start = 1'b1;
    f_op     = FPU_ADD;
    case (uc)
      UC_STFADD: f_op = FPU_ADD;
      UC_STFSUB: f_op = FPU_SUB;
      UC_STFMUL: f_op = FPU_MUL;
      UC_STFDIV: f_op = FPU_DIV;
      default:   is_start = 1'b0;
    endcase
    is_start = is_start && uc_valid;
    is_ld    = uc_valid && (uc == UC_LDFPU);
  end

  assign stall   = (is_start || is_ld) && f_busy;
  assign f_start = is_start && !f_busy;
  assign tos_we  = is_ld && !f_busy;

  fpu u_fpu (
    .clk, .rst_n, .start(f_start), .op(f_op), .a(nos), .b(tos),
    .busy(f_busy), .done(f_done), .result(tos_wdata)
  );

  logic unused_done;
  assign unused_done = f_done;
endmodule
