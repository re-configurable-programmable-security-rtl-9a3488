// Instruction set of the authentication engine (64-bit instruction word).
// The engine's features (multi-operand add, sigma and function generators,
// rotator, register-file shift, message history, padding, loads with
// ipad/opad/compare, loops, calls, jumps) come from its description; the
// opcodes and field layout below are this design's own.
//   [63:58] opcode      [57:53] rd       [52:48] ra      [47:43] rb
//   [42:38] rc          [37:33] re       [32:30] sel     [29:20] cnt
//   [19]    post-increment               [18:17] access size
//   [15:0]  immediate / target address
// Register operands are 5 bits: bit 4 selects the register file (0: MCU
// file, 1: MGU file), bits 3:0 the register.
package auth_isa_pkg;
  typedef enum logic [5:0] {
    OP_NOP  = 6'd0,  // nothing
    OP_ADD  = 6'd1,  // rd = ra + rb (+ rc if sel[0]) (+ re if sel[1])
    OP_SIG  = 6'd2,  // rd = sigma(ra), cfg sel[2] ? MGU[sel[0]] : MCU[sel[0]], third term shift if sel[1]
    OP_FN   = 6'd3,  // rd = fn(ra, rb, rc), configuration fg[sel[1:0]]
    OP_ROT  = 6'd4,  // rd = rotate/shift ra by imm[5:0], operation sel[1:0]
    OP_LDI  = 6'd5,  // rd = imm (zero-extended)
    OP_LDH  = 6'd6,  // rd = {rd[47:0], imm}
    OP_LD   = 6'd7,  // rd = dmem[areg[sel] + imm] per load mode
    OP_ST   = 6'd8,  // dmem[areg[sel] + imm] = ra
    OP_LDK  = 6'd9,  // rd = cmem[areg[sel] + imm]
    OP_MHP  = 6'd10, // push ra into the message history
    OP_MHR  = 6'd11, // rd = message history tap imm[3:0]
    OP_PAD  = 6'd12, // rd = pad(ra)
    OP_LDA  = 6'd13, // areg[sel] = imm
    OP_SHF  = 6'd14, // shift file rd[4]: r[0] = ra, r[i] = r[i-1] for i < shift_n
    OP_JMP  = 6'd15, // jump to imm
    OP_JZ   = 6'd16, // jump if ra == 0
    OP_JNZ  = 6'd17, // jump if ra != 0
    OP_CALL = 6'd18, // call imm
    OP_RET  = 6'd19, // return
    OP_LOOP = 6'd20, // repeat next instructions up to imm, cnt times (cnt = 0: ra times)
    OP_HALT = 6'd21  // stop, signal done
  } aop_e;
endpackage
