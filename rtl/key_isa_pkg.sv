// Instruction set of the key generation engine (32-bit instruction word).
// The units and control features come from the engine's description; the
// opcodes and fields are this design's own.
//   [31:26] opcode  [25:22] rd  [21:18] ra  [17:14] rb  [13:0] immediate
// Flags: C (carry/borrow of the 64-bit adder) and Z (adder result zero).
// The Triple-DES generator uses registers r13, r14, r15 as its keys.
package key_isa_pkg;
  typedef enum logic [5:0] {
    KOP_NOP  = 6'd0,
    KOP_ADD  = 6'd1,  // rd = ra + rb            (C, Z)
    KOP_ADC  = 6'd2,  // rd = ra + rb + C        (C, Z)
    KOP_SUB  = 6'd3,  // rd = ra - rb            (C = borrow, Z)
    KOP_SBB  = 6'd4,  // rd = ra - rb - C        (C, Z)
    KOP_CMP  = 6'd5,  // flags of ra - rb, no write
    KOP_SHL  = 6'd6,  // rd = ra << imm[5:0], fill from rb (lower word)
    KOP_SHR  = 6'd7,  // rd = ra >> imm[5:0], fill from rb (higher word)
    KOP_LOG  = 6'd8,  // rd[15:0] = logic16(ra, rb, imm[2:0]), rd[63:16] = ra[63:16]
    KOP_LDI  = 6'd9,  // rd = imm
    KOP_LDH  = 6'd10, // rd = {rd[49:0], imm}
    KOP_MMW  = 6'd11, // Montgomery operand imm[5:4] (A/B/M), word imm[3:0] = ra
    KOP_MMS  = 6'd12, // start Montgomery multiply, size imm[1:0]
    KOP_MMR  = 6'd13, // rd = Montgomery result word imm[3:0]
    KOP_JMB  = 6'd14, // jump to imm while the Montgomery unit is busy
    KOP_RNS  = 6'd15, // start an X9.17 number with DT = ra
    KOP_SEED = 6'd16, // X9.17 seed V = ra
    KOP_RNR  = 6'd17, // rd = last X9.17 number
    KOP_JRB  = 6'd18, // jump to imm while the X9.17 generator is busy
    KOP_PRS  = 6'd19, // rd = pulse-counter seed
    KOP_JMP  = 6'd20, // jump
    KOP_JZ   = 6'd21, // jump if Z
    KOP_JC   = 6'd22, // jump if C
    KOP_CALL = 6'd23, // call
    KOP_RET  = 6'd24, // return
    KOP_LOOP = 6'd25, // repeat up to imm[8:0], ra[15:0] times
    KOP_HALT = 6'd26  // stop, signal done
  } kop_e;
endpackage
