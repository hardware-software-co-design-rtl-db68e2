// risc_pkg: types, instruction encoding and constants shared by the RISC core
// for set-top-box iDCT work and its execution units.
//
// Instruction word (32 bits, bit 31 = MSB):
//   R-type  [31:28] opcode  [27:23] rs1  [22:18] rs2  [17:13] rd  [12:0] func
//   I-type  [31:28] opcode  [27:23] rt   [22:18] rs   [15:0]  imm16 (sign-extended)
//   J-type  [31:28] opcode  [27:0]  imm28 (byte offset, sign-extended)
// rt is the destination of immediate ALU operations and LW, the data
// source of SW and the tested register of BEQZ/BNEZ, JR, JALR.
// The R-type field layout and the func codes 1..7 of ADD, SUB, ADDU, SUBU,
// AND, OR, SRA and the LHI opcode 4 follow the instruction words of a
// simulation trace of the original core; every other code is this design's
// own choice. The media opcode carries the multimedia instructions (MAC
// family, HADD family, IDCT) in its func field.
package risc_pkg;

  localparam int unsigned XLEN   = 32;
  localparam int unsigned NREGS  = 32;
  localparam int unsigned NCONST = 16;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      reg_addr_t;

  typedef enum logic [3:0] {
    OP_RTYPE = 4'h0,  // integer ALU register-register, func selects
    OP_MEDIA = 4'h1,  // MAC / HADD / IDCT family, func selects
    OP_ADDI  = 4'h2,
    OP_ANDI  = 4'h3,
    OP_LHI   = 4'h4,  // rt = imm16 << 16
    OP_ORI   = 4'h5,
    OP_XORI  = 4'h6,
    OP_SLLI  = 4'h7,
    OP_LW    = 4'h8,  // rt = mem[rs + imm16]
    OP_SW    = 4'h9,  // mem[rs + imm16] = rt
    OP_BEQZ  = 4'hA,  // if rt == 0 : pc = pc + 4 + imm16
    OP_BNEZ  = 4'hB,
    OP_J     = 4'hC,  // pc = pc + 4 + imm28
    OP_JAL   = 4'hD,  // r31 = pc + 8 ; pc = pc + 4 + imm28
    OP_JR    = 4'hE,  // pc = rt
    OP_JALR  = 4'hF   // r31 = pc + 8 ; pc = rt
  } opcode_e;

  // Integer ALU operations; for R-type instructions the value is the func field.
  typedef enum logic [3:0] {
    ALU_NOP  = 4'd0,
    ALU_ADD  = 4'd1,
    ALU_SUB  = 4'd2,
    ALU_ADDU = 4'd3,
    ALU_SUBU = 4'd4,
    ALU_AND  = 4'd5,
    ALU_OR   = 4'd6,
    ALU_SRA  = 4'd7,
    ALU_SRL  = 4'd8,
    ALU_SLL  = 4'd9,
    ALU_XOR  = 4'd10,
    ALU_SLT  = 4'd11,
    ALU_SEQ  = 4'd12,
    ALU_SNE  = 4'd13
  } alu_op_e;

  // Media operations; the value is the func field of an OP_MEDIA instruction.
  typedef enum logic [3:0] {
    MD_NONE    = 4'd0,
    MD_MAC     = 4'd1,  // Ri.h += Rj.h*Rk.h ; Ri.l += Rj.l*Rk.l
    MD_MACL    = 4'd2,  // Ri.h  = Rj.h*Rk.h ; Ri.l  = Rj.l*Rk.l
    MD_MACK    = 4'd3,  // as MAC with constant Kk in place of Rk
    MD_MACKL   = 4'd4,  // as MACL with constant Kk in place of Rk
    MD_HADD    = 4'd5,  // Ri.h = Rj.h+Rk.h ; Ri.l = Rj.l+Rk.l
    MD_HADDAC  = 4'd6,  // Ri.h += Rj.h+Rk.h ; Ri.l += Rj.l+Rk.l
    MD_HADDF   = 4'd7,  // Ri = (Rj.h+Rk.h) + (Rj.l+Rk.l)
    MD_HADDFAC = 4'd8,  // Ri += (Rj.h+Rk.h) + (Rj.l+Rk.l)
    MD_IDCT    = 4'd9   // R[i..i+3] = idct8(R[i..i+3])
  } media_op_e;

  // Result bundle travelling from an execution unit to register write-back.
  typedef struct packed {
    logic      valid;
    reg_addr_t rd;
    word_t     data;
  } wb_t;

  // Constant bank contents: K[k] = round(cos(k*pi/16) * 2^15), k = 0..15,
  // limited to the signed 16-bit range, the same value in both halves.
  localparam logic signed [15:0] KCOS [NCONST] = '{
    16'sd32767,  16'sd32138,  16'sd30274,  16'sd27246,
    16'sd23170,  16'sd18205,  16'sd12540,  16'sd6393,
    16'sd0,     -16'sd6393,  -16'sd12540, -16'sd18205,
   -16'sd23170, -16'sd27246, -16'sd30274, -16'sd32138
  };

  function automatic word_t encode_r(opcode_e op, reg_addr_t rs1, reg_addr_t rs2,
                                     reg_addr_t rd, logic [12:0] func);
    return {op, rs1, rs2, rd, func};
  endfunction

  function automatic word_t encode_i(opcode_e op, reg_addr_t rt, reg_addr_t rs,
                                     logic [15:0] imm);
    return {op, rt, rs, 2'b00, imm};
  endfunction

  function automatic word_t encode_j(opcode_e op, logic [27:0] off);
    return {op, off};
  endfunction

endpackage
