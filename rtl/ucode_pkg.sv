// ucode_pkg: types and constants shared by the microcode engine.
//
// The engine runs microcode out of an instruction SRAM that is addressed by
// 16-bit word addresses (one 32-bit instruction per word). The checker port in
// the reference design carries a 16-bit SRAM address, and the microcode
// listing shows four-byte instructions, so a listing's byte address maps to
// SRAM word address byte_addr[17:2] (0x2017c -> 0x805f).
//
// The instruction encoding below is this design's own: the reference design
// names only some mnemonics (cmp, bge, nop, lsr, add) and 16 or more
// registers (r0..r15). Fields:
//   [31:28] opcode   [27:24] rd / branch condition
//   [23:20] rs       [19:16] rt       [15:0] imm (or branch target word address)
package ucode_pkg;

  localparam int unsigned XLEN    = 32;  // data and instruction width
  localparam int unsigned IMEM_AW = 16;  // instruction SRAM word-address width
  localparam int unsigned NREGS   = 16;  // r0..r15
  localparam int unsigned RIDX_W  = 4;

  typedef logic [IMEM_AW-1:0] pc_t;
  typedef logic [XLEN-1:0]    word_t;
  typedef logic [RIDX_W-1:0]  ridx_t;

  typedef enum logic [3:0] {
    OP_NOP   = 4'h0,  // no operation
    OP_ADD   = 4'h1,  // rd = rs + rt
    OP_ADDI  = 4'h2,  // rd = rs + sext(imm)
    OP_SUB   = 4'h3,  // rd = rs - rt
    OP_AND   = 4'h4,  // rd = rs & rt
    OP_OR    = 4'h5,  // rd = rs | rt
    OP_XOR   = 4'h6,  // rd = rs ^ rt
    OP_LSR   = 4'h7,  // rd = rs >> imm[4:0]
    OP_LSL   = 4'h8,  // rd = rs << imm[4:0]
    OP_MOVI  = 4'h9,  // rd = zext(imm)
    OP_CMP   = 4'hA,  // flags = compare(rs, rt)
    OP_BR    = 4'hB,  // if cond(flags) pc = imm, one delay slot
    OP_IN    = 4'hC,  // rd = next command word from the upstream port
    OP_OUT   = 4'hD,  // send rs to the downstream port
    OP_HALT  = 4'hE,  // stop fetching, engine returns to idle
    OP_MOVHI = 4'hF   // rd = {imm, rs[15:0]}
  } opcode_e;

  typedef enum logic [3:0] {
    CC_AL  = 4'h0,  // unconditional
    CC_EQ  = 4'h1,
    CC_NE  = 4'h2,
    CC_LT  = 4'h3,  // signed
    CC_GE  = 4'h4,  // signed ("bge": first operand >= second)
    CC_LTU = 4'h5,
    CC_GEU = 4'h6
  } cond_e;        // other codes never branch

  typedef struct packed {
    opcode_e     op;
    logic [3:0]  rd;   // also the branch condition
    logic [3:0]  rs;
    logic [3:0]  rt;
    logic [15:0] imm;
  } instr_t;

  // Result of the last cmp.
  typedef struct packed {
    logic eq;
    logic lt;   // signed less-than
    logic ltu;  // unsigned less-than
  } flags_t;

  function automatic flags_t compare(word_t a, word_t b);
    flags_t f;
    f.eq  = (a == b);
    f.lt  = ($signed(a) < $signed(b));
    f.ltu = (a < b);
    return f;
  endfunction

  function automatic logic cond_true(logic [3:0] cc, flags_t f);
    case (cc)
      CC_AL:   return 1'b1;
      CC_EQ:   return f.eq;
      CC_NE:   return !f.eq;
      CC_LT:   return f.lt;
      CC_GE:   return !f.lt;
      CC_LTU:  return f.ltu;
      CC_GEU:  return !f.ltu;
      default: return 1'b0;
    endcase
  endfunction

endpackage
