// Shared types and constants of the speculative-decode (SD) front end.
//
// The architected instruction set (U-ISA) is a 32-bit MIPS-style encoding:
// opcode[31:26], rs[25:21], rt[20:16], rd[15:11], immediate[15:0]. Word loads
// (lw) and word stores (sw) address memory as rs + sign-extended immediate.
// This encoding is this design's choice; the optimizations themselves only
// need the opcode, the base register, the data register and the offset.
//
// The implementation instruction set (I-ISA) adds the micro-ops the SD
// transformations emit: a double-word load (dlw), an extract of the high word
// (exthi), a merge of two words into one 64-bit register (sethi), a
// double-word store (dsw), and the silent-store verify operations (a load into
// a temporary register, a compare that reports the verify outcome, and a
// compare that traps when the values differ).
package sd_pkg;

  localparam int unsigned XLEN     = 32;
  localparam int unsigned REG_BITS = 6;   // I-ISA register number: 32 architected + temporaries

  // U-ISA opcodes used by the optimizations.
  localparam logic [5:0] OP_SPECIAL = 6'h00;  // register-register ALU group
  localparam logic [5:0] OP_LW      = 6'h23;
  localparam logic [5:0] OP_SW      = 6'h2b;

  // I-ISA micro-op kinds.
  typedef enum logic [3:0] {
    UOP_ORIG  = 4'd0,  // the architected instruction, unchanged
    UOP_DLW   = 4'd1,  // dst <= mem64[src1 + imm]
    UOP_EXTHI = 4'd2,  // dst <= src2[63:32] (high word of a dlw result)
    UOP_SETHI = 4'd3,  // dst[63:32] <= src2[31:0], dst[31:0] kept (= src1)
    UOP_DSW   = 4'd4,  // mem64[src1 + imm] <= src2 (64 bits)
    UOP_VLD   = 4'd5,  // verify load: TMP <= mem32[src1 + imm]
    UOP_VCMP  = 4'd6,  // compare TMP with src2, report silent / not silent
    UOP_VTRAP = 4'd7   // compare TMP with src2, trap when they differ
  } uop_op_e;

  // Temporary register of the I-ISA used by the verify load; it is not
  // visible in the U-ISA (architected registers are 0..31).
  localparam logic [REG_BITS-1:0] TMP_REG = 6'd32;

  typedef struct packed {
    uop_op_e               op;
    logic [REG_BITS-1:0]   dst;
    logic [REG_BITS-1:0]   src1;   // base register or first source
    logic [REG_BITS-1:0]   src2;   // data register or second source
    logic [15:0]           imm;    // memory offset
    logic [XLEN-1:0]       pc;     // PC of the architected instruction
    logic [XLEN-1:0]       inst;   // the architected instruction word
  } uop_t;

  // Silence predictor decision (No squash, Check, Squash).
  typedef enum logic [1:0] {
    SIL_NO_SQUASH = 2'd0,  // no SD: the store is decoded unchanged
    SIL_CHECK     = 2'd1,  // load + compare + store
    SIL_SQUASH    = 2'd2   // load + trap, the store itself is removed
  } sil_state_e;

  // Information stored with a combining-predictor entry about the second
  // instruction of the pair.
  typedef struct packed {
    logic       is_store;  // pair of stores (else pair of loads)
    logic [2:0] distance;  // dynamic distance from first to second instruction
  } next_info_t;

  // Field helpers.
  function automatic logic [5:0] f_op(input logic [31:0] i);
    return i[31:26];
  endfunction
  function automatic logic [REG_BITS-1:0] f_rs(input logic [31:0] i);
    return {1'b0, i[25:21]};
  endfunction
  function automatic logic [REG_BITS-1:0] f_rt(input logic [31:0] i);
    return {1'b0, i[20:16]};
  endfunction
  function automatic logic [REG_BITS-1:0] f_rd(input logic [31:0] i);
    return {1'b0, i[15:11]};
  endfunction
  function automatic logic [15:0] f_imm(input logic [31:0] i);
    return i[15:0];
  endfunction

  function automatic logic is_lw(input logic [31:0] i);
    return i[31:26] == OP_LW;
  endfunction
  function automatic logic is_sw(input logic [31:0] i);
    return i[31:26] == OP_SW;
  endfunction

  // ALU instruction: register-register arithmetic (except jumps, syscall and
  // break) or an immediate arithmetic/logic instruction (opcodes 0x08-0x0f).
  function automatic logic is_alu(input logic [31:0] i);
    logic [5:0] fn;
    fn = i[5:0];
    if (i[31:26] == OP_SPECIAL)
      return (fn[5:3] != 3'b001);
    return (i[31:29] == 3'b001);
  endfunction

  // Destination register of an ALU instruction (0 when it writes none).
  function automatic logic [REG_BITS-1:0] alu_dst(input logic [31:0] i);
    return (i[31:26] == OP_SPECIAL) ? {1'b0, i[15:11]} : {1'b0, i[20:16]};
  endfunction

  function automatic logic [31:0] enc_mem(input logic [5:0] op, input logic [4:0] base,
                                          input logic [4:0] rt, input logic [15:0] off);
    return {op, base, rt, off};
  endfunction

endpackage
