// rowcore_pkg: constants and types shared by the RowCore processor blocks.
//
// The sizes follow the evaluated configuration: 32 corelets per processor,
// 64-byte slabs (one per corelet) so that one 2 KB DRAM row fills one prefetch
// buffer entry, 16 prefetch buffer entries, 128-byte transfer units on a
// 128-bit DRAM channel, 4 hardware contexts and 32 registers per corelet
// (8 per context), 4 KB of local memory and 4 KB of instruction store.
//
// The corelet instruction set is this design's own: the processor is built
// around simple in-order cores, but no instruction set is fixed for them.
// It is a small 32-bit load/store set with one extra instruction, FETCH,
// which performs the corelet's demand fetch of its slab of a DRAM row from the
// prefetch buffer into a 64-byte line of local memory.
//
//   [31:26] opcode   [25:23] rd   [22:20] rs1   [19:17] rs2   [15:0] imm (signed)
//
// Register 0 of every context reads as zero.  Branch and jump offsets are in
// instructions, relative to the branch itself.  Local memory addresses are
// byte addresses; LW/SW ignore the two low bits.
package rowcore_pkg;

  // ---- processor configuration (evaluated design point) ----
  localparam int unsigned N_CORELETS_DEF   = 32;    // corelets per processor
  localparam int unsigned SLAB_BYTES       = 64;    // slab = one corelet's slice of a row
  localparam int unsigned PB_ENTRIES_DEF   = 16;    // prefetch buffer entries (rows)
  localparam int unsigned UNIT_BYTES       = 128;   // JEDEC transfer unit
  localparam int unsigned CHAN_BITS        = 128;   // DRAM channel width
  localparam int unsigned BEATS_PER_UNIT   = UNIT_BYTES * 8 / CHAN_BITS;  // 8
  localparam int unsigned BEATS_PER_SLAB   = SLAB_BYTES * 8 / CHAN_BITS;  // 4
  localparam int unsigned SLAB_BITS        = SLAB_BYTES * 8;
  localparam int unsigned SLAB_WORDS       = SLAB_BYTES / 4;              // 16
  localparam int unsigned N_CONTEXTS       = 4;
  localparam int unsigned REGS_PER_CORELET = 32;
  localparam int unsigned REGS_PER_CTX     = REGS_PER_CORELET / N_CONTEXTS;  // 8
  localparam int unsigned LMEM_BYTES_DEF   = 4096;
  localparam int unsigned IMEM_BYTES_DEF   = 4096;
  localparam int unsigned ROW_AW           = 24;    // row address bits (4 GB / 2 KB rows = 2^21, with margin)

  // ---- clocking (MHz) ----
  localparam int unsigned BASE_MHZ_DEF     = 1200;  // channel clock, the base clock of the processor
  localparam int unsigned NOMINAL_MHZ_DEF  = 700;   // nominal compute clock

  typedef logic [ROW_AW-1:0] row_addr_t;
  typedef logic [CHAN_BITS-1:0] beat_t;
  typedef logic [SLAB_BITS-1:0] slab_t;

  // ---- corelet instruction set ----
  typedef enum logic [5:0] {
    OP_NOP   = 6'd0,
    OP_ADD   = 6'd1,  OP_SUB  = 6'd2,  OP_AND  = 6'd3,  OP_OR   = 6'd4,
    OP_XOR   = 6'd5,  OP_SLL  = 6'd6,  OP_SRL  = 6'd7,  OP_SRA  = 6'd8,
    OP_SLT   = 6'd9,  OP_SLTU = 6'd10, OP_MUL  = 6'd11,
    OP_ADDI  = 6'd16, OP_ANDI = 6'd17, OP_ORI  = 6'd18, OP_XORI = 6'd19,
    OP_SLLI  = 6'd20, OP_SRLI = 6'd21, OP_SLTI = 6'd22, OP_LUI  = 6'd23,
    OP_LW    = 6'd24, OP_SW   = 6'd25,
    OP_BEQ   = 6'd32, OP_BNE  = 6'd33, OP_BLT  = 6'd34, OP_BGE  = 6'd35,
    OP_JAL   = 6'd36, OP_JR   = 6'd37,
    OP_FETCH = 6'd40,   // demand fetch: slab of row R[rs1] -> local line at R[rs2]+imm
    OP_ID    = 6'd41,   // rd <- imm==0: corelet id, 1: context id, 2: corelet count
    OP_HALT  = 6'd63
  } opcode_e;

  typedef struct packed {
    opcode_e     op;
    logic [2:0]  rd;
    logic [2:0]  rs1;
    logic [2:0]  rs2;
    logic        unused;
    logic [15:0] imm;
  } instr_t;

  // Instruction encoders, used by testbenches and by anyone writing programs.
  function automatic logic [31:0] enc(opcode_e op, int rd, int rs1, int rs2, int imm);
    instr_t i;
    i.op     = op;
    i.rd     = 3'(rd);
    i.rs1    = 3'(rs1);
    i.rs2    = 3'(rs2);
    i.unused = 1'b0;
    i.imm    = 16'(imm);
    return i;
  endfunction

  function automatic logic [31:0] enc_r(opcode_e op, int rd, int rs1, int rs2);
    return enc(op, rd, rs1, rs2, 0);
  endfunction

  function automatic logic [31:0] enc_i(opcode_e op, int rd, int rs1, int imm);
    return enc(op, rd, rs1, 0, imm);
  endfunction

  function automatic logic [31:0] enc_b(opcode_e op, int rs1, int rs2, int off);
    return enc(op, 0, rs1, rs2, off);
  endfunction

endpackage
