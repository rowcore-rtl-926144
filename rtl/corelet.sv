// corelet: one simple in-order MIMD core of a RowCore processor.
//
// What it does: runs the Map (and partial Reduce) code of a big-data machine
// learning kernel on the records in its slab of each DRAM row, keeping the
// partially reduced live state in its private local memory.
//
// How it works: four hardware contexts share one two-stage pipeline and are
// scheduled round-robin, so that no register bypassing and no branch
// prediction are needed (both follow the processor's description).  A context
// has at most one instruction in flight: stage F reads the instruction of the
// next ready context from the instruction store, stage X reads its registers,
// executes, accesses local memory and writes back.  With four ready contexts
// the pipeline issues one instruction per compute cycle; a single context
// issues one every other cycle.  Each context owns 8 of the corelet's 32
// registers; the local memory is shared by the contexts.
//
// The instruction store holds the whole program: the code is broadcast to all
// corelets once before execution (prog_* port), so it acts as an instruction
// cache that never misses.  The FETCH instruction is the corelet's demand
// fetch: it asks the prefetch buffer for this corelet's slab of row R[rs1]
// (pf_req/pf_row); if the slab is present (pf_hit) its 64 bytes are written in
// one cycle into the 64-byte local-memory line at R[rs2]+imm, otherwise the
// instruction is replayed at the context's next turn.  Copying slabs into
// local memory, the instruction set (see rowcore_pkg) and the start/done
// protocol are this design's own choices.
//
// Interface and timing: everything advances only in cycles where ce (the
// compute clock enable from the frequency scaler) is high.  start (one cycle)
// clears the registers and sets all contexts running from address 0.  done is
// high when every context has executed HALT.  The host port reads local memory
// combinationally and writes it at the clock edge; use it only while done.
module corelet
  import rowcore_pkg::*;
#(
  parameter int unsigned CORELET_ID = 0,
  parameter int unsigned N_CORELETS = N_CORELETS_DEF,
  parameter int unsigned LMEM_BYTES = LMEM_BYTES_DEF,
  parameter int unsigned IMEM_BYTES = IMEM_BYTES_DEF,
  localparam int unsigned LMEM_WORDS = LMEM_BYTES / 4,
  localparam int unsigned IMEM_WORDS = IMEM_BYTES / 4,
  localparam int unsigned LMEM_AW = $clog2(LMEM_WORDS),
  localparam int unsigned IMEM_AW = $clog2(IMEM_WORDS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ce,
  input  logic               start,
  output logic               done,
  output logic               retire,      // an instruction completed this cycle
  // code broadcast
  input  logic               prog_we,
  input  logic [IMEM_AW-1:0] prog_addr,
  input  logic [31:0]        prog_data,
  // host access to local memory (word addressed)
  input  logic               hm_we,
  input  logic [LMEM_AW-1:0] hm_addr,
  input  logic [31:0]        hm_wdata,
  output logic [31:0]        hm_rdata,
  // demand-fetch port to this corelet's slab slice of the prefetch buffer
  output logic               pf_req,
  output row_addr_t          pf_row,
  input  logic               pf_hit,
  input  slab_t              pf_slab
);

  localparam int unsigned CW = $clog2(N_CONTEXTS);
  localparam int unsigned LINE_WORDS = SLAB_WORDS;
  localparam int unsigned LMEM_LINES = LMEM_WORDS / LINE_WORDS;
  localparam int unsigned LW_W = $clog2(LINE_WORDS);
  localparam int unsigned LL_W = LMEM_AW - LW_W;

  logic [31:0]        imem [IMEM_WORDS];
  slab_t              lmem [LMEM_LINES];   // 64-byte lines, word-writable
  logic [31:0]        rf   [N_CONTEXTS][REGS_PER_CTX];
  logic [IMEM_AW-1:0] pc   [N_CONTEXTS];
  logic [N_CONTEXTS-1:0] running, inflight;
  logic [CW-1:0]      rr;        // context issued last

  // stage F -> X register
  logic               x_valid;
  logic [CW-1:0]      x_ctx;
  instr_t             x_ir;

  // ---------------- stage F: round-robin context selection ----------------
  logic          f_go;
  logic [CW-1:0] f_ctx;
  always_comb begin
    f_go  = 1'b0;
    f_ctx = rr;
    for (int k = 1; k <= N_CONTEXTS; k++) begin
      logic [CW-1:0] c;
      c = CW'(rr + CW'(k));
      if (!f_go && running[c] && !inflight[c]) begin
        f_go  = 1'b1;
        f_ctx = c;
      end
    end
  end

  // ---------------- stage X: execute ----------------
  logic [31:0] a, b, simm, alu;
  logic        wb_en, take, stall, halt;
  logic [IMEM_AW-1:0] next_pc;
  logic [LMEM_AW-1:0] mem_word;
  logic [LL_W-1:0]    fetch_line;

  assign a    = (x_ir.rs1 == 3'd0) ? 32'd0 : rf[x_ctx][x_ir.rs1];
  assign b    = (x_ir.rs2 == 3'd0) ? 32'd0 : rf[x_ctx][x_ir.rs2];
  assign simm = {{16{x_ir.imm[15]}}, x_ir.imm};
  assign mem_word  = LMEM_AW'((a + simm) >> 2);
  assign fetch_line = LL_W'((b + simm) >> (2 + LW_W));

  assign pf_req = ce && x_valid && (x_ir.op == OP_FETCH);
  assign pf_row = row_addr_t'(a);

  always_comb begin
    alu   = 32'd0;
    wb_en = 1'b0;
    take  = 1'b0;
    stall = 1'b0;
    halt  = 1'b0;
    next_pc = pc[x_ctx] + IMEM_AW'(1);
    unique case (x_ir.op)
      OP_ADD:  begin alu = a + b;                           wb_en = 1'b1; end
      OP_SUB:  begin alu = a - b;                           wb_en = 1'b1; end
      OP_AND:  begin alu = a & b;                           wb_en = 1'b1; end
      OP_OR:   begin alu = a | b;                           wb_en = 1'b1; end
      OP_XOR:  begin alu = a ^ b;                           wb_en = 1'b1; end
      OP_SLL:  begin alu = a << b[4:0];                     wb_en = 1'b1; end
      OP_SRL:  begin alu = a >> b[4:0];                     wb_en = 1'b1; end
      OP_SRA:  begin alu = $signed(a) >>> b[4:0];           wb_en = 1'b1; end
      OP_SLT:  begin alu = {31'd0, $signed(a) < $signed(b)}; wb_en = 1'b1; end
      OP_SLTU: begin alu = {31'd0, a < b};                  wb_en = 1'b1; end
      OP_MUL:  begin alu = a * b;                           wb_en = 1'b1; end
      OP_ADDI: begin alu = a + simm;                        wb_en = 1'b1; end
      OP_ANDI: begin alu = a & simm;                        wb_en = 1'b1; end
      OP_ORI:  begin alu = a | simm;                        wb_en = 1'b1; end
      OP_XORI: begin alu = a ^ simm;                        wb_en = 1'b1; end
      OP_SLLI: begin alu = a << x_ir.imm[4:0];              wb_en = 1'b1; end
      OP_SRLI: begin alu = a >> x_ir.imm[4:0];              wb_en = 1'b1; end
      OP_SLTI: begin alu = {31'd0, $signed(a) < $signed(simm)}; wb_en = 1'b1; end
      OP_LUI:  begin alu = {x_ir.imm, 16'd0};               wb_en = 1'b1; end
      OP_LW:   begin alu = lmem[mem_word[LMEM_AW-1:LW_W]][32*mem_word[LW_W-1:0] +: 32]; wb_en = 1'b1; end
      OP_SW:   ;
      OP_BEQ:  take = (a == b);
      OP_BNE:  take = (a != b);
      OP_BLT:  take = ($signed(a) <  $signed(b));
      OP_BGE:  take = ($signed(a) >= $signed(b));
      OP_JAL:  begin alu = 32'(pc[x_ctx]) + 32'd1; wb_en = 1'b1; take = 1'b1; end
      OP_JR:   next_pc = IMEM_AW'(a);
      OP_FETCH: stall = !pf_hit;
      OP_ID: begin
        wb_en = 1'b1;
        unique case (x_ir.imm[1:0])
          2'd0:    alu = 32'(CORELET_ID);
          2'd1:    alu = 32'(x_ctx);
          default: alu = 32'(N_CORELETS);
        endcase
      end
      OP_HALT: halt = 1'b1;
      default: ;   // NOP and unused opcodes
    endcase
    if (take) next_pc = pc[x_ctx] + IMEM_AW'(x_ir.imm);
    if (stall) next_pc = pc[x_ctx];
  end

  assign retire = ce && x_valid && !stall;

  // ---------------- state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running  <= '0;
      inflight <= '0;
      x_valid  <= 1'b0;
      x_ctx    <= '0;
      x_ir     <= '0;
      rr       <= CW'(N_CONTEXTS - 1);
      for (int c = 0; c < N_CONTEXTS; c++) pc[c] <= '0;
    end else if (start) begin
      running  <= '1;
      inflight <= '0;
      x_valid  <= 1'b0;
      rr       <= CW'(N_CONTEXTS - 1);
      for (int c = 0; c < N_CONTEXTS; c++) pc[c] <= '0;
    end else if (ce) begin
      logic [N_CONTEXTS-1:0] infl_n;
      infl_n = inflight;
      if (x_valid) begin
        infl_n[x_ctx] = 1'b0;
        pc[x_ctx] <= next_pc;
        if (halt) running[x_ctx] <= 1'b0;
      end
      if (f_go) begin
        infl_n[f_ctx] = 1'b1;
        rr <= f_ctx;
      end
      inflight <= infl_n;
      x_valid  <= f_go;
      x_ctx    <= f_ctx;
      x_ir     <= f_go ? instr_t'(imem[pc[f_ctx]]) : '0;
    end
  end

  // register file: cleared by start, written by stage X
  always_ff @(posedge clk) begin
    if (start) begin
      for (int c = 0; c < N_CONTEXTS; c++)
        for (int r = 0; r < REGS_PER_CTX; r++) rf[c][r] <= '0;
    end else if (ce && x_valid && wb_en && x_ir.rd != 3'd0) begin
      rf[x_ctx][x_ir.rd] <= alu;
    end
  end

  // instruction store: written by the code broadcast
  always_ff @(posedge clk) begin
    if (prog_we) imem[prog_addr] <= prog_data;
  end

  // local memory: host word writes, SW word writes, FETCH whole-line writes
  always_ff @(posedge clk) begin
    if (hm_we) begin
      lmem[hm_addr[LMEM_AW-1:LW_W]][32*hm_addr[LW_W-1:0] +: 32] <= hm_wdata;
    end else if (ce && x_valid) begin
      if (x_ir.op == OP_SW) lmem[mem_word[LMEM_AW-1:LW_W]][32*mem_word[LW_W-1:0] +: 32] <= b;
      if (x_ir.op == OP_FETCH && pf_hit) lmem[fetch_line] <= pf_slab;
    end
  end

  assign hm_rdata = lmem[hm_addr[LMEM_AW-1:LW_W]][32*hm_addr[LW_W-1:0] +: 32];
  assign done     = (running == '0) && !x_valid;

endmodule
