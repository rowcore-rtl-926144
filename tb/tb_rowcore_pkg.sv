// tb_rowcore_pkg: self-checking test of the shared package.
//
// Checks the derived sizes against the processor's geometry (a row is one
// 64-byte slab per corelet = 2 KB, 16 transfer units of 128 bytes, 8 beats of
// 128 bits per unit, 4 beats per slab, 8 registers per context, 16-entry
// prefetch buffer = 1 KB slice per corelet) and the instruction encoders
// against field positions computed here with shifts: op[31:26], rd[25:23],
// rs1[22:20], rs2[19:17], bit 16 zero, imm[15:0], for many random operands,
// and that instr_t decodes the encoded word back into the same fields.
module tb_rowcore_pkg;
  import rowcore_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL: %s = %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    expect_eq("row bytes", N_CORELETS_DEF * SLAB_BYTES, 2048);
    expect_eq("units per row", N_CORELETS_DEF * SLAB_BYTES / UNIT_BYTES, 16);
    expect_eq("beats per unit", BEATS_PER_UNIT, 8);
    expect_eq("beats per slab", BEATS_PER_SLAB, 4);
    expect_eq("slab words", SLAB_WORDS, 16);
    expect_eq("slab bits", $bits(slab_t), 512);
    expect_eq("beat bits", $bits(beat_t), 128);
    expect_eq("regs per context", REGS_PER_CTX, 8);
    expect_eq("buffer slice per corelet", PB_ENTRIES_DEF * SLAB_BYTES, 1024);
    expect_eq("instruction bits", $bits(instr_t), 32);
    expect_eq("nominal below base", 32'(NOMINAL_MHZ_DEF < BASE_MHZ_DEF), 1);

    for (int n = 0; n < 500; n++) begin
      opcode_e op;
      int rd, rs1, rs2, imm;
      logic [31:0] w, exp;
      instr_t d;
      op  = opcode_e'(6'($urandom_range(0, 63)));
      rd  = $urandom_range(0, 7);
      rs1 = $urandom_range(0, 7);
      rs2 = $urandom_range(0, 7);
      imm = $urandom_range(0, 65535) - 32768;
      exp = (32'(op) << 26) | (32'(rd) << 23) | (32'(rs1) << 20) | (32'(rs2) << 17) | (32'(imm) & 32'hFFFF);
      w = enc(op, rd, rs1, rs2, imm);
      expect_eq("enc", w, exp);
      d = instr_t'(w);
      checks++;
      if (d.op != op || d.rd != 3'(rd) || d.rs1 != 3'(rs1) || d.rs2 != 3'(rs2) || d.imm != 16'(imm)) begin
        failures++;
        $display("FAIL: decode of %h", w);
      end
      exp = (32'(op) << 26) | (32'(rd) << 23) | (32'(rs1) << 20) | (32'(imm) & 32'hFFFF);
      expect_eq("enc_i", enc_i(op, rd, rs1, imm), exp);
      exp = (32'(op) << 26) | (32'(rd) << 23) | (32'(rs1) << 20) | (32'(rs2) << 17);
      expect_eq("enc_r", enc_r(op, rd, rs1, rs2), exp);
      exp = (32'(op) << 26) | (32'(rs1) << 20) | (32'(rs2) << 17) | (32'(imm) & 32'hFFFF);
      expect_eq("enc_b", enc_b(op, rs1, rs2, imm), exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
