// tb_decoder: self-checking test of the miniMIPS control decoder.
// For each instruction of the subset, with random register fields, compares
// the control bundle with a table written from the instruction semantics:
// destination register (rd, rt, $31, $27 or none), write-data source, ALU
// function, operand muxes, immediate extension, memory strobes, branch kind
// and which source registers are read. Unknown opcodes must trap.
`timescale 1ns/1ps
module tb_decoder;
  import minimips_pkg::*;
  import tb_mips_pkg::*;
  word_t ir;
  ctrl_t c;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  decoder dut (.ir(ir), .c(c));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected: dest, wdsel, alufn, asel, bsel, sext, rd, wr, br, rs?, rt?
  task automatic expect_ctl(string nm, int dest, wdsel_t wd, alufn_t fn, asel_t as, bsel_t bs,
                            bit sx, bit mrd, bit mwr, br_kind_t br, bit urs, bit urt);
    #1;
    checks++;
    if (c.dest != reg_t'(dest) || (dest != 0 && c.wdsel != wd) || c.mem_rd != mrd || c.mem_wr != mwr ||
        c.br_kind != br || c.uses_rs != urs || c.uses_rt != urt ||
        (br == BR_NONE && !mwr && (c.alufn != fn || c.asel != as || c.bsel != bs)) ||
        (bs == BSEL_IMM && c.sext != sx) || c.werf != (dest != 0)) begin
      failures++;
      $display("FAIL %s ir=%08h got %p", nm, ir, c);
    end
  endtask

  initial begin
    int s, t, d, sh;
    for (int i = 0; i < 200; i++) begin
      s = $urandom_range(1, 31); t = $urandom_range(1, 31); d = $urandom_range(1, 31); sh = $urandom_range(0, 31);
      ir = ADD(d, s, t);   expect_ctl("add",  d, WDSEL_ALU, ALU_ADD, ASEL_RS, BSEL_RT, 1, 0, 0, BR_NONE, 1, 1);
      ir = SUB(d, s, t);   expect_ctl("sub",  d, WDSEL_ALU, ALU_SUB, ASEL_RS, BSEL_RT, 1, 0, 0, BR_NONE, 1, 1);
      ir = NOR_(d, s, t);  expect_ctl("nor",  d, WDSEL_ALU, ALU_NOR, ASEL_RS, BSEL_RT, 1, 0, 0, BR_NONE, 1, 1);
      ir = SLTU(d, s, t);  expect_ctl("sltu", d, WDSEL_ALU, ALU_SLTU, ASEL_RS, BSEL_RT, 1, 0, 0, BR_NONE, 1, 1);
      ir = SLL(d, t, sh);  expect_ctl("sll",  d, WDSEL_ALU, ALU_SLL, ASEL_SHAMT, BSEL_RT, 1, 0, 0, BR_NONE, 0, 1);
      ir = SRA(d, t, sh);  expect_ctl("sra",  d, WDSEL_ALU, ALU_SRA, ASEL_SHAMT, BSEL_RT, 1, 0, 0, BR_NONE, 0, 1);
      ir = SRAV(d, t, s);  expect_ctl("srav", d, WDSEL_ALU, ALU_SRA, ASEL_RS, BSEL_RT, 1, 0, 0, BR_NONE, 1, 1);
      ir = JR(s);          expect_ctl("jr",   0, WDSEL_ALU, ALU_ADD, ASEL_RS, BSEL_RT, 1, 0, 0, BR_JR, 1, 0);
      ir = JALR(d, s);     expect_ctl("jalr", d, WDSEL_PC4, ALU_ADD, ASEL_RS, BSEL_RT, 1, 0, 0, BR_JR, 1, 0);
      ir = ADDI(t, s, i);  expect_ctl("addi", t, WDSEL_ALU, ALU_ADD, ASEL_RS, BSEL_IMM, 1, 0, 0, BR_NONE, 1, 0);
      ir = SLTI(t, s, i);  expect_ctl("slti", t, WDSEL_ALU, ALU_SLT, ASEL_RS, BSEL_IMM, 1, 0, 0, BR_NONE, 1, 0);
      ir = ANDI(t, s, i);  expect_ctl("andi", t, WDSEL_ALU, ALU_AND, ASEL_RS, BSEL_IMM, 0, 0, 0, BR_NONE, 1, 0);
      ir = ORI(t, s, i);   expect_ctl("ori",  t, WDSEL_ALU, ALU_OR,  ASEL_RS, BSEL_IMM, 0, 0, 0, BR_NONE, 1, 0);
      ir = XORI(t, s, i);  expect_ctl("xori", t, WDSEL_ALU, ALU_XOR, ASEL_RS, BSEL_IMM, 0, 0, 0, BR_NONE, 1, 0);
      ir = LUI(t, i);      expect_ctl("lui",  t, WDSEL_ALU, ALU_SLL, ASEL_16, BSEL_IMM, 0, 0, 0, BR_NONE, 0, 0);
      ir = LW(t, i, s);    expect_ctl("lw",   t, WDSEL_MEM, ALU_ADD, ASEL_RS, BSEL_IMM, 1, 1, 0, BR_NONE, 1, 0);
      ir = SW(t, i, s);    expect_ctl("sw",   0, WDSEL_ALU, ALU_ADD, ASEL_RS, BSEL_IMM, 1, 0, 1, BR_NONE, 1, 1);
      ir = BEQ(s, t, i);   expect_ctl("beq",  0, WDSEL_ALU, ALU_ADD, ASEL_RS, BSEL_RT, 1, 0, 0, BR_EQ, 1, 1);
      ir = BNE(s, t, i);   expect_ctl("bne",  0, WDSEL_ALU, ALU_ADD, ASEL_RS, BSEL_RT, 1, 0, 0, BR_NE, 1, 1);
      ir = J(32'(i) << 2); expect_ctl("j",    0, WDSEL_ALU, ALU_ADD, ASEL_RS, BSEL_RT, 1, 0, 0, BR_J, 0, 0);
      ir = JAL(32'(i) << 2); expect_ctl("jal", 31, WDSEL_PC4, ALU_ADD, ASEL_RS, BSEL_RT, 1, 0, 0, BR_J, 0, 0);
      ir = {6'h3f, 26'($urandom())};
      expect_ctl("illegal op", 27, WDSEL_PC4, ALU_ADD, ASEL_RS, BSEL_RT, 1, 0, 0, BR_ILLOP, 0, 0);
      ir = enc_r('h3f, s, t, d);
      expect_ctl("illegal funct", 27, WDSEL_PC4, ALU_ADD, ASEL_RS, BSEL_RT, 1, 0, 0, BR_ILLOP, 0, 0);
    end
    ir = 32'h0; #1;
    checks++;
    if (c.dest != 0 || c.mem_wr || c.br_kind != BR_NONE || c.illegal) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
