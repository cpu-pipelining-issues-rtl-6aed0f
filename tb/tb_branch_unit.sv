// tb_branch_unit: self-checking test of early branch resolution and the PC mux.
// For random operands, PCs and instruction fields checks the next PC of every
// branch kind: PC+4, branch target (address of delay slot + offset*4) for
// taken beq/bne, register target for jr, region-relative jump target, the
// illegal-opcode vector and the reset vector, and the equality output BZ.
`timescale 1ns/1ps
module tb_branch_unit;
  import minimips_pkg::*;
  logic rst, bz;
  br_kind_t kind;
  word_t a, b, pc4, pcr, npc;
  logic [15:0] imm;
  logic [25:0] jidx;
  pcsel_t pcsel;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  branch_unit dut (.rst(rst), .br_kind(kind), .a(a), .b(b), .pc_plus4(pc4), .pc_reg(pcr),
                   .imm(imm), .jidx(jidx), .pcsel(pcsel), .bz(bz), .next_pc(npc));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t exp, bt;
    for (int i = 0; i < 5000; i++) begin
      rst = ($urandom_range(0, 50) == 0);
      kind = br_kind_t'($urandom_range(0, 5));
      a = $urandom(); b = ($urandom_range(0, 1) != 0) ? a : $urandom();
      pc4 = {$urandom()} & ~32'h3; pcr = {$urandom()} & ~32'h3;
      imm = 16'($urandom()); jidx = 26'($urandom());
      bt = pcr + 32'($signed(imm)) * 4;
      case (kind)
        BR_EQ:    exp = (a == b) ? bt : pc4;
        BR_NE:    exp = (a != b) ? bt : pc4;
        BR_JR:    exp = a;
        BR_J:     exp = {pcr[31:28], jidx, 2'b00};
        BR_ILLOP: exp = 32'h8000_0040;
        default:  exp = pc4;
      endcase
      if (rst) exp = 32'h8000_0000;
      @(posedge clk);
      checks++;
      if (npc != exp || bz != (a == b)) begin
        failures++;
        $display("FAIL kind=%0d rst=%0d got %08h exp %08h", kind, rst, npc, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
