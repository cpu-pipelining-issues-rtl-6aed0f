// tb_doc_sequences: the two code sequences the pipeline was designed around,
// run cycle by cycle on minimips_top at its default sizes.
//
// 1. Load delay:   lw $t4,0($t1) / add $t5,$t1,$t4 / xor $t6,$t3,$t4.
//    The add reads the loaded register right behind the lw, so it is held in
//    RF for two cycles while two NOPs enter the ALU stage; the sequence seen in
//    IR_ALU must be lw, nop, nop, add, xor, and the add must get its operand
//    over the WB bypass, the xor over the register file path.
// 2. Return address: add $ra,$0,$0 / jal f / addi $ra,$ra,4 (delay slot) /
//    f: xor $t0,$ra,$0 / or $1,$0,$ra / add $t2,$0,$ra.
//    The delay-slot addi must read $ra from the PC pipeline (PC_ALU+4) while the
//    jal is still in ALU; the following three read the addi's result from the
//    ALU, MEM and WB bypasses. All four results must equal jal address + 12.
`timescale 1ns/1ps
module tb_doc_sequences;
  import minimips_pkg::*;
  import tb_mips_pkg::*;

  logic clk = 0, rst = 1;
  logic imem_we = 0, dmem_we = 0;
  logic [9:0] imem_addr = 0, dmem_addr = 0;
  word_t imem_data = 0, dmem_wdata = 0, dmem_rdata;
  int checks = 0, failures = 0;

  minimips_top dut (
    .clk(clk), .rst(rst),
    .imem_load_we(imem_we), .imem_load_addr(imem_addr), .imem_load_data(imem_data),
    .dmem_host_we(dmem_we), .dmem_host_addr(dmem_addr), .dmem_host_wdata(dmem_wdata),
    .dmem_host_rdata(dmem_rdata)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic load(input u32 prog[], input int n);
    rst = 1;
    @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      imem_we = 1; imem_addr = 10'(i); imem_data = (i < n) ? prog[i] : NOPI();
      @(negedge clk);
    end
    imem_we = 0;
    dmem_we = 1; dmem_addr = 10'd2; dmem_wdata = 32'h0000_1234;
    @(negedge clk);
    dmem_we = 0;
    @(negedge clk);
  endtask

  initial begin
    u32 p[];
    u32 alu_seq[$];
    byp_sel_t sel_add, sel_xor;
    u32 jal_addr;
    // ---------------------------------------------------------- load delay
    p = new[8];
    p[0] = ADDI(9, 0, 8);       // $t1 = 8
    p[1] = ADDI(11, 0, 3);      // $t3 = 3
    p[2] = LW(12, 0, 9);        // lw  $t4,0($t1)
    p[3] = ADD(13, 9, 12);      // add $t5,$t1,$t4
    p[4] = XOR_(14, 11, 12);    // xor $t6,$t3,$t4
    p[5] = J(BASE + 4 * 5);     // stay here
    p[6] = NOPI();
    load(p, 7);
    rst = 0;
    for (int c = 0; c < 14; c++) begin
      @(posedge clk);
      #1;
      alu_seq.push_back(dut.ir_alu);
      if (dut.ir_reg == p[3] && !dut.stall) sel_add = dut.sel_b;
      if (dut.ir_reg == p[4] && !dut.stall) sel_xor = dut.sel_b;
    end
    begin
      int k = -1;
      foreach (alu_seq[i]) if (alu_seq[i] == p[2] && k < 0) k = i;
      check(k >= 0, "lw reached the ALU stage");
      if (k >= 0) begin
        check(alu_seq[k+1] == NOPI() && alu_seq[k+2] == NOPI(), "two bubbles behind the lw");
        check(alu_seq[k+3] == p[3] && alu_seq[k+4] == p[4], "add, then xor, follow the bubbles");
      end
    end
    check(sel_add == BYP_WB, "add takes $t4 from the WB bypass");
    check(sel_xor == BYP_RF, "xor takes $t4 from the register file");
    repeat (4) @(posedge clk);
    #1;
    check(dut.u_rf.regs[13] == 32'h123c, $sformatf("add result %08h", dut.u_rf.regs[13]));
    check(dut.u_rf.regs[14] == (32'h1234 ^ 32'h3), "xor result");

    // ---------------------------------------------------------- jal / $ra
    p = new[12];
    p[0] = ADD(31, 0, 0);               // add  $ra,$0,$0
    p[1] = JAL(BASE + 4 * 3);           // jal  f
    p[2] = ADDI(31, 31, 4);             // addi $ra,$ra,4
    p[3] = XOR_(8, 31, 0);              // f: xor $t0,$ra,$0
    p[4] = OR_(1, 0, 31);               //    or  $1,$0,$ra
    p[5] = ADD(10, 0, 31);              //    add $t2,$0,$ra
    p[6] = J(BASE + 4 * 6);
    p[7] = NOPI();
    jal_addr = BASE + 4;
    load(p, 8);
    rst = 0;
    begin
      byp_sel_t s_addi, s_xor, s_or, s_add;
      for (int c = 0; c < 20; c++) begin
        @(posedge clk);
        #1;
        if (!dut.stall) begin
          if (dut.ir_reg == p[2]) s_addi = dut.sel_a;
          if (dut.ir_reg == p[3]) s_xor  = dut.sel_a;
          if (dut.ir_reg == p[4]) s_or   = dut.sel_b;
          if (dut.ir_reg == p[5]) s_add  = dut.sel_b;
        end
      end
      check(s_addi == BYP_PCALU, "delay-slot addi reads $ra from PC_ALU+4");
      check(s_xor == BYP_ALU, "xor reads $ra from the ALU output");
      check(s_or == BYP_MEM, "or reads $ra from Y_MEM");
      check(s_add == BYP_WB, "add reads $ra from the WB bypass");
    end
    check(dut.u_rf.regs[31] == jal_addr + 12, "$ra = jal address + 8 + 4");
    check(dut.u_rf.regs[8]  == jal_addr + 12, "xor result");
    check(dut.u_rf.regs[1]  == jal_addr + 12, "or result");
    check(dut.u_rf.regs[10] == jal_addr + 12, "add result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
