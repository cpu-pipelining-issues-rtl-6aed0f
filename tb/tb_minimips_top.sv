// tb_minimips_top: end-to-end test of the five-stage miniMIPS pipeline.
//
// Runs programs on the processor at its default sizes and compares, after
// each program, every register, the whole data memory and the cycle at which
// the final instruction passes the RF stage with the reference model in
// tb_mips_pkg. The first program is directed: the load-use sequences of the
// design description (lw then add/xor), ALU, MEM and WB bypasses, a branch
// decided from a loaded value, the jal / delay-slot / $31 sequence, a call
// whose return address is forwarded from PC_MEM, an illegal-opcode trap and
// its return through $27 (jalr), and a counted loop. The others are random
// straight-line code with forward branches, jal, loads and stores. The
// testbench counts how often each mechanism fired (load stall, each of the
// six bypass sources, taken branch, jr, j/jal, trap) and fails if any never
// did.
`timescale 1ns/1ps
module tb_minimips_top;
  import minimips_pkg::*;
  import tb_mips_pkg::*;

  localparam int IW = 1024;
  localparam int DW = 1024;
  localparam int MAIN = 64;          // word index of main (0x80000100)
  localparam int NRAND = 20;
  localparam int NBODY = 300;

  logic clk = 0, rst = 1;
  logic imem_we = 0, dmem_we = 0;
  logic [9:0] imem_addr = 0, dmem_addr = 0;
  word_t imem_data = 0, dmem_wdata = 0, dmem_rdata;

  minimips_top dut (
    .clk(clk), .rst(rst),
    .imem_load_we(imem_we), .imem_load_addr(imem_addr), .imem_load_data(imem_data),
    .dmem_host_we(dmem_we), .dmem_host_addr(dmem_addr), .dmem_host_wdata(dmem_wdata),
    .dmem_host_rdata(dmem_rdata)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  int n_stall, n_alu, n_mem, n_wb, n_pcalu, n_pcmem, n_bt, n_jt, n_jump, n_illop;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      if (dut.stall) n_stall++;
      if (dut.sel_a == BYP_ALU   || dut.sel_b == BYP_ALU)   n_alu++;
      if (dut.sel_a == BYP_MEM   || dut.sel_b == BYP_MEM)   n_mem++;
      if (dut.sel_a == BYP_WB    || dut.sel_b == BYP_WB)    n_wb++;
      if (dut.sel_a == BYP_PCALU || dut.sel_b == BYP_PCALU) n_pcalu++;
      if (dut.sel_a == BYP_PCMEM || dut.sel_b == BYP_PCMEM) n_pcmem++;
      if (!dut.stall) begin
        if (dut.pcsel == PCSEL_BT)    n_bt++;
        if (dut.pcsel == PCSEL_JT)    n_jt++;
        if (dut.pcsel == PCSEL_JUMP)  n_jump++;
        if (dut.pcsel == PCSEL_ILLOP) n_illop++;
      end
    end
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Exception handler at 0x80000040: count traps in $26, return through $27
  // with jalr, which also leaves its own link in $28.
  function automatic void put_handler(iss m);
    m.imem[16] = ADDI(26, 26, 1);
    m.imem[17] = JALR(28, 27);
    m.imem[18] = NOPI();
    m.imem[0]  = J(BASE + MAIN * 4);
    m.imem[1]  = NOPI();
  endfunction

  function automatic void directed(iss m);
    int p = MAIN;
    u32 a;
    put_handler(m);
    a = BASE + 4 * p;
    m.imem[p+0]  = ADDI(9, 0, 8);        // $t1 = 8
    m.imem[p+1]  = LW(12, 0, 9);         // lw  $t4,0($t1)
    m.imem[p+2]  = ADD(13, 9, 12);       // add $t5,$t1,$t4  (two stall cycles)
    m.imem[p+3]  = XOR_(14, 11, 12);     // xor $t6,$t3,$t4
    m.imem[p+4]  = LW(7, 4, 9);
    m.imem[p+5]  = NOPI();
    m.imem[p+6]  = ADD(8, 7, 7);         // one stall cycle
    m.imem[p+7]  = ADDI(2, 0, 5);
    m.imem[p+8]  = ADDI(3, 2, 1);        // ALU bypass
    m.imem[p+9]  = ADD(10, 2, 3);        // MEM and ALU bypass
    m.imem[p+10] = SUB(15, 2, 10);       // WB and ALU bypass
    m.imem[p+11] = SW(10, 12, 0);
    m.imem[p+12] = LW(11, 12, 0);
    m.imem[p+13] = BEQ(11, 10, 2);       // taken, decided on loaded data
    m.imem[p+14] = ADDI(16, 0, 1);       // delay slot, executed
    m.imem[p+15] = ADDI(17, 0, 1);       // skipped
    m.imem[p+16] = BNE(0, 0, 5);         // not taken
    m.imem[p+17] = ADDI(18, 0, 7);
    m.imem[p+18] = ADD(31, 0, 0);        // add  $ra,$0,$0
    m.imem[p+19] = JAL(a + 4 * 21);      // jal  f
    m.imem[p+20] = ADDI(31, 31, 4);      // addi $ra,$ra,4 in the delay slot
    m.imem[p+21] = XOR_(20, 31, 0);      // f: xor $t0,$ra,$0
    m.imem[p+22] = OR_(1, 0, 31);        //    or  $1,$0,$ra
    m.imem[p+23] = ADD(21, 0, 31);       //    add $t2,$0,$ra
    m.imem[p+24] = JAL(a + 4 * 30);      // call g
    m.imem[p+25] = NOPI();
    m.imem[p+26] = ADDI(19, 0, 99);      // return point of g
    m.imem[p+27] = ILLEGAL();            // trap, $27 = its address + 8
    m.imem[p+28] = ADDI(22, 0, 3);       // delay slot of the trap
    m.imem[p+29] = J(a + 4 * 33);
    m.imem[p+30] = OR_(23, 0, 31);       // g: $31 from PC_MEM
    m.imem[p+31] = JR(31);
    m.imem[p+32] = ADDI(24, 0, 1);
    m.imem[p+33] = ADDI(4, 0, 4);        // loop: sum four words
    m.imem[p+34] = ADDI(5, 0, 0);
    m.imem[p+35] = LW(6, 0, 5);
    m.imem[p+36] = ADD(25, 25, 6);
    m.imem[p+37] = ADDI(4, 4, -1);
    m.imem[p+38] = BNE(4, 0, -4);
    m.imem[p+39] = ADDI(5, 5, 4);
    m.imem[p+40] = J(a + 4 * 40);        // done: j done
    m.imem[p+41] = NOPI();
  endfunction

  localparam int REGS[9] = '{1, 2, 3, 4, 5, 6, 7, 8, 31};
  localparam int RFN[8]  = '{'h20, 'h22, 'h24, 'h25, 'h26, 'h27, 'h2a, 'h2b};
  localparam int SFN[3]  = '{'h00, 'h02, 'h03};
  localparam int VFN[3]  = '{'h04, 'h06, 'h07};
  localparam int IOP[6]  = '{'h08, 'h0a, 'h0b, 'h0c, 'h0d, 'h0e};

  function automatic int rreg();
    return REGS[$urandom_range(0, 8)];
  endfunction

  function automatic void random_prog(iss m, output int done_idx);
    int p = MAIN, last_ctl = 0, k, off;
    put_handler(m);
    for (int i = 0; i < NBODY; i++) begin
      bit can_ctl;
      can_ctl = (!last_ctl) && (i < NBODY - 8);
      k = $urandom_range(0, 99);
      last_ctl = 0;
      if (k < 25)      m.imem[p] = enc_r(RFN[$urandom_range(0,7)],
                                         rreg(), rreg(), rreg());
      else if (k < 32) m.imem[p] = enc_r(SFN[$urandom_range(0,2)], 0, rreg(), rreg(), $urandom_range(0,31));
      else if (k < 35) m.imem[p] = enc_r(VFN[$urandom_range(0,2)], rreg(), rreg(), rreg());
      else if (k < 50) m.imem[p] = enc_i(IOP[$urandom_range(0,5)],
                                         rreg(), rreg(), $urandom_range(0, 65535));
      else if (k < 53) m.imem[p] = LUI(rreg(), $urandom_range(0, 65535));
      else if (k < 68) m.imem[p] = LW(rreg(), 4 * $urandom_range(0, 31), ($urandom_range(0,3) == 0) ? rreg() : 0);
      else if (k < 78) m.imem[p] = SW(rreg(), 4 * $urandom_range(0, 31), ($urandom_range(0,3) == 0) ? rreg() : 0);
      else if (k < 90 && can_ctl) begin
        off = $urandom_range(1, 6);
        m.imem[p] = ($urandom_range(0,1) != 0) ? BEQ(rreg(), rreg(), off) : BNE(rreg(), rreg(), off);
        last_ctl = 1;
      end else if (k < 95 && can_ctl) begin
        m.imem[p] = JAL(BASE + 4 * (p + 1 + $urandom_range(1, 4)));
        last_ctl = 1;
      end else if (k < 97 && can_ctl) begin
        m.imem[p] = ILLEGAL();
        last_ctl = 1;
      end else m.imem[p] = ADD(rreg(), rreg(), rreg());
      p++;
    end
    for (int i = 0; i < 8; i++) m.imem[p++] = NOPI();
    done_idx = p;
    m.imem[p]   = J(BASE + 4 * p);
    m.imem[p+1] = NOPI();
  endfunction

  // Load images, run the pipeline to the done loop, compare with the model.
  task automatic run(iss m, int done_idx, string name);
    u32 done_addr = BASE + 4 * done_idx;
    longint unsigned t_pred = 0, t_first = 0, t_done = 0, guard;
    bit seen_first = 0, seen_done = 0, mem_ok = 1;
    u32 dinit[];
    // reference run
    dinit = new[DW];
    for (int i = 0; i < DW; i++) begin
      dinit[i] = $urandom();
      m.dmem[i] = dinit[i];
    end
    m.reset();
    guard = 0;
    while (m.pc != done_addr && guard < 100000) begin
      void'(m.step());
      guard++;
    end
    t_pred = m.step();   // the done instruction itself
    // load the hardware
    rst = 1;
    @(negedge clk);
    for (int i = 0; i < IW; i++) begin
      imem_we = 1; imem_addr = 10'(i); imem_data = m.imem[i];
      dmem_we = 1; dmem_addr = 10'(i); dmem_wdata = dinit[i];
      @(negedge clk);
    end
    imem_we = 0; dmem_we = 0;
    @(negedge clk);
    rst = 0;
    guard = 0;
    while (!seen_done && guard < 200000) begin
      @(negedge clk);
      guard++;
      if (!dut.stall && !seen_first && dut.pc_reg == BASE + 4) begin
        seen_first = 1; t_first = cyc;
      end
      if (!dut.stall && seen_first && dut.pc_reg == done_addr + 4) begin
        seen_done = 1; t_done = cyc;
      end
    end
    check(seen_done, {name, ": reached done"});
    repeat (8) @(negedge clk);
    check(t_done - t_first == t_pred,
          $sformatf("%s: done in RF at cycle %0d, expected %0d", name, t_done - t_first, t_pred));
    for (int i = 1; i < 32; i++)
      check(dut.u_rf.regs[i] == m.r[i],
            $sformatf("%s: $%0d = %08h, expected %08h", name, i, dut.u_rf.regs[i], m.r[i]));
    for (int i = 0; i < DW; i++) begin
      dmem_addr = 10'(i);
      #1;
      if (dmem_rdata != m.dmem[i]) begin
        if (mem_ok) $display("%s: dmem[%0d] = %08h, expected %08h", name, i, dmem_rdata, m.dmem[i]);
        mem_ok = 0;
      end
    end
    check(mem_ok, {name, ": data memory"});
    $display("%s: %0d instructions, %0d cycles from first to last RF", name, m.executed, t_pred);
    rst = 1;
  endtask

  initial begin
    iss m;
    int done_idx;
    repeat (3) @(negedge clk);
    m = new(IW, DW);
    directed(m);
    run(m, MAIN + 40, "directed");
    // a few hand-worked values of the directed program
    check(dut.u_rf.regs[31] == BASE + 4 * (MAIN + 26), "jal g links to the address after its delay slot");
    check(dut.u_rf.regs[20] == BASE + 4 * (MAIN + 21) + 4, "xor sees $ra after the delay-slot addi");
    check(dut.u_rf.regs[27] == BASE + 4 * (MAIN + 29), "trap saves its address + 8 in $27");
    check(dut.u_rf.regs[26] == 1, "handler ran once");
    check(dut.u_rf.regs[28] == BASE + 4 * 17 + 8, "jalr links to the address after its delay slot");
    check(dut.u_rf.regs[17] == 0 && dut.u_rf.regs[16] == 1, "branch delay slot executed, next skipped");
    for (int s = 0; s < NRAND; s++) begin
      m = new(IW, DW);
      random_prog(m, done_idx);
      run(m, done_idx, $sformatf("random%0d", s));
    end
    $display("events: stall=%0d alu=%0d mem=%0d wb=%0d pcalu=%0d pcmem=%0d bt=%0d jr=%0d j=%0d trap=%0d",
             n_stall, n_alu, n_mem, n_wb, n_pcalu, n_pcmem, n_bt, n_jt, n_jump, n_illop);
    check(n_stall > 0, "load stall occurred");
    check(n_alu > 0, "ALU bypass occurred");
    check(n_mem > 0, "MEM bypass occurred");
    check(n_wb > 0, "WB bypass occurred");
    check(n_pcalu > 0, "PC_ALU bypass occurred");
    check(n_pcmem > 0, "PC_MEM bypass occurred");
    check(n_bt > 0, "taken branch occurred");
    check(n_jt > 0, "jr occurred");
    check(n_jump > 0, "j/jal occurred");
    check(n_illop > 0, "illegal-opcode trap occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
