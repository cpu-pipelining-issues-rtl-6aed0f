// tb_interlock: self-checking test of the load-use interlock.
// Random RF-stage sources, use flags and ALU/MEM-stage destinations and load
// flags; the expected stall is computed per source as "the nearest stage
// (ALU before MEM) that writes this register is a load", which is the
// condition under which no bypass can deliver the operand.
`timescale 1ns/1ps
module tb_interlock;
  import minimips_pkg::*;
  logic urs, urt, l_alu, l_mem, stall;
  reg_t rs, rt, d_alu, d_mem;
  int checks = 0, failures = 0, n_stall = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  interlock dut (.uses_rs(urs), .rs(rs), .uses_rt(urt), .rt(rt),
                 .load_alu(l_alu), .dest_alu(d_alu), .load_mem(l_mem), .dest_mem(d_mem),
                 .stall(stall));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit waits(bit used, reg_t r);
    if (!used || r == 0) return 0;
    if (r == d_alu) return l_alu;
    if (r == d_mem) return l_mem;
    return 0;
  endfunction

  initial begin
    for (int i = 0; i < 5000; i++) begin
      urs = $urandom_range(0, 1); urt = $urandom_range(0, 1);
      l_alu = $urandom_range(0, 1); l_mem = $urandom_range(0, 1);
      rs = reg_t'($urandom_range(0, 3)); rt = reg_t'($urandom_range(0, 3));
      d_alu = reg_t'($urandom_range(0, 3)); d_mem = reg_t'($urandom_range(0, 3));
      @(posedge clk);
      checks++;
      if (stall) n_stall++;
      if (stall != (waits(urs, rs) || waits(urt, rt))) begin
        failures++;
        $display("FAIL rs=%0d/%0d rt=%0d/%0d alu=%0d/%0d mem=%0d/%0d stall=%0d",
                 rs, urs, rt, urt, d_alu, l_alu, d_mem, l_mem, stall);
      end
    end
    checks++;
    if (n_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
