// tb_bypass_unit: self-checking test of one operand bypass mux.
// Random source and destination registers, drawn from a small set so that
// matches are frequent, with random link flags. The expected operand is found
// by walking the stages from oldest (register file, then WB) to youngest
// (MEM, then ALU), letting each matching stage overwrite the value, with $0
// forced to zero at the end; this reaches the priority order by a different
// route than the unit's own select chain.
`timescale 1ns/1ps
module tb_bypass_unit;
  import minimips_pkg::*;
  reg_t src, d_alu, d_mem, d_wb;
  logic l_alu, l_mem;
  word_t rf, y_alu, pc4_alu, y_mem, pc4_mem, wd_wb, data;
  byp_sel_t sel;
  int checks = 0, failures = 0;
  int seen [7];
  logic clk = 0;
  always #5 clk = ~clk;

  bypass_unit dut (
    .src(src), .rf_data(rf),
    .dest_alu(d_alu), .link_alu(l_alu), .y_alu(y_alu), .pc4_alu(pc4_alu),
    .dest_mem(d_mem), .link_mem(l_mem), .y_mem(y_mem), .pc4_mem(pc4_mem),
    .dest_wb(d_wb), .wd_wb(wd_wb), .data(data), .sel(sel)
  );

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic reg_t pick();
    return reg_t'($urandom_range(0, 3));
  endfunction

  initial begin
    word_t exp;
    foreach (seen[i]) seen[i] = 0;
    for (int i = 0; i < 5000; i++) begin
      src = pick(); d_alu = pick(); d_mem = pick(); d_wb = pick();
      l_alu = $urandom_range(0, 1); l_mem = $urandom_range(0, 1);
      rf = $urandom(); y_alu = $urandom(); pc4_alu = $urandom(); y_mem = $urandom();
      pc4_mem = $urandom(); wd_wb = $urandom();
      exp = rf;
      if (d_wb == src)  exp = wd_wb;
      if (d_mem == src) exp = l_mem ? pc4_mem : y_mem;
      if (d_alu == src) exp = l_alu ? pc4_alu : y_alu;
      if (src == 0)     exp = 0;
      @(posedge clk);
      checks++;
      seen[sel]++;
      if (data != exp) begin
        failures++;
        $display("FAIL src=%0d alu=%0d/%0d mem=%0d/%0d wb=%0d got %08h exp %08h",
                 src, d_alu, l_alu, d_mem, l_mem, d_wb, data, exp);
      end
    end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL source %0d never selected", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
