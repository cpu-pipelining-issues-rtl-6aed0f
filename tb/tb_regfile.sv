// tb_regfile: self-checking test of the 32 x 32 register file.
// Random writes and reads on both ports against an array model: a write is
// visible from the next cycle, $0 always reads zero, and reset clears all.
`timescale 1ns/1ps
module tb_regfile;
  import minimips_pkg::*;
  logic clk = 0, rst = 1, we = 0;
  reg_t ra1 = 0, ra2 = 0, wa = 0;
  word_t rd1, rd2, wd = 0;
  word_t model [32];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  regfile dut (.clk(clk), .rst(rst), .ra1(ra1), .rd1(rd1), .ra2(ra2), .rd2(rd2),
               .we(we), .wa(wa), .wd(wd));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    foreach (model[i]) model[i] = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int i = 0; i < 32; i++) begin
      ra1 = 5'(i); #1; chk(rd1 == 0, "reset clears");
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = ($urandom_range(0, 2) != 0);
      wa = 5'($urandom());
      wd = $urandom();
      ra1 = 5'($urandom()); ra2 = (i % 4 == 0) ? wa : 5'($urandom());
      #1;
      chk(rd1 == model[ra1] && rd2 == model[ra2],
          $sformatf("read r%0d=%08h r%0d=%08h", ra1, rd1, ra2, rd2));
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
    end
    @(negedge clk); we = 1; wa = 0; wd = 32'hdead_beef;
    @(negedge clk); we = 0; ra1 = 0; #1; chk(rd1 == 0, "$0 stays zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
