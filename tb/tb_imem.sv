// tb_imem: self-checking test of the instruction memory.
// Loads random words through the load port, then fetches them back with PC
// values whose upper bits (0x80000000 region) and low two bits are ignored.
`timescale 1ns/1ps
module tb_imem;
  import minimips_pkg::*;
  localparam int W = 1024;
  logic clk = 0, we = 0;
  logic [9:0] la = 0;
  word_t ld = 0, pc = 0, instr;
  word_t model [W];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  imem dut (.clk(clk), .pc(pc), .instr(instr), .load_we(we), .load_addr(la), .load_data(ld));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      we = 1; la = 10'(i); ld = $urandom(); model[i] = ld;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 3000; i++) begin
      int k = $urandom_range(0, W - 1);
      pc = 32'h8000_0000 + 32'(k) * 4 + ((i % 3 == 0) ? 32'h0 : 32'h1000_0000 * $urandom_range(0,3));
      #1;
      checks++;
      if (instr != model[k]) begin
        failures++;
        $display("FAIL pc=%08h got %08h exp %08h", pc, instr, model[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
