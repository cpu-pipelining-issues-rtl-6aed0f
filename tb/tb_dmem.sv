// tb_dmem: self-checking test of the data memory.
// Random loads and stores on the pipeline port against an array model: a
// store is visible on the next cycle, read data appears one clock after the
// address (MEM stage address, WB stage data). Also checks the host port.
`timescale 1ns/1ps
module tb_dmem;
  import minimips_pkg::*;
  localparam int W = 1024;
  logic clk = 0, wr = 0, hwe = 0;
  logic [9:0] ha = 0;
  word_t addr = 0, wdata = 0, rdata, hwd = 0, hrd;
  word_t model [W];
  word_t exp_rd;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dmem dut (.clk(clk), .addr(addr), .wdata(wdata), .wr(wr), .rdata(rdata),
            .host_we(hwe), .host_addr(ha), .host_wdata(hwd), .host_rdata(hrd));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      hwe = 1; ha = 10'(i); hwd = $urandom(); model[i] = hwd;
    end
    @(negedge clk); hwe = 0;
    for (int i = 0; i < 4000; i++) begin
      int k = $urandom_range(0, 63);
      @(negedge clk);
      wr = ($urandom_range(0, 2) == 0);
      addr = 32'(k) * 4;
      wdata = $urandom();
      exp_rd = model[k];
      @(posedge clk);
      if (wr) model[k] = wdata;
      @(negedge clk);
      wr = 0;
      checks++;
      if (rdata != exp_rd) begin
        failures++;
        $display("FAIL read word %0d got %08h exp %08h", k, rdata, exp_rd);
      end
    end
    for (int i = 0; i < W; i++) begin
      ha = 10'(i); #1;
      checks++;
      if (hrd != model[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
