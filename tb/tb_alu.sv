// tb_alu: self-checking test of the miniMIPS ALU.
// Drives random and corner-case operands through every function code and
// compares Y with values computed here from the operator definitions (signed
// and unsigned compare, logical and arithmetic shifts of B by A[4:0]), and
// the flags of A - B with the signed/unsigned relations they encode.
`timescale 1ns/1ps
module tb_alu;
  import minimips_pkg::*;
  word_t a, b, y;
  alufn_t fn;
  logic n, v, c, z;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  alu dut (.a(a), .b(b), .alufn(fn), .y(y), .n(n), .v(v), .c(c), .z(z));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t model(alufn_t f, word_t x, word_t w);
    case (f)
      ALU_ADD:  return x + w;
      ALU_SUB:  return x - w;
      ALU_AND:  return x & w;
      ALU_OR:   return x | w;
      ALU_XOR:  return x ^ w;
      ALU_NOR:  return ~(x | w);
      ALU_SLT:  return ($signed(x) < $signed(w)) ? 32'd1 : 32'd0;
      ALU_SLTU: return (x < w) ? 32'd1 : 32'd0;
      ALU_SLL:  return w << x[4:0];
      ALU_SRL:  return w >> x[4:0];
      ALU_SRA:  return word_t'($signed(w) >>> x[4:0]);
      default:  return 32'hx;
    endcase
  endfunction

  localparam word_t CORNER[6] = '{32'h0, 32'h1, 32'h7fff_ffff, 32'h8000_0000, 32'hffff_ffff, 32'h10};

  initial begin
    for (int i = 0; i < 4000; i++) begin
      a = (i % 5 == 0) ? CORNER[$urandom_range(0,5)] : $urandom();
      b = (i % 7 == 0) ? CORNER[$urandom_range(0,5)] : $urandom();
      if (i % 11 == 0) b = a;
      fn = alufn_t'($urandom_range(0, 10));
      @(posedge clk);
      checks++;
      if (y !== model(fn, a, b)) begin
        failures++;
        $display("FAIL %s a=%08h b=%08h y=%08h exp=%08h", fn.name(), a, b, y, model(fn, a, b));
      end
      if (fn == ALU_SUB) begin
        checks++;
        if (z != (a == b) || (n ^ v) != ($signed(a) < $signed(b)) || c != (a >= b)) begin
          failures++;
          $display("FAIL flags a=%08h b=%08h nvcz=%b%b%b%b", a, b, n, v, c, z);
        end
      end
    end
    // lui: 16 into A, immediate into B, shift left
    a = 32'd16; b = 32'h0000_beef; fn = ALU_SLL;
    @(posedge clk);
    checks++;
    if (y != 32'hbeef_0000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
