// tb_gf4_mul_lut: exhaustive check of the GF(2^4) table multiplier against
// a shift-and-add reference product modulo x^4+x+1 (all 256 operand pairs).
module tb_gf4_mul_lut;
  import aes_ref_pkg::*;
  logic clk = 1'b0;
  logic [3:0] a, b, p;
  int checks = 0, failures = 0;
  gf4_mul_lut dut (.a(a), .b(b), .p(p));
  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 4'(i >> 4); b = 4'(i);
      @(posedge clk);
      checks++;
      if (p !== ref_gmul4(a, b)) begin
        failures++;
        $display("FAIL %h*%h = %h, expected %h", a, b, p, ref_gmul4(a, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
