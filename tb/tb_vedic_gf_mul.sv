// tb_vedic_gf_mul: checks a*c in GF(2^8) for every byte a and every
// 4-bit constant c (including the MixColumns constants 02 and 03) against
// the shift-and-add reference.
module tb_vedic_gf_mul;
  import aes_ref_pkg::*;
  logic clk = 1'b0;
  logic [7:0] a, p;
  logic [3:0] c;
  int checks = 0, failures = 0;
  vedic_gf_mul dut (.a(a), .c(c), .p(p));
  always #5 clk = ~clk;
  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 4096; i++) begin
      a = 8'(i >> 4); c = 4'(i);
      @(posedge clk);
      checks++;
      if (p !== ref_gmul(a, 8'(c))) begin
        failures++;
        $display("FAIL %h*%h = %h, expected %h", a, c, p, ref_gmul(a, 8'(c)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
