// tb_gf4_inv: checks the GF(2^4) inverse table for all 16 inputs: a*y = 1
// for non-zero a (reference shift-and-add product), and 0 maps to 0.
module tb_gf4_inv;
  import aes_ref_pkg::*;
  logic clk = 1'b0;
  logic [3:0] a, y;
  int checks = 0, failures = 0;
  gf4_inv dut (.a(a), .y(y));
  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 16; i++) begin
      a = 4'(i);
      @(posedge clk);
      checks++;
      if (i == 0 ? (y !== 4'h0) : (ref_gmul4(a, y) !== 4'h1)) begin
        failures++;
        $display("FAIL inv(%h) = %h", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
