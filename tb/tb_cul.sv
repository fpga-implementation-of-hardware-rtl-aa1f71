// tb_cul: exhaustive check of the nibble combiner,
// d = {C}*ah^2 + ah*al + al^2 in GF(2^4) mod x^4+x+1, for all 256 inputs.
module tb_cul;
  import aes_ref_pkg::*;
  logic clk = 1'b0;
  logic [3:0] ah, al, d, exp_d;
  int checks = 0, failures = 0;
  cul dut (.ah(ah), .al(al), .d(d));
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
      ah = 4'(i >> 4); al = 4'(i);
      @(posedge clk);
      exp_d = ref_gmul4(4'hC, ref_gmul4(ah, ah)) ^ ref_gmul4(ah, al) ^ ref_gmul4(al, al);
      checks++;
      if (d !== exp_d) begin
        failures++;
        $display("FAIL cul(%h,%h) = %h, expected %h", ah, al, d, exp_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
