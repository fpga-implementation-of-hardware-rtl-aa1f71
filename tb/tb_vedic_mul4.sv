// tb_vedic_mul4: exhaustive check of the 4x4 Vedic multiplier in both
// modes: integer product (a*b) and carry-less product over GF(2).
module tb_vedic_mul4;
  logic clk = 1'b0;
  logic [3:0] a, b;
  logic [7:0] p_int, p_clm, e_clm;
  int checks = 0, failures = 0;
  vedic_mul4 #(.CARRYLESS(1'b0)) dut_int (.a(a), .b(b), .p(p_int));
  vedic_mul4 #(.CARRYLESS(1'b1)) dut_clm (.a(a), .b(b), .p(p_clm));
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
      e_clm = '0;
      for (int j = 0; j < 4; j++) if (b[j]) e_clm ^= 8'(a) << j;
      checks += 2;
      if (p_int !== 8'(a) * 8'(b)) begin failures++; $display("FAIL int %0d*%0d=%0d", a, b, p_int); end
      if (p_clm !== e_clm)         begin failures++; $display("FAIL clm %b*%b=%b", a, b, p_clm); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
