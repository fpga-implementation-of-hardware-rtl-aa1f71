// tb_add_round_key: checks AddRoundKey on the FIPS-197 input block and
// on random state/key pairs.
module tb_add_round_key;
  logic clk = 1'b0;
  logic [127:0] s, k, o;
  int checks = 0, failures = 0;
  add_round_key dut (.state_in(s), .round_key(k), .state_out(o));
  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    s = 128'h3243f6a8885a308d313198a2e0370734;
    k = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    @(posedge clk);
    checks++;
    if (o !== 128'h193de3bea0f4e22b9ac68d2ae9f84808) begin failures++; $display("FAIL fips %h", o); end
    for (int i = 0; i < 50; i++) begin
      s = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      @(posedge clk);
      checks++;
      for (int b = 0; b < 128; b++) if (o[b] != (s[b] != k[b])) begin failures++; break; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
