// tb_mix_columns: checks MixColumns on the FIPS-197 round-1 state
// (6353e08c... -> 5f726415...), on random states, the CS3 final-round
// bypass (output = input) and CS2 = 0 (output zero).
module tb_mix_columns;
  import aes_ref_pkg::*;
  logic clk = 1'b0;
  logic cs2, cs3;
  logic [127:0] din, dout;
  int checks = 0, failures = 0;
  mix_columns dut (.cs2(cs2), .cs3(cs3), .din(din), .dout(dout));
  always #5 clk = ~clk;
  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    cs2 = 1'b1; cs3 = 1'b0;
    din = 128'h6353e08c0960e104cd70b751bacad0e7; @(posedge clk);
    check("fips", dout, 128'h5f72641557f5bc92f7be3b291db9f91a);
    for (int k = 0; k < 50; k++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      cs2 = 1'b1; cs3 = 1'b0; @(posedge clk);
      check("random", dout, ref_mix_columns(din));
      cs2 = 1'b0; cs3 = 1'b1; @(posedge clk);
      check("final-round bypass", dout, din);
      cs2 = 1'b0; cs3 = 1'b0; @(posedge clk);
      check("cs2 low", dout, '0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
