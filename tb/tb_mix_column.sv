// tb_mix_column: checks one MixColumns column on the standard examples
// (db135345 -> 8e4da1bc, f20a225c -> 9fdc589d, 01010101 -> 01010101,
// d4d4d4d5 -> d5d5d7d6) and on random columns against the reference.
module tb_mix_column;
  import aes_ref_pkg::*;
  logic clk = 1'b0;
  logic [31:0] ci, co;
  int checks = 0, failures = 0;
  mix_column dut (.col_in(ci), .col_out(co));
  always #5 clk = ~clk;
  task automatic check(logic [31:0] x, logic [31:0] exp);
    ci = x; @(posedge clk);
    checks++;
    if (co !== exp) begin
      failures++;
      $display("FAIL mix(%h) = %h expected %h", x, co, exp);
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
    check(32'hdb135345, 32'h8e4da1bc);
    check(32'hf20a225c, 32'h9fdc589d);
    check(32'h01010101, 32'h01010101);
    check(32'hd4d4d4d5, 32'hd5d5d7d6);
    for (int k = 0; k < 200; k++) begin
      logic [31:0] x;
      x = $urandom;
      check(x, ref_mix_column(x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
