// tb_shift_rows: checks ShiftRows against the reference on a FIPS-197
// state and random states, and that CS1 = 0 forces the output to zero.
module tb_shift_rows;
  import aes_ref_pkg::*;
  logic clk = 1'b0;
  logic cs1;
  logic [127:0] din, dout;
  int checks = 0, failures = 0;
  shift_rows dut (.cs1(cs1), .din(din), .dout(dout));
  always #5 clk = ~clk;
  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    cs1 = 1'b1;
    din = 128'hd42711aee0bf98f1b8b45de51e415230; @(posedge clk);
    check("fips", dout, 128'hd4bf5d30e0b452aeb84111f11e2798e5);
    for (int k = 0; k < 50; k++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      cs1 = 1'b1; @(posedge clk);
      check("random", dout, ref_shift_rows(din));
      cs1 = 1'b0; @(posedge clk);
      check("cs1 low", dout, '0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
