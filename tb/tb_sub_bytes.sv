// tb_sub_bytes: checks SubBytes on the FIPS-197 round-1 state
// (193de3be... -> d42711ae...) and on random states against the reference,
// with the result due exactly four enabled edges after the input.
module tb_sub_bytes;
  import aes_ref_pkg::*;
  logic clk = 1'b0;
  logic [3:0] en;
  logic [127:0] din, dout;
  int checks = 0, failures = 0;

  sub_bytes dut (.clk(clk), .stage_en(en), .din(din), .dout(dout));
  always #5 clk = ~clk;

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Called just after a clock edge.
  task automatic run(logic [127:0] x, logic [127:0] exp);
    din = x; en = 4'hF;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (dout === exp) begin
      failures++;
      $display("FAIL result arrived before the fourth edge");
    end
    @(posedge clk); #1;
    check("sub_bytes", dout, exp);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0; en = 4'hF;
    repeat (5) @(posedge clk);
    #1;
    run(128'h193de3bea0f4e22b9ac68d2ae9f84808, 128'hd42711aee0bf98f1b8b45de51e415230);
    for (int k = 0; k < 40; k++) begin
      logic [127:0] x;
      x = {$urandom, $urandom, $urandom, $urandom};
      run(x, ref_sub_bytes(x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
