// tb_key_expansion: drives the key schedule the way the encryptor does
// (load, then per round four S-box stage enables and an update) and checks
// every round key of the FIPS-197 key 2b7e1516... (round 10 =
// d014f9a8c9ee2589e13f0cc8b6630ca6) and of random keys against the
// reference schedule. Also checks that the key holds without update.
module tb_key_expansion;
  import aes_ref_pkg::*;
  logic clk = 1'b0, rst = 1'b1, load = 1'b0, update = 1'b0;
  logic [3:0] en = '0;
  logic [127:0] key_in = '0, rk;
  logic [11*128-1:0] exp_rk;
  int checks = 0, failures = 0;

  key_expansion dut (.clk(clk), .rst(rst), .load(load), .key_in(key_in),
                     .stage_en(en), .update(update), .round_key(rk));
  always #5 clk = ~clk;

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic schedule(logic [127:0] k);
    exp_rk = ref_key_schedule(k);
    key_in = k; load = 1'b1; @(posedge clk); #1; load = 1'b0;
    check("round 0", rk, exp_rk[127:0]);
    for (int r = 1; r <= 10; r++) begin
      for (int s = 0; s < 4; s++) begin
        en = 4'(1 << s); @(posedge clk); #1;
      end
      en = '0;
      check("held before update", rk, exp_rk[128*(r-1) +: 128]);
      update = 1'b1; @(posedge clk); #1; update = 1'b0;
      check($sformatf("round %0d", r), rk, exp_rk[128*r +: 128]);
      @(posedge clk); #1;
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1;
    rst = 1'b0;
    schedule(128'h2b7e151628aed2a6abf7158809cf4f3c);
    check("fips round 10", rk, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6);
    for (int k = 0; k < 5; k++) schedule({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
