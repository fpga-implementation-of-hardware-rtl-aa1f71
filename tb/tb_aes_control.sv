// tb_aes_control: follows the sequencer through whole encryptions and
// compares CS1..CS11, round, busy and done in every cycle with a schedule
// written out independently: per round, phases 0..3 enable S-box stages
// 1..4, phase 4 raises CS1 and CS8 (and CS2 except in round 10), phase 5
// raises CS9 (CS11 in round 10); CS3 is high throughout round 10. Also
// checks that start is ignored while busy, that done comes 60 cycles
// after start, and reset in mid-operation.
module tb_aes_control;
  import aes_pkg::*;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  ctrl_t ctrl, exp;
  logic [3:0] round;
  logic busy, done;
  int checks = 0, failures = 0;

  aes_control dut (.clk(clk), .rst(rst), .start(start), .ctrl(ctrl),
                   .round(round), .busy(busy), .done(done));
  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, want);
    end
  endtask

  task automatic run_block(bit poke_start);
    int lat;
    start = 1'b1; #1;
    check("cs10 on start", 32'(ctrl.cs10), 1);
    @(posedge clk); #1;
    start = 1'b0;
    lat = 0;
    for (int r = 1; r <= 10; r++) begin
      for (int p = 0; p < 6; p++) begin
        if (poke_start && r == 3 && p == 2) start = 1'b1;
        #1;
        exp = '0;
        exp.cs4  = (p == 0); exp.cs5 = (p == 1); exp.cs6 = (p == 2); exp.cs7 = (p == 3);
        exp.cs1  = (p == 4); exp.cs8 = (p == 4);
        exp.cs2  = (p == 4) && (r != 10);
        exp.cs3  = (r == 10);
        exp.cs9  = (p == 5) && (r != 10);
        exp.cs11 = (p == 5) && (r == 10);
        check($sformatf("ctrl r%0d p%0d", r, p), 32'(ctrl), 32'(exp));
        check("round", 32'(round), r);
        check("busy", 32'(busy), 1);
        check("no done while busy", 32'(done), 0);
        @(posedge clk); #1;
        start = 1'b0;
        lat++;
      end
    end
    check("done pulse", 32'(done), 1);
    check("latency", lat, 60);
    check("idle after block", 32'(busy), 0);
    @(posedge clk); #1;
    check("done is one cycle", 32'(done), 0);
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1;
    rst = 1'b0;
    @(posedge clk); #1;
    check("idle ctrl", 32'(ctrl), 0);
    run_block(1'b0);
    run_block(1'b1);
    // Reset in mid-operation returns to idle.
    start = 1'b1; @(posedge clk); #1; start = 1'b0;
    repeat (20) @(posedge clk); #1;
    rst = 1'b1; @(posedge clk); #1; rst = 1'b0;
    check("busy after reset", 32'(busy), 0);
    check("ctrl after reset", 32'(ctrl), 0);
    run_block(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
