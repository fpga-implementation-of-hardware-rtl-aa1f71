// tb_sbox_cfa: streams all 256 bytes through the pipelined S-box, one per
// cycle, and checks each result against the reference S-box exactly four
// cycles later. Then checks that a stage with its enable low holds its
// value (the byte must not advance while stage_en is 0), and checks the
// combinational PIPELINED = 0 variant on all 256 bytes.
module tb_sbox_cfa;
  import aes_ref_pkg::*;
  logic clk = 1'b0;
  logic [3:0] en;
  logic [7:0] din, dout, din_c, dout_c;
  int checks = 0, failures = 0;

  sbox_cfa dut (.clk(clk), .stage_en(en), .din(din), .dout(dout));
  sbox_cfa #(.PIPELINED(1'b0)) dut_c (.clk(clk), .stage_en(4'h0), .din(din_c), .dout(dout_c));

  always #5 clk = ~clk;

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
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
    en = 4'hF; din = 8'h00; din_c = 8'h00;
    // Stream: din changes right after each edge, dout is sampled before.
    for (int i = 0; i < 256 + 3; i++) begin
      if (i < 256) din = 8'(i);
      @(posedge clk);
      #1;
      if (i >= 3) check($sformatf("pipelined S(%h)", 8'(i - 3)), dout, ref_sbox(8'(i - 3)));
    end
    // Stall: load 8'h53 into stage 1 only, then hold stages 2..4.
    din = 8'h53; en = 4'b0001; @(posedge clk); #1;
    din = 8'h00; en = 4'b0000; repeat (3) @(posedge clk); #1;
    check("held output while disabled", dout, ref_sbox(8'hFF));
    en = 4'b0010; @(posedge clk); #1;
    en = 4'b0100; @(posedge clk); #1;
    en = 4'b1000; @(posedge clk); #1;
    check("stepped S(53)", dout, 8'hED);
    // Non-pipelined form.
    for (int i = 0; i < 256; i++) begin
      din_c = 8'(i); #1;
      check($sformatf("comb S(%h)", 8'(i)), dout_c, ref_sbox(8'(i)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
