// tb_aes128_encrypt_top: end-to-end test of the AES-128 encryptor at its
// default configuration.
//
// Encrypts the FIPS-197 Appendix B and C.1 blocks and a run of random
// key/plaintext pairs, each checked against the reference cipher, and
// checks that the ciphertext arrives exactly 60 cycles after start. Along
// the way it counts, and requires at least once each: the initial
// plaintext^key load (CS10), an S-box stage stepping with the other
// stages held (CS4..CS7), ShiftRows zeroing the round register (CS1 low),
// a MixColumns round (CS2), the final-round bypass (CS3), a round-key
// update (CS8), the loop reload (CS9), the ciphertext load (CS11), a
// start ignored while busy, blocks back to back, and a reset while busy.
module tb_aes128_encrypt_top;
  import aes_ref_pkg::*;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [127:0] pt = '0, key = '0, ct;
  logic busy, done;
  int checks = 0, failures = 0;
  int n_cs10, n_stage_hold, n_zeroed, n_mix, n_bypass, n_key_upd, n_reload, n_ct_load;
  int n_ignored_start, n_back_to_back, n_reset_busy;

  aes128_encrypt_top dut (.clk(clk), .rst(rst), .start(start), .plaintext(pt), .key(key),
                          .ciphertext(ct), .busy(busy), .done(done));
  always #5 clk = ~clk;

  // Mechanism counters, sampled on the control bundle.
  always @(posedge clk) if (!rst) begin
    if (dut.ctrl.cs10) n_cs10++;
    if ((dut.ctrl.cs4 || dut.ctrl.cs5 || dut.ctrl.cs6 || dut.ctrl.cs7) &&
        !(dut.ctrl.cs4 && dut.ctrl.cs5 && dut.ctrl.cs6 && dut.ctrl.cs7)) n_stage_hold++;
    if (dut.busy && !dut.ctrl.cs1 && dut.mix_q == '0) n_zeroed++;
    if (dut.ctrl.cs2) n_mix++;
    if (dut.ctrl.cs3 && dut.ctrl.cs1) n_bypass++;
    if (dut.ctrl.cs8) n_key_upd++;
    if (dut.ctrl.cs9) n_reload++;
    if (dut.ctrl.cs11) n_ct_load++;
  end

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Start one block, optionally poke start while busy; return after done.
  task automatic encrypt(logic [127:0] p, logic [127:0] k, bit poke);
    int lat;
    logic [127:0] exp;
    exp = ref_encrypt(p, k);
    pt = p; key = k; start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    lat = 0;
    while (!done && lat < 200) begin
      if (poke && lat == 17) begin
        start = 1'b1; pt = ~p; key = ~k;   // must be ignored
        n_ignored_start++;
      end else begin
        start = 1'b0; pt = p; key = k;
      end
      @(posedge clk); #1;
      lat++;
    end
    checks++;
    if (lat != 60) begin
      failures++;
      $display("FAIL latency %0d cycles, expected 60 (t=%0t poke=%0d ct_ok=%0d)", lat, $time, poke, ct === exp);
    end
    check("ciphertext", ct, exp);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {n_cs10, n_stage_hold, n_zeroed, n_mix, n_bypass, n_key_upd, n_reload, n_ct_load} = '0;
    {n_ignored_start, n_back_to_back, n_reset_busy} = '0;
    repeat (3) @(posedge clk); #1;
    rst = 1'b0;
    @(posedge clk); #1;
    // FIPS-197 Appendix B.
    encrypt(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c, 1'b0);
    check("FIPS-197 B", ct, 128'h3925841d02dc09fbdc118597196a0b32);
    // FIPS-197 Appendix C.1, started right after the previous done.
    n_back_to_back++;
    encrypt(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f, 1'b1);
    check("FIPS-197 C.1", ct, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    // Reset while busy, then the machine must work again.
    pt = '1; key = '0; start = 1'b1; @(posedge clk); #1; start = 1'b0;
    repeat (25) @(posedge clk); #1;
    if (busy) n_reset_busy++;
    rst = 1'b1; @(posedge clk); #1; rst = 1'b0;
    checks++;
    if (busy || ct !== '0) begin failures++; $display("FAIL reset did not clear the encryptor"); end
    for (int i = 0; i < 20; i++) begin
      encrypt({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom}, i[0]);
      if (i % 3 == 0) begin repeat (3) @(posedge clk); #1; end
    end
    $display("mechanisms: cs10=%0d stage_step=%0d cs1_zero=%0d cs2_mix=%0d cs3_bypass=%0d cs8_key=%0d cs9_reload=%0d cs11_load=%0d ignored_start=%0d back_to_back=%0d reset_busy=%0d",
             n_cs10, n_stage_hold, n_zeroed, n_mix, n_bypass, n_key_upd, n_reload, n_ct_load,
             n_ignored_start, n_back_to_back, n_reset_busy);
    begin
      int counts [11];
      counts = '{n_cs10, n_stage_hold, n_zeroed, n_mix, n_bypass, n_key_upd, n_reload, n_ct_load,
                 n_ignored_start, n_back_to_back, n_reset_busy};
      foreach (counts[m]) begin
        checks++;
        if (counts[m] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never happened", m);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
