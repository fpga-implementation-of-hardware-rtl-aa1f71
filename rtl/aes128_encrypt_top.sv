// aes128_encrypt_top: compact iterative AES-128 encryptor.
//
// One AES round of hardware is closed into a loop and used ten times. The
// loop holds six registers, so a round takes six clock cycles:
//   1  state register          (AddRoundKey result)
//   2-5 S-box stage registers  (sixteen 4-stage sub-pipelined sbox_cfa)
//   6  round output register   (ShiftRows, then MixColumns or its bypass)
// after which AddRoundKey with the current round key closes the loop. The
// key schedule runs alongside on four more S-boxes and produces each round
// key just before it is needed. aes_control decodes CS1..CS11 from a phase
// and a round counter.
//
// Interface: on a cycle with start = 1 while idle, plaintext ^ key is
// loaded and the encryption begins. 60 cycles after that edge the
// ciphertext register holds the result and done pulses for one cycle;
// ciphertext keeps its value until the next block finishes. busy is high
// while a block is in flight; start is ignored then. 128-bit values use the
// FIPS-197 byte order (first byte in bits 127:120). Synchronous active-high
// reset.
//
// Follows the published design: the iterative round structure, the
// sub-pipelined composite-field S-box, Vedic-multiplier MixColumns, a
// six-stage pipeline and control signals CS1..CS3 for ShiftRows,
// MixColumns and the final round. This design's own: the exact register
// positions, the on-the-fly key schedule, the port list (chosen to match
// 389 I/O pins: three 128-bit buses and five single bits) and one block in
// flight at a time.
module aes128_encrypt_top
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   start,
  input  state_t plaintext,
  input  state_t key,
  output state_t ciphertext,
  output logic   busy,
  output logic   done
);

  ctrl_t      ctrl;
  logic [3:0] stage_en;
  state_t     state_q, mix_q, ct_q;
  state_t     init_ark, sb_out, sr_out, mc_out, loop_ark, round_key;

  assign stage_en = {ctrl.cs7, ctrl.cs6, ctrl.cs5, ctrl.cs4};

  aes_control u_ctrl (
    .clk  (clk),
    .rst  (rst),
    .start(start),
    .ctrl (ctrl),
    .round(),
    .busy (busy),
    .done (done)
  );

  key_expansion u_key (
    .clk      (clk),
    .rst      (rst),
    .load     (ctrl.cs10),
    .key_in   (key),
    .stage_en (stage_en),
    .update   (ctrl.cs8),
    .round_key(round_key)
  );

  add_round_key u_ark_init (.state_in(plaintext), .round_key(key), .state_out(init_ark));

  sub_bytes #(.PIPELINED(1'b1)) u_sub (
    .clk     (clk),
    .stage_en(stage_en),
    .din     (state_q),
    .dout    (sb_out)
  );

  shift_rows  u_shift (.cs1(ctrl.cs1), .din(sb_out), .dout(sr_out));
  mix_columns u_mix   (.cs2(ctrl.cs2), .cs3(ctrl.cs3), .din(sr_out), .dout(mc_out));

  add_round_key u_ark_loop (.state_in(mix_q), .round_key(round_key), .state_out(loop_ark));

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= '0;
      mix_q   <= '0;
      ct_q    <= '0;
    end else begin
      // Round output register: captures zero whenever CS1 is low.
      mix_q <= mc_out;
      if (ctrl.cs10)     state_q <= init_ark;
      else if (ctrl.cs9) state_q <= loop_ark;
      if (ctrl.cs11)     ct_q    <= loop_ark;
    end
  end

  assign ciphertext = ct_q;

  // Outside reset the ciphertext only changes on a CS11 load, which is always followed
  // by done.
  a_ct_stable: assert property (@(posedge clk) disable iff (rst)
    !$past(ctrl.cs11) && !$past(rst) |-> $stable(ct_q));
  a_done_after_load: assert property (@(posedge clk) disable iff (rst)
    ctrl.cs11 |=> done);

endmodule
