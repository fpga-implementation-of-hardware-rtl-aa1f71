// aes_control: sequencer of the iterative AES-128 encryptor.
//
// A round takes ROUND_CYCLES = 6 clock cycles, one per register of the
// round loop, counted by a phase counter ph = 0..5; a round counter runs
// 1..NR. The control signals CS1..CS11 (aes_pkg::ctrl_t) are decoded from
// them:
//   idle, start      CS10            load plaintext^key and the cipher key
//   ph 0..3          CS4..CS7        enable S-box stage registers 1..4
//   ph 4             CS1, CS8        ShiftRows active, round key update
//                    CS2             MixColumns active (rounds 1..NR-1)
//   rounds NR        CS3             final-round MixColumns bypass
//   ph 5             CS9 / CS11      state register reload / ciphertext load
// done pulses for one cycle after the ciphertext register is loaded, i.e.
// NR*ROUND_CYCLES = 60 cycles after the edge that accepted start. start is
// ignored while busy. Synchronous active-high reset.
// The existence and roles of CS1 (ShiftRows), CS2 (MixColumns) and CS3
// (final round) follow the published architecture; the phase encoding and
// the assignment of CS4..CS11 are this design's.
module aes_control
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  output ctrl_t      ctrl,
  output logic [3:0] round,
  output logic       busy,
  output logic       done
);

  logic [2:0] ph_q;
  logic [3:0] round_q;
  logic       busy_q, done_q;
  logic       last_round, last_phase;

  assign last_round = (round_q == 4'(NR));
  assign last_phase = (ph_q == 3'(ROUND_CYCLES - 1));

  always_comb begin
    ctrl      = '0;
    ctrl.cs10 = start & ~busy_q;
    if (busy_q) begin
      ctrl.cs4  = (ph_q == 3'd0);
      ctrl.cs5  = (ph_q == 3'd1);
      ctrl.cs6  = (ph_q == 3'd2);
      ctrl.cs7  = (ph_q == 3'd3);
      ctrl.cs1  = (ph_q == 3'd4);
      ctrl.cs2  = (ph_q == 3'd4) & ~last_round;
      ctrl.cs3  = last_round;
      ctrl.cs8  = (ph_q == 3'd4);
      ctrl.cs9  = last_phase & ~last_round;
      ctrl.cs11 = last_phase & last_round;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ph_q    <= '0;
      round_q <= '0;
      busy_q  <= 1'b0;
      done_q  <= 1'b0;
    end else begin
      done_q <= ctrl.cs11;
      if (ctrl.cs10) begin
        busy_q  <= 1'b1;
        ph_q    <= '0;
        round_q <= 4'd1;
      end else if (busy_q) begin
        if (last_phase) begin
          ph_q <= '0;
          if (last_round) busy_q  <= 1'b0;
          else            round_q <= round_q + 4'd1;
        end else begin
          ph_q <= ph_q + 3'd1;
        end
      end
    end
  end

  assign round = round_q;
  assign busy  = busy_q;
  assign done  = done_q;

  // The state register is never loaded from two sources at once, and
  // exactly one S-box stage or round-end action is active per busy cycle.
  a_load_exclusive: assert property (@(posedge clk) disable iff (rst)
    !(ctrl.cs9 && ctrl.cs10));
  a_one_phase: assert property (@(posedge clk) disable iff (rst)
    busy_q |-> $onehot({ctrl.cs4, ctrl.cs5, ctrl.cs6, ctrl.cs7, ctrl.cs1, ctrl.cs9 | ctrl.cs11}));

endmodule
