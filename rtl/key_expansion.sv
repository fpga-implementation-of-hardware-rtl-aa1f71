// key_expansion: on-the-fly AES-128 key schedule.
//
// Holds the current round key (words w0..w3, w0 in bits 127:96) and the
// round constant. The next round key is
//   t   = SubWord(RotWord(w3)) ^ {rcon, 00, 00, 00}
//   w0' = w0 ^ t,  w1' = w1 ^ w0',  w2' = w2 ^ w1',  w3' = w3 ^ w2'
// SubWord uses four sbox_cfa instances that share the state S-boxes' stage
// enables (CS4..CS7), so t is ready four enabled edges after a round
// starts; update (CS8) then replaces the round key and doubles rcon in
// GF(2^8). load (CS10) takes the cipher key and sets rcon to {01}.
// Round key i is thus present from the update of round i until the update
// of round i+1, with no round-key memory.
// Only the AES key schedule itself is standard; the document does not
// describe its key expansion, and this on-the-fly arrangement is this
// design's choice.
module key_expansion
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       load,
  input  state_t     key_in,
  input  logic [3:0] stage_en,
  input  logic       update,
  output state_t     round_key
);

  state_t      rk_q;
  byte_t       rcon_q;
  logic [31:0] rot, sub;
  state_t      rk_next;

  assign rot = {rk_q[23:0], rk_q[31:24]};

  for (genvar i = 0; i < 4; i++) begin : g_sbox
    sbox_cfa #(.PIPELINED(1'b1)) u_sbox (
      .clk     (clk),
      .stage_en(stage_en),
      .din     (rot[8*i +: 8]),
      .dout    (sub[8*i +: 8])
    );
  end

  always_comb begin
    logic [31:0] w0, w1, w2, w3;
    w0 = rk_q[127:96] ^ sub ^ {rcon_q, 24'h0};
    w1 = rk_q[95:64]  ^ w0;
    w2 = rk_q[63:32]  ^ w1;
    w3 = rk_q[31:0]   ^ w2;
    rk_next = {w0, w1, w2, w3};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rk_q   <= '0;
      rcon_q <= 8'h01;
    end else if (load) begin
      rk_q   <= key_in;
      rcon_q <= 8'h01;
    end else if (update) begin
      rk_q   <= rk_next;
      rcon_q <= {rcon_q[6:0], 1'b0} ^ (rcon_q[7] ? 8'h1B : 8'h00);
    end
  end

  assign round_key = rk_q;

endmodule
