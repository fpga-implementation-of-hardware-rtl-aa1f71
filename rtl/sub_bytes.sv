// sub_bytes: SubBytes over the whole 128-bit state.
//
// Sixteen sbox_cfa instances, one per state byte, all driven by the same
// stage enables, so the substituted state appears on dout four enabled
// clock edges after din (or at once with PIPELINED = 0). A 128-bit round
// datapath with sixteen S-boxes follows the published architecture.
module sub_bytes
  import aes_pkg::*;
#(
  parameter bit PIPELINED = 1'b1
) (
  input  logic       clk,
  input  logic [3:0] stage_en,
  input  state_t     din,
  output state_t     dout
);

  for (genvar b = 0; b < 16; b++) begin : g_sbox
    sbox_cfa #(.PIPELINED(PIPELINED)) u_sbox (
      .clk     (clk),
      .stage_en(stage_en),
      .din     (din [8*b +: 8]),
      .dout    (dout[8*b +: 8])
    );
  end

endmodule
