// vedic_mul4: 4x4-bit Vedic multiplier from four 2x2 Vedic multipliers.
//
// With a = {ah, al} and b = {bh, bl} (2-bit halves) the four partial
// products al*bl, ah*bl, al*bh and ah*bh come from vedic_mul2 instances
// and are summed at weights 1, 4, 4 and 16: the two crosswise products
// are added first, then the vertical ones, as in the usual four-block
// Vedic arrangement. With CARRYLESS = 1 every addition becomes XOR and p
// is the polynomial product over GF(2) (degree <= 6). Combinational.
// The four-2x2 structure follows the published multiplier; the carry-less
// option is this design's addition for GF(2^8) arithmetic.
module vedic_mul4 #(
  parameter bit CARRYLESS = 1'b0
) (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);

  logic [3:0] q_ll, q_hl, q_lh, q_hh;

  vedic_mul2 #(.CARRYLESS(CARRYLESS)) u_ll (.a(a[1:0]), .b(b[1:0]), .p(q_ll));
  vedic_mul2 #(.CARRYLESS(CARRYLESS)) u_hl (.a(a[3:2]), .b(b[1:0]), .p(q_hl));
  vedic_mul2 #(.CARRYLESS(CARRYLESS)) u_lh (.a(a[1:0]), .b(b[3:2]), .p(q_lh));
  vedic_mul2 #(.CARRYLESS(CARRYLESS)) u_hh (.a(a[3:2]), .b(b[3:2]), .p(q_hh));

  logic [4:0] xsum;

  always_comb begin
    if (CARRYLESS) begin
      xsum = {1'b0, q_hl ^ q_lh};
      p     = {4'b0, q_ll} ^ {1'b0, xsum, 2'b0} ^ {q_hh, 4'b0};
    end else begin
      xsum = {1'b0, q_hl} + {1'b0, q_lh};
      p     = {4'b0, q_ll} + {1'b0, xsum, 2'b0} + {q_hh, 4'b0};
    end
  end

endmodule
