// cfu_multiplier: multiplier primitive of the composite functional unit.
//
// Two signed W-bit source operands, one W-bit destination. The destination is
// the low W bits of the two's-complement product, so the unit behaves like
// integer multiplication modulo 2^W; keeping only the low half is this design's
// choice (the source gives a 16-bit multiplier but not which product bits it
// keeps). Purely combinational.
module cfu_multiplier #(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0] src1,
  input  logic signed [W-1:0] src2,
  output logic        [W-1:0] dest
);
  logic signed [2*W-1:0] product;

  always_comb begin
    product = src1 * src2;
    dest    = product[W-1:0];
  end
endmodule
