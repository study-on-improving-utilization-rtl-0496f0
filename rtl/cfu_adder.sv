// cfu_adder: adder/subtracter primitive of the composite functional unit.
//
// Two source operands and one destination; the Add/Sub control selects
// src1 + src2 (sub = 0) or src1 - src2 (sub = 1), as the primitive adder of the
// design does. Results wrap modulo 2^W (two's complement); no saturation or
// carry output is provided, which is this design's choice. Purely combinational.
module cfu_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] src1,
  input  logic [W-1:0] src2,
  input  logic         sub,
  output logic [W-1:0] dest
);
  always_comb begin
    if (sub) dest = src1 - src2;
    else     dest = src1 + src2;
  end
endmodule
