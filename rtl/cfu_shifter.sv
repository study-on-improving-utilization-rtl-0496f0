// cfu_shifter: shifter primitive of the composite functional unit.
//
// One source operand, one destination and a 4-bit signed shift amount, as the
// design specifies: the amount ranges from -8 to 7, giving up to 8-bit left and
// 7-bit right shifts. A negative amount shifts left by its magnitude; zero or
// a positive amount shifts right. Right shifts are arithmetic (sign-filling),
// which is this design's choice for signed DSP data. Purely combinational.
module cfu_shifter #(
  parameter int unsigned W = 16
) (
  input  logic        [W-1:0] src1,
  input  logic signed [3:0]   shamt,
  output logic        [W-1:0] dest
);
  logic [3:0] mag;

  always_comb begin
    mag = shamt[3] ? 4'(-shamt) : 4'(shamt);   // -8 maps to 8
    if (shamt[3]) dest = src1 << mag;
    else          dest = W'($signed(src1) >>> mag[2:0]);
  end
endmodule
