// c17_cut: the ISCAS-85 benchmark C17 (five inputs, two outputs, six NAND
// gates) mapped onto four run-time reconfigurable LUTs.
//
// The mapping is the hand-constrained one that keeps internal nets 16, 18/17
// and 19 visible as LUT pins, so that stuck-at faults on them can be injected
// by rewriting LUT vectors:
//   LUT0 (8F): {I2,I1,I0} = {in2, in6, in3}   -> n16 = NAND(in2, NAND(in3,in6))
//   LUT1 (8F): {I2,I1,I0} = {n16, in1, in3}   -> out22 = NAND(n16, NAND(in1,in3))
//   LUT2 (8F): {I2,I1,I0} = {in7, in6, in3}   -> n19 = NAND(in7, NAND(in3,in6))
//   LUT3 (7) : {I1,I0}    = {n19, n16}        -> out23 = NAND(n16, n19)
// Pin assignment follows the published technology view; unused LUT inputs
// are tied to 0 (a choice of this design), so the vectors that give C17 are
// 8F8F, 8F8F, 8F8F and 7777. Purely combinational.
module c17_cut (
  input  logic [3:0][15:0] lut_init, // vectors of LUT3..LUT0 from configuration memory
  input  logic in1, in2, in3, in6, in7,
  output logic out22, out23
);
  logic n16, n19;

  lut4 u_lut0 (.init(lut_init[0]), .i({1'b0, in2, in6, in3}), .o(n16));
  lut4 u_lut1 (.init(lut_init[1]), .i({1'b0, n16, in1, in3}), .o(out22));
  lut4 u_lut2 (.init(lut_init[2]), .i({1'b0, in7, in6, in3}), .o(n19));
  lut4 u_lut3 (.init(lut_init[3]), .i({2'b00, n19, n16}),     .o(out23));
endmodule
