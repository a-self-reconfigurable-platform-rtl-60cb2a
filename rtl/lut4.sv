// lut4: a 4-input, 1-output look-up table whose truth table is a 16-bit
// configuration vector.
//
// The vector is not a register of this module: it comes from the
// configuration memory of the active region, so rewriting the memory at run
// time changes the function without touching the netlist. That is what makes
// run-time fault injection possible. Output bit o = init[{i3,i2,i1,i0}], i.e.
// input F1 is i[0] (least significant) and F4 is i[3], as in the truth tables
// of the fault-injection method. Purely combinational.
module lut4 (
  input  logic [15:0] init, // configuration vector, bit n is the output for input value n
  input  logic [3:0]  i,    // {F4, F3, F2, F1}
  output logic        o
);
  always_comb o = init[i];
endmodule
