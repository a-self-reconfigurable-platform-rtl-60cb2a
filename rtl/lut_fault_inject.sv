// lut_fault_inject: computes the configuration vector that makes a 4-input
// LUT behave as if it had a single stuck-at fault.
//
//   input stuck-at-v on pin k : every entry n takes the value of the entry
//                               with bit k of n forced to v
//                               (e.g. F3 stuck-at-1: entry 0000 <- entry 0100)
//   output stuck-at-v         : all 16 entries set to v
//   contents fault            : entry idx inverted (one input combination)
//   none                      : vector unchanged
// These are the three run-time fault injection methods of the platform.
// Purely combinational; idx is the pin (0 = F1 .. 3 = F4) or the entry.
module lut_fault_inject
  import erace_pkg::*;
(
  input  logic [15:0]  vec_in,
  input  fault_kind_e  kind,
  input  logic [3:0]   idx,
  output logic [15:0]  vec_out
);
  always_comb begin
    vec_out = vec_in;
    unique case (kind)
      F_IN_SA0:  for (int n = 0; n < 16; n++) vec_out[n] = vec_in[4'(n) & ~(4'd1 << idx[1:0])];
      F_IN_SA1:  for (int n = 0; n < 16; n++) vec_out[n] = vec_in[4'(n) |  (4'd1 << idx[1:0])];
      F_OUT_SA0: vec_out = 16'h0000;
      F_OUT_SA1: vec_out = 16'hFFFF;
      F_FLIP:    vec_out = vec_in ^ (16'd1 << idx);
      default:   vec_out = vec_in;
    endcase
  end
endmodule
