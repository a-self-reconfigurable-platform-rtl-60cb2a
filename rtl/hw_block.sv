// hw_block: the active (partially reconfigurable) module of the platform.
//
// Its port list is the fixed interface every circuit under test (CUT) is
// wrapped in: 40 bits in from the static side (five 8-bit right-to-left bus
// macros), the 7-bit OutBus and the 9-bit IDBus back (left-to-right bus
// macros) and one board LED. This instance carries the C17 CUT. Beyond that
// fixed interface it receives the LUT vectors of its region of configuration
// memory, which is how run-time reconfiguration reaches it.
//
// Bit assignments are this design's choice: in1,in2,in3,in6,in7 on
// InBus[0..4]; out22,out23 on OutBus[0..1] (OutBus[2..6] unused, 0);
// IDBus carries the CUT number (17); Led1_out follows InBus[39], which the
// application side sets while a test campaign runs. Purely combinational.
//
// Lint notes: the ascending [0:n] bus numbering is the interface's own; the
// C17 CUT reads only InBus[0..4] and InBus[39], the rest are spare inputs
// for larger CUTs.
module hw_block
  import erace_pkg::*;
(
  input  logic [0:39]      InBus,
  input  logic [3:0][15:0] lut_init, // configuration plane of the region (LUT3..LUT0)
  output logic             Led1_out,
  output logic [0:6]       OutBus,
  output logic [0:8]       IDBus
);
  logic out22, out23;

  c17_cut u_cut (
    .lut_init (lut_init),
    .in1 (InBus[0]), .in2 (InBus[1]), .in3 (InBus[2]), .in6 (InBus[3]), .in7 (InBus[4]),
    .out22 (out22), .out23 (out23)
  );

  always_comb begin
    OutBus      = '0;
    OutBus[0]   = out22;
    OutBus[1]   = out23;
    IDBus       = C17_HB_ID;
    Led1_out    = InBus[39];
  end
endmodule
