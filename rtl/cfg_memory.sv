// cfg_memory: behavioural model of the configuration memory of the active
// region (one CLB column of an XC2V2000), organised as frames.
//
// A frame is the smallest unit the configuration port reads or writes; the
// column has NUM_FRAMES frames of FRAME_BYTES bytes (22 frames of 146 32-bit
// words on this device). The model stores the frames byte by byte, gives the
// configuration port one synchronous byte write port and one asynchronous
// byte read port, and continuously drives the 16-bit vector of every LUT of
// the column to the logic it configures.
//
// The real placement of LUT bits inside Virtex-II frames is not public, so
// this model uses its own: LUT j occupies bytes 2*(j mod L) and 2*(j mod L)+1
// of frame j / L, with L = FRAME_BYTES/2 LUTs per frame, high byte first.
// Power-up stands for loading the initial full bitstream: every byte is
// cleared and the first N_INIT LUTs get INIT_LUTS (the C17 netlist by
// default). Like the real configuration memory, the user reset leaves the
// contents alone.
module cfg_memory #(
  parameter int unsigned FRAME_BYTES = 584,
  parameter int unsigned NUM_FRAMES  = 22,
  parameter int unsigned NUM_LUTS    = 448,
  parameter int unsigned N_INIT      = 4,
  parameter logic [N_INIT-1:0][15:0] INIT_LUTS = erace_pkg::C17_LUT_INIT
) (
  input  logic        clk,
  input  logic        we,
  input  logic [15:0] wframe,
  input  logic [15:0] wbyte,
  input  logic [7:0]  wdata,
  input  logic [15:0] rframe,
  input  logic [15:0] rbyte,
  output logic [7:0]  rdata,
  output logic [NUM_LUTS-1:0][15:0] lut_init
);
  localparam int unsigned TOTAL = FRAME_BYTES * NUM_FRAMES;
  localparam int unsigned LPF   = FRAME_BYTES / 2;

  initial assert (NUM_LUTS <= LPF * NUM_FRAMES && N_INIT <= NUM_LUTS)
    else $fatal(1, "cfg_memory: LUTs do not fit in the frames");

  logic [7:0] mem [TOTAL];

  function automatic int unsigned lut_byte(int unsigned j);
    return (j / LPF) * FRAME_BYTES + 2 * (j % LPF);
  endfunction

  wire wr_ok = (32'(wframe) < NUM_FRAMES) && (32'(wbyte) < FRAME_BYTES);
  wire rd_ok = (32'(rframe) < NUM_FRAMES) && (32'(rbyte) < FRAME_BYTES);

  // Power-up configuration (the initial full bitstream). The user reset
  // does not touch configuration memory.
  initial begin
    for (int unsigned a = 0; a < TOTAL; a++) mem[a] = '0;
    for (int unsigned j = 0; j < N_INIT; j++) begin
      mem[lut_byte(j)]     = INIT_LUTS[j][15:8];
      mem[lut_byte(j) + 1] = INIT_LUTS[j][7:0];
    end
  end

  always_ff @(posedge clk) begin
    if (we && wr_ok) mem[32'(wframe) * FRAME_BYTES + 32'(wbyte)] <= wdata;
  end

  always_comb rdata = rd_ok ? mem[32'(rframe) * FRAME_BYTES + 32'(rbyte)] : 8'h00;

  always_comb
    for (int unsigned j = 0; j < NUM_LUTS; j++)
      lut_init[j] = {mem[lut_byte(j)], mem[lut_byte(j) + 1]};
endmodule
