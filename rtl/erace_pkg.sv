// erace_pkg: types and constants shared by the self-reconfigurable BIST platform.
//
// It holds the single-beat On-chip Peripheral Bus (OPB) request/response structs,
// the fault descriptor exchanged between the application side and the
// reconfiguration side over the Fast Simplex Links (FSL), the command bytes
// understood by the configuration port, the HWICAP register offsets and the
// address map. Address map values follow the platform's memory maps; the
// register offsets, message layout and command bytes are this design's own
// choices.
package erace_pkg;

  // ---------------- OPB (simplified, single beat) ----------------
  typedef struct packed {
    logic        select;  // request valid; held until xfer_ack
    logic        rnw;     // 1 = read, 0 = write
    logic [31:0] abus;    // byte address
    logic [31:0] dbus;    // write data
  } opb_req_t;

  typedef struct packed {
    logic        xfer_ack; // one-cycle transfer acknowledge
    logic [31:0] dbus;     // read data, zero when not acknowledging
  } opb_rsp_t;

  localparam opb_req_t OPB_REQ_IDLE = '0;
  localparam opb_rsp_t OPB_RSP_IDLE = '0;

  // ---------------- Address map ----------------
  // Application side (OPB_A)
  localparam logic [31:0] ADDR_GPIO1_A  = 32'h0003_0200; // input: IDBus + OutBus
  localparam logic [31:0] ADDR_GPIO2_A  = 32'h0003_0800; // output: InBus[0:31]
  localparam logic [31:0] ADDR_GPIO3_A  = 32'h0003_0A00; // output: InBus[32:39]
  localparam logic [31:0] ADDR_OMA      = 32'h0005_0000; // shared memory, both buses
  // Reconfiguration side (OPB_R)
  localparam logic [31:0] ADDR_GPIO_R   = 32'h0003_0200; // output: LED
  localparam logic [31:0] ADDR_HWICAP   = 32'h0006_0000;

  localparam int unsigned OMA_BYTES     = 8192;
  localparam int unsigned GPIO_SPAN     = 512;
  localparam int unsigned HWICAP_SPAN   = 8192;

  // HWICAP register offsets inside its 8 KB window
  localparam logic [12:0] HWICAP_BUF_LAST = 13'h07FF; // storage buffer 0x000-0x7FF
  localparam logic [12:0] HWICAP_SIZE     = 13'h1000; // bytes to move
  localparam logic [12:0] HWICAP_OFFSET   = 13'h1004; // BRAM byte offset
  localparam logic [12:0] HWICAP_RNC      = 13'h1008; // write starts: 1 readback, 0 configure
  localparam logic [12:0] HWICAP_STATUS   = 13'h100C; // bit0 done (sticky), bit1 busy

  // ---------------- Configuration port ----------------
  // Header of every configuration transfer: {cmd, frame[15:8], frame[7:0], 8'h00}
  localparam logic [7:0] ICAP_CMD_WRITE = 8'h01; // header followed by one frame of data
  localparam logic [7:0] ICAP_CMD_READ  = 8'h02; // next reads return one frame

  // XC2V2000 active region: one CLB column
  localparam int unsigned FRAME_BYTES_XC2V2000 = 584; // 146 words x 32 bits
  localparam int unsigned CLB_COLUMN_FRAMES    = 22;
  localparam int unsigned CLB_COLUMN_LUTS      = 448; // 56 CLBs x 4 slices x 2 LUTs

  // ---------------- Faults ----------------
  typedef enum logic [2:0] {
    F_NONE    = 3'd0,
    F_IN_SA0  = 3'd1,  // LUT input pin idx stuck-at-0
    F_IN_SA1  = 3'd2,  // LUT input pin idx stuck-at-1
    F_OUT_SA0 = 3'd3,  // LUT output stuck-at-0
    F_OUT_SA1 = 3'd4,  // LUT output stuck-at-1
    F_FLIP    = 3'd5   // LUT contents: vector bit idx inverted
  } fault_kind_e;

  typedef struct packed {
    fault_kind_e kind;
    logic [8:0]  lut;  // LUT number in the active column
    logic [3:0]  idx;  // input pin (F1 = 0 .. F4 = 3) or vector bit
  } fault_t;           // 16 bits

  // FSL message: [31:28] type, [15:0] fault
  localparam logic [3:0] MSG_INJECT = 4'h1;
  localparam logic [3:0] MSG_DONE   = 4'h2;

  // ---------------- C17 circuit under test ----------------
  // LUT vectors of the modified C17 netlist (LUT3_8F x3, LUT2_7), unused
  // upper inputs tied to 0, so the printed 8- and 4-bit values repeat.
  localparam int unsigned C17_NUM_LUTS = 4;
  localparam logic [C17_NUM_LUTS-1:0][15:0] C17_LUT_INIT =
      {16'h7777, 16'h8F8F, 16'h8F8F, 16'h8F8F}; // [3] .. [0]
  localparam logic [C17_NUM_LUTS-1:0][2:0] C17_LUT_INPUTS =
      {3'd2, 3'd3, 3'd3, 3'd3};                 // [3] .. [0]
  localparam logic [8:0] C17_HB_ID = 9'd17;

endpackage
