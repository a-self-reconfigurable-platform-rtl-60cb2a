// opb_bram_dual: the shared on-chip memory (OMA) between the application
// and reconfiguration sides, an 8 KB block RAM with one OPB slave port on
// each bus.
//
// Each port answers single-beat 32-bit accesses in [BASE_ADDR,
// BASE_ADDR+BYTES) and acknowledges one cycle after select, returning the
// word as it was before a write in the same cycle. If both ports write the
// same word in one cycle, port B wins (this design's choice). The
// application side stores one result record per injected fault here.
module opb_bram_dual
  import erace_pkg::*;
#(
  parameter logic [31:0] BASE_ADDR = ADDR_OMA,
  parameter int unsigned BYTES     = 8192
) (
  input  logic     clk,
  input  logic     rst_n,
  input  opb_req_t req_a,
  output opb_rsp_t rsp_a,
  input  opb_req_t req_b,
  output opb_rsp_t rsp_b
);
  localparam int unsigned WORDS = BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [31:0] mem [WORDS];
  logic        ack_a, ack_b;
  logic [31:0] rd_a, rd_b;

  wire hit_a = req_a.select && (req_a.abus - BASE_ADDR) < BYTES && !ack_a;
  wire hit_b = req_b.select && (req_b.abus - BASE_ADDR) < BYTES && !ack_b;
  wire [AW-1:0] wa = AW'((req_a.abus - BASE_ADDR) >> 2);
  wire [AW-1:0] wb = AW'((req_b.abus - BASE_ADDR) >> 2);

  always_ff @(posedge clk) begin
    if (hit_a) begin
      rd_a <= mem[wa];
      if (!req_a.rnw) mem[wa] <= req_a.dbus;
    end
    if (hit_b) begin
      rd_b <= mem[wb];
      if (!req_b.rnw) mem[wb] <= req_b.dbus;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin ack_a <= 1'b0; ack_b <= 1'b0; end
    else begin ack_a <= hit_a; ack_b <= hit_b; end
  end

  always_comb begin
    rsp_a.xfer_ack = ack_a;
    rsp_a.dbus     = ack_a ? rd_a : 32'h0;
    rsp_b.xfer_ack = ack_b;
    rsp_b.dbus     = ack_b ? rd_b : 32'h0;
  end
endmodule
