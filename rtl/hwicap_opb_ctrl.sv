// hwicap_opb_ctrl: the OPB slave side of the HWICAP.
//
// It answers single-beat OPB transfers in its 8 KB window at BASE_ADDR:
//   0x0000-0x07FF  storage buffer (BRAM port B, 512 x 32 bits)
//   0x1000 SIZE    number of bytes to move (12 bits)
//   0x1004 OFFSET  storage buffer byte address of the first byte (11 bits)
//   0x1008 RNC     write: bit0 = 1 readback, 0 configure; starts the transfer
//   0x100C STATUS  read: bit0 done (set by send_done, cleared by a start),
//                  bit1 transfer in progress
// These correspond to the Size, BRAM Offset and Readback/not-Configure
// values handed to the HWICAP; the offsets are this design's own.
// The start pulse to the ICAP controller follows the RNC write by one
// cycle, together with the acknowledge. Every access is acknowledged (xfer_ack) exactly one cycle after select;
// buffer reads return the BRAM word read on the select cycle. A start while
// a transfer runs is ignored. Reads of unused offsets return 0.
//
// Lint note: rst_n also disables the handshake assertion, which lint reports
// as a mixed synchronous/asynchronous use.
module hwicap_opb_ctrl
  import erace_pkg::*;
#(
  parameter logic [31:0] BASE_ADDR = ADDR_HWICAP
) (
  input  logic        clk,
  input  logic        rst_n,
  input  opb_req_t    opb_req,
  output opb_rsp_t    opb_rsp,
  // BRAM port B
  output logic        bram_enb,
  output logic        bram_web,
  output logic [8:0]  bram_addrb,
  output logic [31:0] bram_dib,
  input  logic [31:0] bram_dob,
  // to/from the ICAP controller
  output logic        start_icap,
  output logic        rnc_reg,
  output logic [10:0] addr_start,
  output logic [11:0] size_reg,
  input  logic        send_done,
  input  logic        icap_busy_ctrl
);
  wire        hit  = opb_req.select && (opb_req.abus[31:13] == BASE_ADDR[31:13]);
  wire [12:0] off  = opb_req.abus[12:0];
  logic       ack_q, rd_buf_q;
  logic [31:0] rd_reg_q;
  logic       done_q;
  wire        acc  = hit && !ack_q;
  wire        buf_acc = acc && (off <= HWICAP_BUF_LAST);

  always_comb begin
    bram_enb   = buf_acc;
    bram_web   = buf_acc && !opb_req.rnw;
    bram_addrb = off[10:2];
    bram_dib   = opb_req.dbus;
    opb_rsp.xfer_ack = ack_q;
    opb_rsp.dbus     = !ack_q ? 32'h0 : (rd_buf_q ? bram_dob : rd_reg_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_q <= 1'b0; start_icap <= 1'b0; rd_buf_q <= 1'b0; rd_reg_q <= '0; done_q <= 1'b0;
      rnc_reg <= 1'b0; addr_start <= '0; size_reg <= '0;
    end else begin
      ack_q    <= acc;
      start_icap <= acc && !opb_req.rnw && (off == HWICAP_RNC) && !icap_busy_ctrl;
      rd_buf_q <= buf_acc && opb_req.rnw;
      rd_reg_q <= '0;
      if (send_done) done_q <= 1'b1;
      if (acc && !buf_acc) begin
        if (opb_req.rnw) begin
          unique case (off)
            HWICAP_SIZE:   rd_reg_q <= 32'(size_reg);
            HWICAP_OFFSET: rd_reg_q <= 32'(addr_start);
            HWICAP_RNC:    rd_reg_q <= 32'(rnc_reg);
            HWICAP_STATUS: rd_reg_q <= {30'd0, icap_busy_ctrl, done_q};
            default:       rd_reg_q <= '0;
          endcase
        end else begin
          unique case (off)
            HWICAP_SIZE:   size_reg   <= opb_req.dbus[11:0];
            HWICAP_OFFSET: addr_start <= opb_req.dbus[10:0];
            HWICAP_RNC: if (!icap_busy_ctrl) begin
              rnc_reg <= opb_req.dbus[0];
              done_q  <= 1'b0;
            end
            default: ;
          endcase
        end
      end
    end
  end

  // The transfer registers must be stable while the engine uses them: the
  // engine latches them at start, so only the start itself is checked here.
  a_ack_one_cycle: assert property (@(posedge clk) disable iff (!rst_n) ack_q |=> !ack_q);
endmodule
