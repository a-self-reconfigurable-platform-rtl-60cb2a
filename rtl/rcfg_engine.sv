// rcfg_engine: the reconfiguration-side fault injection task, in hardware.
//
// It waits for INJECT messages on the incoming Fast Simplex Link. For each
// one it first undoes the fault currently injected, if any, by writing the
// saved original vector back into that LUT, then, unless the new fault is
// F_NONE, rewrites the target LUT with the faulty vector. Each LUT change is
// a read-modify-write of one configuration frame through the HWICAP:
//   1  buffer[0] <= READ header, send 4 bytes (configure)   -> port armed
//   2  read the frame back into buffer bytes 4 .. 4+FRAME_BYTES-1
//   3  read the buffer word holding the LUT, replace its 16 bits, write back
//   4  buffer[0] <= WRITE header, send 4+FRAME_BYTES bytes (configure)
// Each transfer is started through the RNC register and waited for by
// polling STATUS. The faulty vector comes from lut_fault_inject. Afterwards
// it shows on the LED GPIO whether a fault is in place and answers with a
// DONE message that echoes the fault.
//
// LUT j lives in frame j / (FRAME_BYTES/2) at byte 2*(j mod (FRAME_BYTES/2)),
// the layout of the configuration memory model. The sequence follows the
// read-modify-write procedure for LUT contents; doing it in a state machine
// rather than in processor software is this design's choice.
//
// Lint notes: the message type field and the fault field are the only parts
// of an FSL word used; of the active fault only the LUT number is needed to
// restore it; buffer words are 32-bit aligned, so byte offset bit 0 is unused.
module rcfg_engine
  import erace_pkg::*;
#(
  parameter int unsigned FRAME_BYTES = 584,
  parameter logic [31:0] HWICAP_BASE = ADDR_HWICAP,
  parameter logic [31:0] LED_BASE    = ADDR_GPIO_R
) (
  input  logic        clk,
  input  logic        rst_n,
  // FSL from the application side
  input  logic [31:0] fsl_s_data,
  input  logic        fsl_s_exists,
  output logic        fsl_s_read,
  // FSL to the application side
  output logic [31:0] fsl_m_data,
  output logic        fsl_m_write,
  input  logic        fsl_m_full,
  // OPB master
  output opb_req_t    opb_req,
  input  opb_rsp_t    opb_rsp,
  // status
  output logic        fault_active,
  output logic [15:0] rmw_count      // LUT read-modify-writes completed
);
  localparam int unsigned LPF = FRAME_BYTES / 2;

  typedef enum logic [2:0] {S_IDLE, S_RMW, S_LED, S_REPLY} state_e;
  state_e      state;
  logic [3:0]  step;
  logic        restoring;      // current RMW undoes the active fault
  fault_t      new_f, act_f;
  logic [15:0] saved_vec;
  logic [31:0] word_q;
  fault_t      msg_f;
  always_comb msg_f = fault_t'(fsl_s_data[15:0]);

  // target of the current read-modify-write
  logic [8:0]  lut;
  logic [15:0] frame;
  logic [11:0] byte_off;       // byte address of the LUT inside the buffer
  logic [15:0] vec_old, vec_inj, vec_new;
  logic [31:0] word_new;

  always_comb begin
    lut      = restoring ? act_f.lut : new_f.lut;
    frame    = 16'(32'(lut) / LPF);
    byte_off = 12'(4 + 2 * (32'(lut) % LPF));
    vec_old  = byte_off[1] ? word_q[15:0] : word_q[31:16];
    vec_new  = restoring ? saved_vec : vec_inj;
    word_new = byte_off[1] ? {word_q[31:16], vec_new} : {vec_new, word_q[15:0]};
  end

  lut_fault_inject u_inj (.vec_in(vec_old), .kind(new_f.kind), .idx(new_f.idx), .vec_out(vec_inj));

  // OPB operation of each RMW step
  logic        op_rnw, op_poll;
  logic [31:0] op_addr, op_data;
  always_comb begin
    op_rnw = 1'b0; op_poll = 1'b0; op_addr = HWICAP_BASE; op_data = '0;
    unique case (step)
      4'd0:  op_data = {ICAP_CMD_READ, frame, 8'h00};
      4'd1:  begin op_addr = HWICAP_BASE + 32'(HWICAP_SIZE);   op_data = 32'd4; end
      4'd2:  begin op_addr = HWICAP_BASE + 32'(HWICAP_OFFSET); op_data = 32'd0; end
      4'd3:  begin op_addr = HWICAP_BASE + 32'(HWICAP_RNC);    op_data = 32'd0; end
      4'd4:  begin op_addr = HWICAP_BASE + 32'(HWICAP_STATUS); op_rnw = 1'b1; op_poll = 1'b1; end
      4'd5:  begin op_addr = HWICAP_BASE + 32'(HWICAP_SIZE);   op_data = 32'(FRAME_BYTES); end
      4'd6:  begin op_addr = HWICAP_BASE + 32'(HWICAP_OFFSET); op_data = 32'd4; end
      4'd7:  begin op_addr = HWICAP_BASE + 32'(HWICAP_RNC);    op_data = 32'd1; end
      4'd8:  begin op_addr = HWICAP_BASE + 32'(HWICAP_STATUS); op_rnw = 1'b1; op_poll = 1'b1; end
      4'd9:  begin op_addr = HWICAP_BASE + 32'({byte_off[11:2], 2'b00}); op_rnw = 1'b1; end
      4'd10: begin op_addr = HWICAP_BASE + 32'({byte_off[11:2], 2'b00}); op_data = word_new; end
      4'd11: op_data = {ICAP_CMD_WRITE, frame, 8'h00};
      4'd12: begin op_addr = HWICAP_BASE + 32'(HWICAP_SIZE);   op_data = 32'(FRAME_BYTES + 4); end
      4'd13: begin op_addr = HWICAP_BASE + 32'(HWICAP_OFFSET); op_data = 32'd0; end
      4'd14: begin op_addr = HWICAP_BASE + 32'(HWICAP_RNC);    op_data = 32'd0; end
      default: begin op_addr = HWICAP_BASE + 32'(HWICAP_STATUS); op_rnw = 1'b1; op_poll = 1'b1; end
    endcase
  end

  always_comb begin
    opb_req = OPB_REQ_IDLE;
    if (state == S_RMW) begin
      opb_req.select = 1'b1; opb_req.rnw = op_rnw; opb_req.abus = op_addr; opb_req.dbus = op_data;
    end else if (state == S_LED) begin
      opb_req.select = 1'b1; opb_req.abus = LED_BASE; opb_req.dbus = 32'(fault_active);
    end
    fsl_s_read  = (state == S_IDLE) && fsl_s_exists;
    fsl_m_write = (state == S_REPLY) && !fsl_m_full;
    fsl_m_data  = {MSG_DONE, 12'h000, new_f};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; step <= '0; restoring <= 1'b0; new_f <= '0; act_f <= '0;
      saved_vec <= '0; word_q <= '0; fault_active <= 1'b0; rmw_count <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (fsl_s_exists && fsl_s_data[31:28] == MSG_INJECT) begin
          new_f <= msg_f;
          step  <= '0;
          if (fault_active) begin
            restoring <= 1'b1; state <= S_RMW;
          end else if (msg_f.kind != F_NONE) begin
            restoring <= 1'b0; state <= S_RMW;
          end else begin
            state <= S_LED;
          end
        end
        S_RMW: if (opb_rsp.xfer_ack) begin
          if (step == 4'd9) begin
            word_q <= opb_rsp.dbus;
            if (!restoring) saved_vec <= byte_off[1] ? opb_rsp.dbus[15:0] : opb_rsp.dbus[31:16];
          end
          if (op_poll && !opb_rsp.dbus[0]) begin
            step <= step;                     // transfer still running: poll again
          end else if (step != 4'd15) begin
            step <= step + 4'd1;
          end else begin
            rmw_count <= rmw_count + 16'd1;
            step      <= '0;
            if (restoring) begin
              restoring    <= 1'b0;
              fault_active <= 1'b0;
              if (new_f.kind == F_NONE) state <= S_LED;
            end else begin
              fault_active <= 1'b1;
              act_f        <= new_f;
              state        <= S_LED;
            end
          end
        end
        S_LED:   if (opb_rsp.xfer_ack) state <= S_REPLY;
        S_REPLY: if (!fsl_m_full) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
