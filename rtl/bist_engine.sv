// bist_engine: the application-side test task, in hardware. It runs the
// fault-simulation flow of the platform on the circuit under test in the
// active module:
//   1  light the active module's LED (GPIO3) and read the hardware block ID
//      from IDBus (GPIO1);
//   2  fault-free pass: apply every pattern of the selected set through
//      GPIO2 and store the response read from GPIO1 per pattern value;
//   3  for every fault of the list: send INJECT over the FSL to the
//      reconfiguration side and wait for its DONE; apply every pattern,
//      compare each response with the fault-free one, count mismatches
//      ("detections"); store a record in the shared memory OMA at
//      OMA + 4*fault_number = {mismatches[15:0], first detecting
//      pattern[7:0], 7'b0, detected}; count the fault as detected if any
//      pattern exposed it;
// Messages other than DONE arriving while it waits are dropped.
//   4  send INJECT(F_NONE) to restore the circuit, wait for DONE, turn the
//      LED off and raise done.
// The fault list walks the CUT's LUTs in order; per LUT: stuck-at-0 and
// stuck-at-1 on each used input pin, stuck-at-0 and stuck-at-1 on the
// output, then (only if contents_faults is set) one inverted entry for each
// used input combination. Every bus access is a single-beat OPB transfer.
// Patterns go to InBus[0..N-1] (pattern MSB first, GPIO2 bits 31 down);
// responses are GPIO1 bits [6:0] = OutBus[0..6], bits [15:7] = IDBus.
// Doing the flow in a state machine rather than processor software, the
// record layout and the fault ordering are this design's choices.
//
// Lint note: only the message type field of the replies is needed, so the
// other bits of the incoming FSL word are unused.
module bist_engine
  import erace_pkg::*;
#(
  parameter int unsigned N        = 5,
  parameter int unsigned NUM_LUTS = C17_NUM_LUTS,
  parameter logic [NUM_LUTS-1:0][2:0] LUT_INPUTS = C17_LUT_INPUTS,
  parameter logic [8:0]  LUT_BASE = 9'd0,       // column LUT number of the CUT's LUT 0
  parameter logic [31:0] GPIO_IN  = ADDR_GPIO1_A,
  parameter logic [31:0] GPIO_PAT = ADDR_GPIO2_A,
  parameter logic [31:0] GPIO_LED = ADDR_GPIO3_A,
  parameter logic [31:0] OMA_BASE = ADDR_OMA
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [1:0]  tpg_mode,
  input  logic        contents_faults,
  // OPB master
  output opb_req_t    opb_req,
  input  opb_rsp_t    opb_rsp,
  // FSL to the reconfiguration side
  output logic [31:0] fsl_m_data,
  output logic        fsl_m_write,
  input  logic        fsl_m_full,
  // FSL from the reconfiguration side
  input  logic [31:0] fsl_s_data,
  input  logic        fsl_s_exists,
  output logic        fsl_s_read,
  // results
  output logic        busy,
  output logic        done,
  output logic [8:0]  hb_id,
  output logic [15:0] faults_injected,
  output logic [15:0] faults_detected,
  output logic [15:0] detections
);
  typedef enum logic [3:0] {
    S_IDLE, S_LED_ON, S_RD_ID, S_G_INIT, S_G_WR, S_G_RD,
    S_SEND, S_WAIT, S_T_INIT, S_T_WR, S_T_RD, S_REC, S_NEXT,
    S_RESTORE, S_RWAIT, S_LED_OFF
  } state_e;
  state_e state;

  logic [N-1:0] pattern;
  logic         last, tpg_init, tpg_next;
  tpg #(.N(N)) u_tpg (
    .clk, .rst_n, .mode(tpg_mode), .init(tpg_init), .next(tpg_next), .pattern, .last
  );

  logic [6:0]  golden [2**N];
  fault_t      fault;
  logic [8:0]  lut_local;
  logic [15:0] fault_no, det_cnt;
  logic [7:0]  first_pat;
  logic        contents_q;

  // ---- next fault in the list ----
  logic [2:0]  n_in;
  fault_t      nxt;
  logic        nxt_end;
  always_comb begin
    n_in    = (32'(lut_local) < NUM_LUTS) ? LUT_INPUTS[32'(lut_local)] : 3'd0;
    nxt     = fault;
    nxt_end = 1'b0;
    unique case (fault.kind)
      F_IN_SA0:  nxt.kind = F_IN_SA1;
      F_IN_SA1:  if (4'(fault.idx + 4'd1) < 4'(n_in)) begin nxt.kind = F_IN_SA0; nxt.idx = fault.idx + 4'd1; end
                 else begin nxt.kind = F_OUT_SA0; nxt.idx = '0; end
      F_OUT_SA0: nxt.kind = F_OUT_SA1;
      default: begin // F_OUT_SA1 or F_FLIP
        if (fault.kind == F_OUT_SA1 && contents_q) begin
          nxt.kind = F_FLIP; nxt.idx = '0;
        end else if (fault.kind == F_FLIP && 32'(fault.idx) + 1 < (32'd1 << n_in)) begin
          nxt.idx = fault.idx + 4'd1;
        end else if (32'(lut_local) + 1 < NUM_LUTS) begin
          nxt.kind = F_IN_SA0; nxt.idx = '0; nxt.lut = fault.lut + 9'd1;
        end else begin
          nxt_end = 1'b1;
        end
      end
    endcase
  end

  // ---- bus and FSL outputs ----
  always_comb begin
    opb_req  = OPB_REQ_IDLE;
    tpg_init = (state == S_G_INIT) || (state == S_T_INIT);
    tpg_next = 1'b0;
    unique case (state)
      S_LED_ON:  begin opb_req.select = 1'b1; opb_req.abus = GPIO_LED; opb_req.dbus = 32'd1; end
      S_LED_OFF: begin opb_req.select = 1'b1; opb_req.abus = GPIO_LED; opb_req.dbus = 32'd0; end
      S_RD_ID:   begin opb_req.select = 1'b1; opb_req.abus = GPIO_IN;  opb_req.rnw = 1'b1; end
      S_G_WR, S_T_WR: begin
        opb_req.select = 1'b1; opb_req.abus = GPIO_PAT; opb_req.dbus = {pattern, (32-N)'(0)};
      end
      S_G_RD, S_T_RD: begin
        opb_req.select = 1'b1; opb_req.abus = GPIO_IN; opb_req.rnw = 1'b1;
        tpg_next = opb_rsp.xfer_ack && !last;
      end
      S_REC: begin
        opb_req.select = 1'b1;
        opb_req.abus   = OMA_BASE + {14'd0, fault_no, 2'b00};
        opb_req.dbus   = {det_cnt, first_pat, 7'd0, det_cnt != 16'd0};
      end
      default: ;
    endcase
    fsl_m_write = ((state == S_SEND) || (state == S_RESTORE)) && !fsl_m_full;
    fsl_m_data  = {MSG_INJECT, 12'h000, (state == S_RESTORE) ? fault_t'('0) : fault};
    fsl_s_read  = ((state == S_WAIT) || (state == S_RWAIT)) && fsl_s_exists;
    busy        = (state != S_IDLE);
  end

  wire [6:0] resp = opb_rsp.dbus[6:0];

  always_ff @(posedge clk) begin
    if (state == S_G_RD && opb_rsp.xfer_ack) golden[pattern] <= resp;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 1'b0; hb_id <= '0; fault <= '0; lut_local <= '0;
      fault_no <= '0; det_cnt <= '0; first_pat <= '0; contents_q <= 1'b0;
      faults_injected <= '0; faults_detected <= '0; detections <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          done <= 1'b0; contents_q <= contents_faults;
          faults_injected <= '0; faults_detected <= '0; detections <= '0;
          state <= S_LED_ON;
        end
        S_LED_ON: if (opb_rsp.xfer_ack) state <= S_RD_ID;
        S_RD_ID:  if (opb_rsp.xfer_ack) begin hb_id <= opb_rsp.dbus[15:7]; state <= S_G_INIT; end
        S_G_INIT: state <= S_G_WR;
        S_G_WR:   if (opb_rsp.xfer_ack) state <= S_G_RD;
        S_G_RD:   if (opb_rsp.xfer_ack) begin
          if (last) begin
            fault <= '{kind: F_IN_SA0, lut: LUT_BASE, idx: 4'd0};
            lut_local <= '0; fault_no <= '0;
            state <= S_SEND;
          end else state <= S_G_WR;
        end
        S_SEND: if (!fsl_m_full) begin faults_injected <= faults_injected + 16'd1; state <= S_WAIT; end
        S_WAIT: if (fsl_s_exists && fsl_s_data[31:28] == MSG_DONE) state <= S_T_INIT;
        S_T_INIT: begin det_cnt <= '0; first_pat <= '0; state <= S_T_WR; end
        S_T_WR:   if (opb_rsp.xfer_ack) state <= S_T_RD;
        S_T_RD:   if (opb_rsp.xfer_ack) begin
          if (resp != golden[pattern]) begin
            detections <= detections + 16'd1;
            det_cnt    <= det_cnt + 16'd1;
            if (det_cnt == '0) first_pat <= 8'(pattern);
          end
          state <= last ? S_REC : S_T_WR;
        end
        S_REC: if (opb_rsp.xfer_ack) begin
          if (det_cnt != '0) faults_detected <= faults_detected + 16'd1;
          state <= S_NEXT;
        end
        S_NEXT: begin
          fault_no <= fault_no + 16'd1;
          if (nxt_end) state <= S_RESTORE;
          else begin
            if (nxt.lut != fault.lut) lut_local <= lut_local + 9'd1;
            fault <= nxt;
            state <= S_SEND;
          end
        end
        S_RESTORE: if (!fsl_m_full) state <= S_RWAIT;
        S_RWAIT:   if (fsl_s_exists && fsl_s_data[31:28] == MSG_DONE) state <= S_LED_OFF;
        S_LED_OFF: if (opb_rsp.xfer_ack) begin done <= 1'b1; state <= S_IDLE; end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
