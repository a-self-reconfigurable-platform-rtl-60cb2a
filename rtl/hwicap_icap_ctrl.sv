// hwicap_icap_ctrl: the transfer engine of the HWICAP. On start_icap it moves
// 'size' bytes between the storage buffer (BRAM port A, from byte address
// addr_start upward) and the configuration port:
//   rnc = 0 (configure): BRAM -> ICAP, two cycles per byte (fetch, then
//           write strobe; the strobe waits while BUSY is high);
//   rnc = 1 (readback):  ICAP -> BRAM, two cycles per byte (read strobe
//           when BUSY is low, then store the byte into the BRAM).
// send_done pulses for one cycle when the last byte has moved; busy is high
// from start to that pulse. start_icap is ignored while busy. WRITE is held
// at the transfer's direction for the whole transfer and CE strobes once per
// byte. The two-cycle byte rhythm is this design's choice.
module hwicap_icap_ctrl (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start_icap,
  input  logic        rnc,
  input  logic [10:0] addr_start,
  input  logic [11:0] size,
  output logic        send_done,
  output logic        busy,
  // BRAM port A
  output logic        bram_ena,
  output logic        bram_wea,
  output logic [10:0] bram_addr,
  output logic [7:0]  bram_din,
  input  logic [7:0]  bram_dout,
  // configuration port
  output logic [7:0]  icap_in,
  output logic        icap_we_n,
  output logic        icap_ce_n,
  input  logic [7:0]  icap_out,
  input  logic        icap_busy
);
  typedef enum logic [2:0] {S_IDLE, S_C_FETCH, S_C_SEND, S_R_REQ, S_R_CAP, S_DONE} state_e;
  state_e      state;
  logic [10:0] addr;
  logic [11:0] left;
  logic        rnc_q;

  always_comb begin
    bram_ena  = 1'b0;
    bram_wea  = 1'b0;
    bram_addr = addr;
    bram_din  = icap_out;
    icap_in   = bram_dout;
    icap_ce_n = 1'b1;
    icap_we_n = (state == S_IDLE) ? 1'b1 : rnc_q;
    send_done = (state == S_DONE);
    busy      = (state != S_IDLE);
    unique case (state)
      S_C_FETCH: bram_ena = 1'b1;
      S_C_SEND:  icap_ce_n = icap_busy;
      S_R_REQ:   icap_ce_n = icap_busy;
      S_R_CAP:   begin bram_ena = 1'b1; bram_wea = 1'b1; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; addr <= '0; left <= '0; rnc_q <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start_icap) begin
          addr  <= addr_start;
          left  <= size;
          rnc_q <= rnc;
          if (size == '0) state <= S_DONE;
          else            state <= rnc ? S_R_REQ : S_C_FETCH;
        end
        S_C_FETCH: state <= S_C_SEND;
        S_C_SEND: if (!icap_busy) begin
          addr <= addr + 11'd1;
          left <= left - 12'd1;
          state <= (left == 12'd1) ? S_DONE : S_C_FETCH;
        end
        S_R_REQ: if (!icap_busy) state <= S_R_CAP;
        S_R_CAP: begin
          addr <= addr + 11'd1;
          left <= left - 12'd1;
          state <= (left == 12'd1) ? S_DONE : S_R_REQ;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
