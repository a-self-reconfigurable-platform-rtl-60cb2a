// icap_virtex2: behavioural model of the internal configuration access port,
// with the primitive's ports (I[7:0], O[7:0], WRITE, CE, CLK, BUSY) plus the
// port to the configuration memory it writes and reads.
//
// CE and WRITE are active low: a byte is written on a rising CLK edge with
// CE=0, WRITE=0, BUSY=0, and read with CE=0, WRITE=1, BUSY=0; the byte read
// appears on O after that edge and stays until the next read.
//
// The real bitstream packet format is not modelled. Instead every transfer
// starts with a 4-byte header {cmd, frame_hi, frame_lo, 0}:
//   ICAP_CMD_WRITE: FRAME_BYTES data bytes follow; they are collected in a
//     frame data register and then copied into the frame one byte per cycle,
//     BUSY high during the copy (FRAME_BYTES cycles).
//   ICAP_CMD_READ : BUSY is high for READ_SETUP cycles, then the next
//     FRAME_BYTES reads return the frame's bytes in order.
// Unknown commands are ignored. Header format, setup time and the commit
// copy are this model's own choices.
module icap_virtex2
  import erace_pkg::*;
#(
  parameter int unsigned FRAME_BYTES = 584,
  parameter int unsigned READ_SETUP  = 8
) (
  input  logic        CLK,
  input  logic        CE,     // active low
  input  logic        WRITE,  // active low: 0 write, 1 read
  input  logic [7:0]  I,
  output logic [7:0]  O,
  output logic        BUSY,
  // configuration memory side
  output logic        mem_we,
  output logic [15:0] mem_wframe,
  output logic [15:0] mem_wbyte,
  output logic [7:0]  mem_wdata,
  output logic [15:0] mem_rframe,
  output logic [15:0] mem_rbyte,
  input  logic [7:0]  mem_rdata,
  input  logic        rst_n
);
  typedef enum logic [2:0] {S_HDR, S_WDATA, S_COMMIT, S_RSETUP, S_RDATA} state_e;
  state_e      state;
  logic [1:0]  hcnt;
  logic [7:0]  cmd, fhi;
  logic [15:0] frame;
  logic [15:0] cnt;
  logic [7:0]  fdr [FRAME_BYTES];

  wire wr_cyc = !CE && !WRITE && !BUSY;
  wire rd_cyc = !CE &&  WRITE && !BUSY;

  always_comb BUSY = (state == S_COMMIT) || (state == S_RSETUP);

  always_comb begin
    mem_we     = (state == S_COMMIT);
    mem_wframe = frame;
    mem_wbyte  = cnt;
    mem_wdata  = fdr[cnt[$clog2(FRAME_BYTES)-1:0]];
    mem_rframe = frame;
    mem_rbyte  = cnt;
  end

  always_ff @(posedge CLK or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_HDR; hcnt <= '0; cmd <= '0; fhi <= '0; frame <= '0; cnt <= '0; O <= '0;
    end else begin
      unique case (state)
        S_HDR: if (wr_cyc) begin
          hcnt <= hcnt + 2'd1;
          unique case (hcnt)
            2'd0: cmd <= I;
            2'd1: fhi <= I;
            2'd2: frame <= {fhi, I};
            2'd3: begin
              cnt <= '0;
              if (cmd == ICAP_CMD_WRITE)     state <= S_WDATA;
              else if (cmd == ICAP_CMD_READ) state <= S_RSETUP;
            end
          endcase
        end
        S_WDATA: if (wr_cyc) begin
          fdr[cnt[$clog2(FRAME_BYTES)-1:0]] <= I;
          if (32'(cnt) == FRAME_BYTES - 1) begin cnt <= '0; state <= S_COMMIT; end
          else cnt <= cnt + 16'd1;
        end
        S_COMMIT: begin
          if (32'(cnt) == FRAME_BYTES - 1) begin cnt <= '0; state <= S_HDR; end
          else cnt <= cnt + 16'd1;
        end
        S_RSETUP: begin
          if (32'(cnt) == READ_SETUP - 1) begin cnt <= '0; state <= S_RDATA; end
          else cnt <= cnt + 16'd1;
        end
        S_RDATA: if (rd_cyc) begin
          O <= mem_rdata;
          if (32'(cnt) == FRAME_BYTES - 1) begin cnt <= '0; state <= S_HDR; end
          else cnt <= cnt + 16'd1;
        end
        default: state <= S_HDR;
      endcase
    end
  end
endmodule
