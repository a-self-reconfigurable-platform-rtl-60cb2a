// opb_bus: the On-chip Peripheral Bus of one side of the platform, reduced to
// a single master with single-beat transfers.
//
// The master's request is broadcast to every slave; each slave decodes its
// own address range, and the slaves' responses are ORed, as OPB slaves drive
// zeros when not addressed. A bus watchdog asserts timeout if a transfer
// goes unacknowledged for TIMEOUT cycles (the master then sees xfer_ack with
// read data 0 and the timeout flag), so a stray address cannot hang the bus.
// The timeout length is this design's choice.
//
// Lint note: rst_n also disables the one-acknowledge assertion, which lint
// reports as a mixed synchronous/asynchronous use. The slave requests are a
// plain broadcast of the master's request, so they carry no logic.
module opb_bus
  import erace_pkg::*;
#(
  parameter int unsigned N_SLAVES = 4,
  parameter int unsigned TIMEOUT  = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  input  opb_req_t m_req,
  output opb_rsp_t m_rsp,
  output logic     timeout,
  output opb_req_t s_req [N_SLAVES],
  input  opb_rsp_t s_rsp [N_SLAVES]
);
  logic [$clog2(TIMEOUT+1)-1:0] wait_cnt;
  opb_rsp_t ored;

  always_comb begin
    ored = '0;
    for (int unsigned s = 0; s < N_SLAVES; s++) begin
      s_req[s] = m_req;
      ored     = ored | s_rsp[s];
    end
    timeout        = m_req.select && !ored.xfer_ack && (32'(wait_cnt) == TIMEOUT - 1);
    m_rsp.xfer_ack = ored.xfer_ack || timeout;
    m_rsp.dbus     = ored.dbus;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wait_cnt <= '0;
    else if (!m_req.select || m_rsp.xfer_ack) wait_cnt <= '0;
    else wait_cnt <= wait_cnt + 1'b1;
  end

  logic [N_SLAVES-1:0] acks;
  always_comb for (int unsigned s = 0; s < N_SLAVES; s++) acks[s] = s_rsp[s].xfer_ack;

  a_one_ack: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(acks));
endmodule
