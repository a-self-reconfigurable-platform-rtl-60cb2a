// fsl_fifo: a Fast Simplex Link, the unidirectional point-to-point FIFO
// channel that carries messages between the application side and the
// reconfiguration side.
//
// Master side: m_write pushes {m_control, m_data} unless m_full. Slave side:
// first-word-fall-through; s_exists says s_data/s_control hold the oldest
// entry, and s_read pops it. A push and a pop may happen in the same cycle.
// DEPTH entries (power of two). Depth 16 and the FWFT behaviour are this
// design's choices.
//
// Lint note: rst_n also disables the overflow/underflow assertions, which
// lint reports as a mixed synchronous/asynchronous use.
module fsl_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] m_data,
  input  logic             m_control,
  input  logic             m_write,
  output logic             m_full,
  output logic [WIDTH-1:0] s_data,
  output logic             s_control,
  input  logic             s_read,
  output logic             s_exists
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [WIDTH:0]  mem [DEPTH];
  logic [AW:0]     wr_ptr, rd_ptr;

  wire push = m_write && !m_full;
  wire pop  = s_read && s_exists;

  always_comb begin
    s_exists = (wr_ptr != rd_ptr);
    m_full   = (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]) && (wr_ptr[AW] != rd_ptr[AW]);
    {s_control, s_data} = mem[rd_ptr[AW-1:0]];
  end

  always_ff @(posedge clk) if (push) mem[wr_ptr[AW-1:0]] <= {m_control, m_data};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin wr_ptr <= '0; rd_ptr <= '0; end
    else begin
      if (push) wr_ptr <= wr_ptr + 1'b1;
      if (pop)  rd_ptr <= rd_ptr + 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) m_write |-> !m_full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) s_read |-> s_exists);
endmodule
