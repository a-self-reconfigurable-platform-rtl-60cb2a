// opb_gpio: general purpose I/O peripheral on an OPB bus.
//
// One 32-bit data register at BASE_ADDR (offset 0) of a 512-byte window.
// With IS_INPUT = 0 the register is written by the bus and drives gpio_out
// (reads return it). With IS_INPUT = 1 the register samples gpio_in every
// clock and reads return the sample; writes are ignored and gpio_out stays 0.
// The platform uses outputs to drive the active module's InBus and the LED,
// and one input to read its OutBus and IDBus. Every access is acknowledged
// one cycle after select. Register layout is this design's choice.
module opb_gpio
  import erace_pkg::*;
#(
  parameter logic [31:0] BASE_ADDR = ADDR_GPIO1_A,
  parameter int unsigned WIDTH     = 32,
  parameter bit          IS_INPUT  = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  opb_req_t         opb_req,
  output opb_rsp_t         opb_rsp,
  input  logic [WIDTH-1:0] gpio_in,
  output logic [WIDTH-1:0] gpio_out
);
  wire hit = opb_req.select && (opb_req.abus[31:9] == BASE_ADDR[31:9]);
  logic             ack_q;
  logic [WIDTH-1:0] data_q, rd_q;
  wire acc = hit && !ack_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_q <= 1'b0; data_q <= '0; rd_q <= '0;
    end else begin
      ack_q <= acc;
      if (IS_INPUT)                               data_q <= gpio_in;
      else if (acc && !opb_req.rnw && opb_req.abus[8:2] == '0) data_q <= opb_req.dbus[WIDTH-1:0];
      rd_q <= (acc && opb_req.rnw && opb_req.abus[8:2] == '0) ? data_q : '0;
    end
  end

  always_comb begin
    gpio_out         = IS_INPUT ? '0 : data_q;
    opb_rsp.xfer_ack = ack_q;
    opb_rsp.dbus     = ack_q ? 32'(rd_q) : 32'h0;
  end
endmodule
