// opb_hwicap: hardware ICAP peripheral on the reconfiguration-side OPB.
//
// Lets the reconfiguration side read and rewrite single configuration frames
// at OPB clock rate. It is built, as in the classic HWICAP, from three parts:
// an OPB controller (register decoder, hwicap_opb_ctrl), a storage buffer of
// one 16 Kbit dual-port block RAM (hwicap_bram) large enough for a frame, and
// an ICAP controller (hwicap_icap_ctrl) that streams bytes between the buffer
// and the configuration port. The configuration port itself (icap_virtex2)
// stays outside, at the top, as the device primitive does.
//
// A frame is changed by read-modify-write: put a READ header in the buffer
// and send it (configure, size 4); read the frame back into the buffer
// (readback, size FRAME_BYTES, offset 4); modify words through the OPB; put
// a WRITE header in front and send header + frame (configure, size
// 4 + FRAME_BYTES). Register map: see hwicap_opb_ctrl.
//
// Lint note: the reset net reaches assertions in the submodules, which lint
// reports as a mixed synchronous/asynchronous use.
module opb_hwicap
  import erace_pkg::*;
#(
  parameter logic [31:0] BASE_ADDR = ADDR_HWICAP
) (
  input  logic       clk,
  input  logic       rst_n,
  input  opb_req_t   opb_req,
  output opb_rsp_t   opb_rsp,
  output logic [7:0] icap_i,
  output logic       icap_write_n,
  output logic       icap_ce_n,
  input  logic [7:0] icap_o,
  input  logic       icap_busy
);
  logic        enb, web, ena, wea;
  logic [8:0]  addrb;
  logic [10:0] addra, addr_start;
  logic [31:0] dib, dob;
  logic [7:0]  dia, doa;
  logic        start_icap, rnc, send_done, busy;
  logic [11:0] size;

  hwicap_opb_ctrl #(.BASE_ADDR(BASE_ADDR)) u_opb (
    .clk, .rst_n, .opb_req, .opb_rsp,
    .bram_enb(enb), .bram_web(web), .bram_addrb(addrb), .bram_dib(dib), .bram_dob(dob),
    .start_icap, .rnc_reg(rnc), .addr_start, .size_reg(size),
    .send_done, .icap_busy_ctrl(busy)
  );

  hwicap_icap_ctrl u_icap (
    .clk, .rst_n, .start_icap, .rnc, .addr_start, .size, .send_done, .busy,
    .bram_ena(ena), .bram_wea(wea), .bram_addr(addra), .bram_din(dia), .bram_dout(doa),
    .icap_in(icap_i), .icap_we_n(icap_write_n), .icap_ce_n, .icap_out(icap_o), .icap_busy
  );

  hwicap_bram u_bram (
    .clk, .ena, .wea, .addra, .dia, .doa, .enb, .web, .addrb, .dib, .dob
  );
endmodule
