// tb_hwicap_opb_ctrl: OPB accesses to the storage buffer (through a BRAM)
// and to the SIZE/OFFSET/RNC/STATUS registers; the start pulse and the
// values it carries; the sticky done bit; starts ignored while busy; no
// acknowledge outside the window; acknowledge one cycle after select.
module tb_hwicap_opb_ctrl;
  import erace_pkg::*;
  logic clk = 0, rst_n = 0;
  opb_req_t req; opb_rsp_t rsp;
  logic enb, web; logic [8:0] addrb; logic [31:0] dib, dob;
  logic start, rnc; logic [10:0] astart; logic [11:0] size;
  logic send_done = 0, ctrl_busy = 0;
  int checks = 0, failures = 0, starts = 0;
  logic [31:0] ref_buf [512];
  hwicap_opb_ctrl dut (.clk, .rst_n, .opb_req(req), .opb_rsp(rsp), .bram_enb(enb), .bram_web(web),
    .bram_addrb(addrb), .bram_dib(dib), .bram_dob(dob), .start_icap(start), .rnc_reg(rnc),
    .addr_start(astart), .size_reg(size), .send_done, .icap_busy_ctrl(ctrl_busy));
  hwicap_bram bram (.clk, .ena(1'b0), .wea(1'b0), .addra(11'd0), .dia(8'd0), .doa(),
    .enb, .web, .addrb, .dib, .dob);
  always #5 clk = ~clk;
  always @(posedge clk) if (start) starts++;
  `include "tb_opb_tasks.svh"
  task automatic chk(logic [31:0] g, logic [31:0] e, string what);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: got %h exp %h", what, g, e); end
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [31:0] d;
    req = '0;
    repeat (2) @(posedge clk); #1; rst_n = 1;
    // ack timing: exactly one cycle after select
    req.select = 1; req.rnw = 1; req.abus = ADDR_HWICAP + 32'h100C;
    #0; chk(rsp.xfer_ack, 0, "no ack in select cycle");
    @(posedge clk); #1; chk(rsp.xfer_ack, 1, "ack next cycle");
    @(posedge clk); #1; chk(rsp.xfer_ack, 0, "single ack"); req = '0;
    // buffer
    for (int w = 0; w < 512; w += 5) begin ref_buf[w] = $urandom; opb_write(ADDR_HWICAP + 32'(4 * w), ref_buf[w]); end
    for (int w = 0; w < 512; w += 5) begin opb_read(ADDR_HWICAP + 32'(4 * w), d); chk(d, ref_buf[w], "buffer word"); end
    // registers
    opb_write(ADDR_HWICAP + 32'h1000, 32'd588); opb_write(ADDR_HWICAP + 32'h1004, 32'd4);
    opb_read(ADDR_HWICAP + 32'h1000, d); chk(d, 588, "SIZE");
    opb_read(ADDR_HWICAP + 32'h1004, d); chk(d, 4, "OFFSET");
    chk(starts, 0, "no start yet");
    // start readback
    req.select = 1; req.rnw = 0; req.abus = ADDR_HWICAP + 32'h1008; req.dbus = 1;
    @(posedge clk); #1; chk(start, 1, "start pulse with ack"); chk(rnc, 1, "rnc"); chk(astart, 4, "offset"); chk(size, 588, "size");
    @(posedge clk); #1; req = '0; chk(start, 0, "start one cycle");
    ctrl_busy = 1;
    opb_read(ADDR_HWICAP + 32'h100C, d); chk(d, 32'h2, "STATUS busy, not done");
    opb_write(ADDR_HWICAP + 32'h1008, 0); chk(starts, 1, "start ignored while busy");
    send_done = 1; @(posedge clk); #1; send_done = 0; ctrl_busy = 0;
    opb_read(ADDR_HWICAP + 32'h100C, d); chk(d, 32'h1, "STATUS done");
    opb_read(ADDR_HWICAP + 32'h100C, d); chk(d, 32'h1, "done sticky");
    opb_write(ADDR_HWICAP + 32'h1008, 0); chk(starts, 2, "second start"); chk(rnc, 0, "rnc configure");
    opb_read(ADDR_HWICAP + 32'h100C, d); chk(d, 32'h0, "done cleared by start");
    // outside the window: no ack
    req.select = 1; req.rnw = 1; req.abus = 32'h0007_0000;
    repeat (3) begin @(posedge clk); #1; chk(rsp.xfer_ack, 0, "no ack outside"); end
    req = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
