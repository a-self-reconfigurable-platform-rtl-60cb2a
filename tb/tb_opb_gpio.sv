// tb_opb_gpio: an output GPIO (write drives the pins, read returns the
// register, other addresses not acknowledged) and an input GPIO (read
// returns the sampled pins, writes have no effect); acknowledge one cycle
// after select.
module tb_opb_gpio;
  import erace_pkg::*;
  logic clk = 0, rst_n = 0;
  opb_req_t req; opb_rsp_t rsp, rsp_o, rsp_i;
  logic [31:0] out_o, in_i, out_i;
  int checks = 0, failures = 0;
  opb_gpio #(.BASE_ADDR(32'h0003_0800), .WIDTH(32), .IS_INPUT(1'b0)) dut_o (.clk, .rst_n, .opb_req(req), .opb_rsp(rsp_o), .gpio_in(32'h0), .gpio_out(out_o));
  opb_gpio #(.BASE_ADDR(32'h0003_0200), .WIDTH(32), .IS_INPUT(1'b1)) dut_i (.clk, .rst_n, .opb_req(req), .opb_rsp(rsp_i), .gpio_in(in_i), .gpio_out(out_i));
  always_comb rsp = rsp_o | rsp_i;
  always #5 clk = ~clk;
  `include "tb_opb_tasks.svh"
  task automatic chk(logic [31:0] g, logic [31:0] e, string what);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: got %h exp %h", what, g, e); end
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [31:0] d;
    req = '0; in_i = 0;
    repeat (2) @(posedge clk); #1; rst_n = 1;
    chk(out_o, 0, "reset value");
    for (int t = 0; t < 50; t++) begin
      logic [31:0] v; v = $urandom;
      opb_write(32'h0003_0800, v); chk(out_o, v, "output pins");
      opb_read(32'h0003_0800, d); chk(d, v, "output readback");
      in_i = $urandom; @(posedge clk); #1;
      opb_read(32'h0003_0200, d); chk(d, in_i, "input read");
      opb_write(32'h0003_0200, 32'hFFFF_FFFF); chk(out_i, 0, "input gpio has no outputs");
    end
    req.select = 1; req.rnw = 1; req.abus = 32'h0003_0800;
    #0; chk(rsp.xfer_ack, 0, "no ack in select cycle");
    @(posedge clk); #1; chk(rsp.xfer_ack, 1, "ack next cycle");
    @(posedge clk); #1; chk(rsp.xfer_ack, 0, "one ack"); req = '0;
    req.select = 1; req.abus = 32'h0003_0400;
    repeat (3) begin @(posedge clk); #1; chk(rsp.xfer_ack, 0, "no ack elsewhere"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
