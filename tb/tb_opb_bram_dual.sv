// tb_opb_bram_dual: words written on one port are read on the other and on
// the same port; addresses outside the 8 KB window are not acknowledged.
module tb_opb_bram_dual;
  import erace_pkg::*;
  logic clk = 0, rst_n = 0;
  opb_req_t req, req_b; opb_rsp_t rsp, rsp_b;
  int checks = 0, failures = 0;
  logic [31:0] ref_m [2048];
  bit written [2048];
  opb_bram_dual dut (.clk, .rst_n, .req_a(req), .rsp_a(rsp), .req_b(req_b), .rsp_b(rsp_b));
  always #5 clk = ~clk;
  `include "tb_opb_tasks.svh"
  task automatic read_b(logic [31:0] a, output logic [31:0] d);
    req_b.select = 1; req_b.rnw = 1; req_b.abus = a;
    @(posedge clk); #1; d = rsp_b.dbus;
    checks++; if (!rsp_b.xfer_ack) begin failures++; $display("FAIL port B ack"); end
    @(posedge clk); #1; req_b = '0;
  endtask
  task automatic write_b(logic [31:0] a, logic [31:0] d);
    req_b.select = 1; req_b.rnw = 0; req_b.abus = a; req_b.dbus = d;
    do @(posedge clk); while (!rsp_b.xfer_ack);
    #1; req_b = '0;
  endtask
  task automatic chk(logic [31:0] g, logic [31:0] e, string what);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: got %h exp %h", what, g, e); end
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [31:0] d;
    req = '0; req_b = '0;
    repeat (2) @(posedge clk); #1; rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int w; w = $urandom_range(2047);
      ref_m[w] = $urandom; written[w] = 1;
      opb_write(ADDR_OMA + 32'(4 * w), ref_m[w]);
    end
    for (int w = 0; w < 2048; w++) if (written[w]) begin
      read_b(ADDR_OMA + 32'(4 * w), d); chk(d, ref_m[w], "B reads A's write");
      opb_read(ADDR_OMA + 32'(4 * w), d); chk(d, ref_m[w], "A reads back");
    end
    // port B writes, port A reads
    for (int t = 0; t < 100; t++) begin
      int w; logic [31:0] v; w = $urandom_range(2047); v = $urandom;
      write_b(ADDR_OMA + 32'(4 * w), v);
      opb_read(ADDR_OMA + 32'(4 * w), d); chk(d, v, "A reads B's write");
    end
    req.select = 1; req.rnw = 1; req.abus = ADDR_OMA + 32'd8192;
    repeat (3) begin @(posedge clk); #1; chk(rsp.xfer_ack, 0, "no ack outside"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
