// tb_opb_bus: the request reaches every slave, responses are ORed, and an
// unanswered transfer is ended by the timeout after 16 cycles.
module tb_opb_bus;
  import erace_pkg::*;
  logic clk = 0, rst_n = 0, to;
  opb_req_t req; opb_rsp_t rsp;
  opb_req_t sreq [3]; opb_rsp_t srsp [3];
  int checks = 0, failures = 0;
  opb_bus #(.N_SLAVES(3)) dut (.clk, .rst_n, .m_req(req), .m_rsp(rsp), .timeout(to), .s_req(sreq), .s_rsp(srsp));
  always #5 clk = ~clk;
  task automatic chk(logic [31:0] g, logic [31:0] e, string what);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: got %h exp %h", what, g, e); end
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int n;
    req = '0; foreach (srsp[s]) srsp[s] = '0;
    repeat (2) @(posedge clk); #1; rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int s; logic [31:0] v;
      s = $urandom_range(2); v = $urandom;
      req = '{select: 1'b1, rnw: 1'b1, abus: $urandom, dbus: $urandom};
      #1;
      for (int k = 0; k < 3; k++) chk(sreq[k], req, "broadcast");
      srsp[s] = '{xfer_ack: 1'b1, dbus: v}; #1;
      chk(rsp.xfer_ack, 1, "ack through"); chk(rsp.dbus, v, "data through"); chk(to, 0, "no timeout");
      @(posedge clk); #1; srsp[s] = '0; req = '0;
    end
    // nobody answers
    #1; req.select = 1; req.abus = 32'hDEAD_0000; n = 0; #1;
    while (!rsp.xfer_ack && n < 100) begin @(posedge clk); #1; n++; end
    chk(to, 1, "timeout flag"); chk(n, 15, "timeout after 16 cycles");
    @(posedge clk); #1; req = '0; #1; chk(to, 0, "timeout clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
