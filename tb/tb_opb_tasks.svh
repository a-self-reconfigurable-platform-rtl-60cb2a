// Single-beat OPB master tasks shared by testbenches. Expects signals
// clk, req (opb_req_t), rsp (opb_rsp_t), checks, failures in scope.
task automatic opb_write(logic [31:0] a, logic [31:0] d);
  int n; n = 0;
  req.select = 1; req.rnw = 0; req.abus = a; req.dbus = d;
  do begin @(posedge clk); #1; n++; end while (!rsp.xfer_ack && n < 100);
  @(posedge clk); #1;  // ack seen at this edge
  req = '0;
endtask
task automatic opb_read(logic [31:0] a, output logic [31:0] d);
  int n; n = 0;
  req.select = 1; req.rnw = 1; req.abus = a; req.dbus = '0;
  @(posedge clk); #1;
  while (!rsp.xfer_ack && n < 100) begin @(posedge clk); #1; n++; end
  d = rsp.dbus;
  @(posedge clk); #1;
  req = '0;
endtask
