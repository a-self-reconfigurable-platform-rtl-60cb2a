// tb_rcfg_engine: the reconfiguration task against the real HWICAP,
// configuration port and memory. The testbench plays the FSL partner: it
// sends INJECT messages (random kind, index and LUT, including a LUT in the
// second frame) and checks after each DONE that the target LUT holds the
// faulty vector, that every other LUT holds its original vector (so the
// previous fault was undone), that the LED shows a fault in place, and the
// number of read-modify-writes. INJECT(F_NONE) must restore everything.
module tb_rcfg_engine;
  import erace_pkg::*;
  import c17_ref_pkg::*;
  localparam int FB = 584;
  logic clk = 0, rst_n = 0;
  logic [31:0] s_data = 0, m_data; logic s_exists = 0, s_read, m_write, fault_active;
  logic [15:0] rmw;
  opb_req_t req; opb_rsp_t rsp; opb_req_t sreq [2]; opb_rsp_t srsp [2];
  logic [7:0] ii, io; logic wn, cen, ib, to;
  logic mwe; logic [15:0] wf, wbb, rf, rbb; logic [7:0] wd, rd;
  logic [447:0][15:0] lut, orig;
  logic [0:0] led;
  int checks = 0, failures = 0;

  rcfg_engine dut (.clk, .rst_n, .fsl_s_data(s_data), .fsl_s_exists(s_exists), .fsl_s_read(s_read),
    .fsl_m_data(m_data), .fsl_m_write(m_write), .fsl_m_full(1'b0), .opb_req(req), .opb_rsp(rsp),
    .fault_active, .rmw_count(rmw));
  opb_bus #(.N_SLAVES(2)) bus (.clk, .rst_n, .m_req(req), .m_rsp(rsp), .timeout(to), .s_req(sreq), .s_rsp(srsp));
  opb_gpio #(.BASE_ADDR(ADDR_GPIO_R), .WIDTH(1)) gpio (.clk, .rst_n, .opb_req(sreq[0]), .opb_rsp(srsp[0]), .gpio_in(1'b0), .gpio_out(led));
  opb_hwicap hw (.clk, .rst_n, .opb_req(sreq[1]), .opb_rsp(srsp[1]), .icap_i(ii), .icap_write_n(wn), .icap_ce_n(cen), .icap_o(io), .icap_busy(ib));
  icap_virtex2 icap (.CLK(clk), .CE(cen), .WRITE(wn), .I(ii), .O(io), .BUSY(ib),
    .mem_we(mwe), .mem_wframe(wf), .mem_wbyte(wbb), .mem_wdata(wd), .mem_rframe(rf), .mem_rbyte(rbb), .mem_rdata(rd), .rst_n);
  cfg_memory mem (.clk, .we(mwe), .wframe(wf), .wbyte(wbb), .wdata(wd), .rframe(rf), .rbyte(rbb), .rdata(rd), .lut_init(lut));
  always #5 clk = ~clk;

  task automatic chk(logic [31:0] g, logic [31:0] e, string what);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: got %h exp %h", what, g, e); end
  endtask
  task automatic send(logic [15:0] f, output logic [31:0] reply);
    int n;
    s_data = {MSG_INJECT, 12'h0, f}; s_exists = 1;
    do @(posedge clk); while (!s_read);
    #1; s_exists = 0; n = 0;
    while (!m_write && n < 200000) begin @(posedge clk); #1; n++; end
    reply = m_data;
    @(posedge clk); #1;
    while (ib) begin @(posedge clk); #1; end   // let the last frame commit
  endtask
  function automatic bit luts_equal_except(int skip);
    for (int j = 0; j < 448; j++) if (j != skip && lut[j] !== orig[j]) return 0;
    return 1;
  endfunction

  initial begin
    #50000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [31:0] reply; int prev_rmw; bit had;
    repeat (2) @(posedge clk); #1; rst_n = 1;
    orig = lut;
    chk(orig[0], 16'h8F8F, "power-up LUT0");
    had = 0;
    for (int t = 0; t < 14; t++) begin
      int k, ix, l; fault_t f;
      k = 1 + $urandom_range(4);
      ix = (k == 1 || k == 2) ? $urandom_range(3) : (k == 5 ? $urandom_range(15) : 0);
      l = (t % 5 == 4) ? 300 : $urandom_range(3);
      f = '{kind: fault_kind_e'(k), lut: 9'(l), idx: 4'(ix)};
      prev_rmw = rmw;
      send(f, reply);
      chk(reply, {MSG_DONE, 12'h0, f}, "DONE reply echoes fault");
      chk(lut[l], ref_inject(orig[l], k, ix), $sformatf("faulty vector lut %0d kind %0d idx %0d", l, k, ix));
      chk(luts_equal_except(l), 1, "other LUTs original");
      chk(led, 1, "LED on with fault");
      chk(rmw - prev_rmw, had ? 2 : 1, "read-modify-writes");
      had = 1;
    end
    send('0, reply);
    chk(reply, {MSG_DONE, 28'h0}, "DONE for none");
    chk(luts_equal_except(-1), 1, "all restored");
    chk(led, 0, "LED off");
    chk(fault_active, 0, "no fault active");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
