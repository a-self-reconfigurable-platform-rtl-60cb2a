// tb_opb_hwicap: the whole HWICAP with the configuration port and memory.
// Writes a frame with a header through the OPB buffer, checks configuration
// memory, reads another frame back into the buffer and compares with
// memory, and checks the transfer times: configure 2 cycles per byte plus
// the commit, readback 2 cycles per byte plus the setup (measured by
// polling STATUS, to within one poll).
module tb_opb_hwicap;
  import erace_pkg::*;
  localparam int FB = 584;
  logic clk = 0, rst_n = 0;
  opb_req_t req; opb_rsp_t rsp;
  logic [7:0] ii, io; logic wn, cen, ib;
  logic mwe; logic [15:0] wf, wbb, rf, rbb; logic [7:0] wd, rd;
  logic [447:0][15:0] lut;
  int checks = 0, failures = 0;
  logic [7:0] fr [FB];
  opb_hwicap dut (.clk, .rst_n, .opb_req(req), .opb_rsp(rsp), .icap_i(ii), .icap_write_n(wn), .icap_ce_n(cen), .icap_o(io), .icap_busy(ib));
  icap_virtex2 icap (.CLK(clk), .CE(cen), .WRITE(wn), .I(ii), .O(io), .BUSY(ib),
    .mem_we(mwe), .mem_wframe(wf), .mem_wbyte(wbb), .mem_wdata(wd), .mem_rframe(rf), .mem_rbyte(rbb), .mem_rdata(rd), .rst_n);
  cfg_memory mem (.clk, .we(mwe), .wframe(wf), .wbyte(wbb), .wdata(wd), .rframe(rf), .rbyte(rbb), .rdata(rd), .lut_init(lut));
  always #5 clk = ~clk;
  `include "tb_opb_tasks.svh"
  task automatic chk(logic [31:0] g, logic [31:0] e, string what);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: got %h exp %h", what, g, e); end
  endtask
  task automatic transfer(int sz, int off, bit rnc, output int cycles);
    logic [31:0] s; time t0;
    opb_write(ADDR_HWICAP + 32'h1000, 32'(sz));
    opb_write(ADDR_HWICAP + 32'h1004, 32'(off));
    opb_write(ADDR_HWICAP + 32'h1008, 32'(rnc));
    t0 = $time;
    do opb_read(ADDR_HWICAP + 32'h100C, s); while (!s[0] && ($time - t0) < 10000000);
    cycles = int'(($time - t0) / 10);
    chk(s[0], 1, "done");
  endtask
  initial begin
    #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int cyc; logic [31:0] d;
    req = '0;
    repeat (2) @(posedge clk); #1; rst_n = 1;
    // frame 0 gets new contents: LUT0..3 become 0x0102, 0x0304 ...
    for (int b = 0; b < FB; b++) fr[b] = 8'(b + 1);
    opb_write(ADDR_HWICAP, {ICAP_CMD_WRITE, 16'd0, 8'h00});
    for (int w = 0; w < FB / 4; w++) opb_write(ADDR_HWICAP + 32'(4 + 4 * w), {fr[4*w], fr[4*w+1], fr[4*w+2], fr[4*w+3]});
    transfer(4 + FB, 0, 0, cyc);
    checks++; if (cyc < 2 * (4 + FB) || cyc > 2 * (4 + FB) + 20) begin failures++; $display("FAIL configure time %0d", cyc); end
    while (ib) @(posedge clk); #1;
    chk(lut[0], 16'h0102, "LUT0 rewritten"); chk(lut[3], 16'h0708, "LUT3 rewritten");
    for (int b = 0; b < FB; b += 11) chk(mem.mem[b], fr[b], "frame 0 byte");
    // frame 5 filled directly in memory, then read back through the HWICAP
    for (int b = 0; b < FB; b++) mem.mem[5 * FB + b] = 8'($urandom);
    opb_write(ADDR_HWICAP, {ICAP_CMD_READ, 16'd5, 8'h00});
    transfer(4, 0, 0, cyc);
    transfer(FB, 4, 1, cyc);
    checks++; if (cyc < 2 * FB || cyc > 2 * FB + 20) begin failures++; $display("FAIL readback time %0d", cyc); end
    for (int w = 0; w < FB / 4; w++) begin
      opb_read(ADDR_HWICAP + 32'(4 + 4 * w), d);
      chk(d, {mem.mem[5*FB+4*w], mem.mem[5*FB+4*w+1], mem.mem[5*FB+4*w+2], mem.mem[5*FB+4*w+3]}, "readback word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
