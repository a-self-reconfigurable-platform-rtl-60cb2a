// tb_icap_virtex2: writes frames through the port (header + data), checks
// the configuration memory and the LUT vectors, reads frames back, and
// checks that BUSY lasts FRAME_BYTES cycles after a frame write and
// READ_SETUP cycles after a read header, and that writes during BUSY are
// ignored.
module tb_icap_virtex2;
  import erace_pkg::*;
  localparam int FB = 584, NF = 22, RS = 8;
  logic clk = 0, rst_n = 0, ce = 1, wr = 1, busy; logic [7:0] di, dout;
  logic mem_we; logic [15:0] wf, wbb, rf, rbb; logic [7:0] wd, rdd;
  logic [447:0][15:0] lut;
  int checks = 0, failures = 0;
  logic [7:0] frame_data [FB];
  icap_virtex2 dut (.CLK(clk), .CE(ce), .WRITE(wr), .I(di), .O(dout), .BUSY(busy),
    .mem_we, .mem_wframe(wf), .mem_wbyte(wbb), .mem_wdata(wd), .mem_rframe(rf), .mem_rbyte(rbb), .mem_rdata(rdd), .rst_n);
  cfg_memory mem (.clk, .we(mem_we), .wframe(wf), .wbyte(wbb), .wdata(wd), .rframe(rf), .rbyte(rbb), .rdata(rdd), .lut_init(lut));
  always #5 clk = ~clk;
  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask
  task automatic wbyte(logic [7:0] b);
    ce = 0; wr = 0; di = b; @(posedge clk); #1; ce = 1;
  endtask
  initial begin
    #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int n;
    di = 0;
    repeat (3) @(posedge clk); #1; rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      int frame; frame = (f == 0) ? 0 : $urandom_range(NF - 1);
      for (int b = 0; b < FB; b++) frame_data[b] = 8'($urandom);
      wbyte(ICAP_CMD_WRITE); wbyte(8'(frame >> 8)); wbyte(8'(frame)); wbyte(8'h00);
      for (int b = 0; b < FB; b++) wbyte(frame_data[b]);
      // busy for FB cycles; a write now must be ignored
      n = 0;
      chk(busy, 1, "busy after frame");
      ce = 0; wr = 0; di = 8'hEE;
      while (busy) begin @(posedge clk); #1; n++; end
      ce = 1;
      chk(n, FB, "commit busy cycles");
      if (frame == 0) chk(lut[1], {frame_data[2], frame_data[3]}, "LUT1 vector from frame 0");
      for (int b = 0; b < FB; b += 13) begin
        chk(mem.mem[frame * FB + b], frame_data[b], "memory byte");
      end
      // readback
      wbyte(ICAP_CMD_READ); wbyte(8'(frame >> 8)); wbyte(8'(frame)); wbyte(8'h00);
      n = 0; while (busy) begin @(posedge clk); #1; n++; end
      chk(n, RS, "read setup busy cycles");
      for (int b = 0; b < FB; b++) begin
        ce = 0; wr = 1; @(posedge clk); #1; ce = 1;
        if (b % 7 == 0) chk(dout, frame_data[b], $sformatf("readback byte %0d", b));
      end
    end
    // the stray 0xEE written while busy must not have started a header:
    // a fresh write header works right away
    wbyte(ICAP_CMD_READ); wbyte(0); wbyte(0); wbyte(0);
    chk(busy, 1, "header accepted after ignored byte");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
