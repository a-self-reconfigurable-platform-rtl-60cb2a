// tb_hwicap_icap_ctrl: drives configure and readback transfers against a
// testbench BRAM and a testbench configuration port that raises BUSY at
// random. Checks byte order and count in both directions, that nothing is
// strobed while BUSY, the one-cycle send_done, WRITE level, and the
// two-cycles-per-byte rate when the port is never busy.
module tb_hwicap_icap_ctrl;
  logic clk = 0, rst_n = 0, start = 0, rnc = 0, done, busy;
  logic [10:0] addr_start = 0; logic [11:0] size = 0;
  logic ena, wea; logic [10:0] addra; logic [7:0] din, dout;
  logic [7:0] icap_in, icap_out; logic we_n, ce_n, icap_busy = 0;
  logic [7:0] bram [2048];
  logic [7:0] got [$];
  logic [7:0] rb_src [$];
  int checks = 0, failures = 0, strobes_while_busy = 0, busy_random = 0;
  hwicap_icap_ctrl dut (.clk, .rst_n, .start_icap(start), .rnc, .addr_start, .size, .send_done(done), .busy,
    .bram_ena(ena), .bram_wea(wea), .bram_addr(addra), .bram_din(din), .bram_dout(dout),
    .icap_in, .icap_we_n(we_n), .icap_ce_n(ce_n), .icap_out, .icap_busy);
  always #5 clk = ~clk;
  // testbench BRAM: synchronous, read-before-write
  always_ff @(posedge clk) if (ena) begin dout <= bram[addra]; if (wea) bram[addra] <= din; end
  // testbench configuration port
  always_ff @(posedge clk) begin
    if (!ce_n && icap_busy) strobes_while_busy++;
    if (!ce_n && !icap_busy && !we_n) got.push_back(icap_in);
    if (!ce_n && !icap_busy &&  we_n) icap_out <= rb_src.pop_front();
    icap_busy <= busy_random ? ($urandom_range(3) == 0) : 1'b0;
  end
  task automatic chk(logic [31:0] g, logic [31:0] e, string what);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: got %h exp %h", what, g, e); end
  endtask
  task automatic run(bit r, int off, int sz, output int cycles, output int done_pulses);
    rnc = r; addr_start = 11'(off); size = 12'(sz);
    start = 1; @(posedge clk); #1; start = 0;
    cycles = 1; done_pulses = 0;
    chk(we_n, r, "WRITE level during transfer");
    while (busy) begin if (done) done_pulses++; @(posedge clk); #1; cycles++; end
  endtask
  initial begin
    #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int cyc, dp;
    for (int a = 0; a < 2048; a++) bram[a] = 8'($urandom);
    repeat (2) @(posedge clk); #1; rst_n = 1;
    // configure, port never busy: 2 cycles per byte
    got.delete(); run(0, 100, 50, cyc, dp);
    chk(got.size(), 50, "configure byte count");
    for (int i = 0; i < got.size(); i++) chk(got[i], bram[100 + i], "configure byte");
    chk(dp, 1, "one done pulse");
    chk(cyc, 2 * 50 + 2, "configure cycles");
    // configure with random BUSY
    busy_random = 1;
    got.delete(); run(0, 7, 300, cyc, dp);
    chk(got.size(), 300, "configure byte count (busy)");
    for (int i = 0; i < got.size(); i++) chk(got[i], bram[7 + i], "configure byte (busy)");
    // readback with random BUSY
    rb_src.delete(); for (int i = 0; i < 200; i++) rb_src.push_back(8'($urandom));
    begin
      logic [7:0] exp [$]; exp = rb_src;
      run(1, 1000, 200, cyc, dp);
      for (int i = 0; i < 200; i++) chk(bram[1000 + i], exp[i], "readback byte");
      chk(rb_src.size(), 0, "all bytes read");
    end
    chk(strobes_while_busy, 0, "no strobe while BUSY");
    // size 0 finishes immediately
    busy_random = 0; run(0, 0, 0, cyc, dp); chk(dp, 1, "size 0 done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
