// tb_fsl_fifo: random pushes and pops against a queue model (data and
// control bit, first-word fall-through), full after 16 entries, exists.
module tb_fsl_fifo;
  logic clk = 0, rst_n = 0, mc, mw, full, sc, sr, ex;
  logic [31:0] md, sd;
  logic [32:0] q [$];
  int checks = 0, failures = 0, fulls = 0;
  fsl_fifo dut (.clk, .rst_n, .m_data(md), .m_control(mc), .m_write(mw), .m_full(full), .s_data(sd), .s_control(sc), .s_read(sr), .s_exists(ex));
  always #5 clk = ~clk;
  task automatic chk(logic [32:0] g, logic [32:0] e, string what);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: got %h exp %h", what, g, e); end
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    mw = 0; sr = 0; md = 0; mc = 0;
    repeat (2) @(posedge clk); #1; rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int bias; bias = (t / 500) % 2;   // alternate filling and draining phases
      chk(ex, q.size() != 0, "exists");
      chk(full, q.size() == 16, "full");
      if (full) fulls++;
      if (ex) chk({sc, sd}, q[0], "head");
      mw = !full && ($urandom_range(3) < (bias ? 3 : 1));
      sr = ex && ($urandom_range(3) < (bias ? 1 : 3));
      md = $urandom; mc = 1'($urandom);
      @(posedge clk); #1;
      if (sr) void'(q.pop_front());
      if (mw) q.push_back({mc, md});
      mw = 0; sr = 0;
    end
    checks++; if (fulls == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
