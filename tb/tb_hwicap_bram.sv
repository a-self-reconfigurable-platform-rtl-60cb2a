// tb_hwicap_bram: byte port A against word port B (byte 4w is bits 31:24 of
// word w), read-before-write output, output hold while disabled, both
// ports against a reference array.
module tb_hwicap_bram;
  logic clk = 0, ena, wea, enb, web; logic [10:0] addra; logic [8:0] addrb;
  logic [7:0] dia, doa; logic [31:0] dib, dob;
  logic [7:0] ref_mem [2048];
  int checks = 0, failures = 0;
  hwicap_bram dut (.clk, .ena, .wea, .addra, .dia, .doa, .enb, .web, .addrb, .dib, .dob);
  always #5 clk = ~clk;
  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    ena = 0; wea = 0; enb = 0; web = 0; addra = 0; addrb = 0; dia = 0; dib = 0;
    // fill through port B
    for (int w = 0; w < 512; w++) begin
      enb = 1; web = 1; addrb = 9'(w); dib = $urandom;
      {ref_mem[4*w], ref_mem[4*w+1], ref_mem[4*w+2], ref_mem[4*w+3]} = dib;
      @(posedge clk); #1;
    end
    enb = 0; web = 0;
    // read through port A
    for (int a = 0; a < 2048; a += 7) begin
      ena = 1; addra = 11'(a); @(posedge clk); #1; ena = 0; chk(doa, ref_mem[a], "A read");
    end
    // hold while disabled
    begin logic [7:0] h; h = doa; addra = 0; @(posedge clk); #1; chk(doa, h, "A hold"); end
    // write port A, read-before-write, then read via B
    for (int t = 0; t < 300; t++) begin
      int a; a = $urandom_range(2047);
      ena = 1; wea = 1; addra = 11'(a); dia = 8'($urandom);
      @(posedge clk); #1; chk(doa, ref_mem[a], "A read-before-write");
      ref_mem[a] = dia; ena = 0; wea = 0;
      enb = 1; addrb = 9'(a / 4); @(posedge clk); #1; enb = 0;
      chk(dob, {ref_mem[(a/4)*4], ref_mem[(a/4)*4+1], ref_mem[(a/4)*4+2], ref_mem[(a/4)*4+3]}, "B read after A write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
