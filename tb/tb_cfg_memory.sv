// tb_cfg_memory: power-up contents (C17 vectors in LUTs 0..3, zero
// elsewhere), byte write and read back, LUT vector placement (LUT j in frame
// j/292 at byte 2*(j mod 292), high byte first), out-of-range writes ignored.
module tb_cfg_memory;
  localparam int FB = 584, NF = 22, NL = 448;
  logic clk = 0, we; logic [15:0] wf, wb, rf, rb; logic [7:0] wd, rd;
  logic [NL-1:0][15:0] lut;
  int checks = 0, failures = 0;
  cfg_memory dut (.clk, .we, .wframe(wf), .wbyte(wb), .wdata(wd), .rframe(rf), .rbyte(rb), .rdata(rd), .lut_init(lut));
  always #5 clk = ~clk;
  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask
  task automatic wr(int f, int b, logic [7:0] d);
    we = 1; wf = 16'(f); wb = 16'(b); wd = d; @(posedge clk); #1; we = 0;
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    we = 0; wf = 0; wb = 0; wd = 0; rf = 0; rb = 0;
    #1;
    chk(lut[0], 16'h8F8F, "lut0"); chk(lut[1], 16'h8F8F, "lut1");
    chk(lut[2], 16'h8F8F, "lut2"); chk(lut[3], 16'h7777, "lut3");
    for (int j = 4; j < NL; j += 37) chk(lut[j], 0, $sformatf("lut%0d zero", j));
    rf = 0; rb = 6; #1; chk(rd, 8'h77, "read byte 6");
    // LUT 300 -> frame 1, byte 16
    wr(1, 16, 8'hA5); wr(1, 17, 8'h3C);
    chk(lut[300], 16'hA53C, "lut300 placement");
    rf = 1; rb = 17; #1; chk(rd, 8'h3C, "read back");
    // last LUT 447 -> frame 1, byte 2*155 = 310
    wr(1, 310, 8'h12); wr(1, 311, 8'h34); chk(lut[447], 16'h1234, "lut447");
    // random bytes across all frames
    for (int t = 0; t < 200; t++) begin
      int f, b; logic [7:0] d;
      f = $urandom_range(NF - 1); b = $urandom_range(FB - 1); d = 8'($urandom);
      wr(f, b, d); rf = 16'(f); rb = 16'(b); #1; chk(rd, d, "random rw");
    end
    // out of range: ignored, reads 0
    rf = 0; rb = 0; #1; begin logic [7:0] keep; keep = rd; wr(NF, 0, 8'hFF); rf = 0; rb = 0; #1; chk(rd, keep, "oob write"); end
    rf = 16'(NF); rb = 0; #1; chk(rd, 0, "oob read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
