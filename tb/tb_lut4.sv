// tb_lut4: checks that the LUT returns vector bit {i3..i0} for every input
// value and for random vectors.
module tb_lut4;
  logic [15:0] init; logic [3:0] i; logic o;
  int checks = 0, failures = 0;
  lut4 dut (.init, .i, .o);
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int t = 0; t < 200; t++) begin
      init = 16'($urandom);
      for (int n = 0; n < 16; n++) begin
        i = 4'(n); #1;
        checks++; if (o !== ((init >> n) & 1'b1)) begin failures++; $display("FAIL init=%h i=%0d o=%b", init, n, o); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
