// tb_c17_cut: with the C17 vectors the LUT netlist must equal the six-gate
// C17 for all 32 inputs; with random vectors it must follow the pin
// assignment of the LUT mapping.
module tb_c17_cut;
  import c17_ref_pkg::*;
  logic [3:0][15:0] L; logic [4:0] p; logic o22, o23;
  int checks = 0, failures = 0;
  c17_cut dut (.lut_init(L), .in1(p[4]), .in2(p[3]), .in3(p[2]), .in6(p[1]), .in7(p[0]), .out22(o22), .out23(o23));
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    L = C17_INIT;
    for (int n = 0; n < 32; n++) begin
      p = 5'(n); #1; checks++;
      if ({o22, o23} !== c17_gates(p)) begin failures++; $display("FAIL C17 p=%b got %b%b", p, o22, o23); end
    end
    for (int t = 0; t < 100; t++) begin
      L = {16'($urandom), 16'($urandom), 16'($urandom), 16'($urandom)};
      for (int n = 0; n < 32; n++) begin
        p = 5'(n); #1; checks++;
        if ({o22, o23} !== c17_luts(L, p)) begin failures++; $display("FAIL random p=%b", p); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
