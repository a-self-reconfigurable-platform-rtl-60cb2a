// tb_lut_fault_inject: compares every fault kind and index on random
// vectors with the reference, and checks the two worked examples: F3
// stuck-at-1 (entry 0000 takes entry 0100 ...) and output stuck-at-0.
module tb_lut_fault_inject;
  import erace_pkg::*;
  import c17_ref_pkg::*;
  logic [15:0] vi, vo; fault_kind_e kind; logic [3:0] idx;
  int checks = 0, failures = 0;
  lut_fault_inject dut (.vec_in(vi), .kind, .idx, .vec_out(vo));
  task automatic chk(logic [15:0] exp, string what);
    checks++; if (vo !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, vo, exp); end
  endtask
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    // F3 stuck-at-1: outputs become Y4..Y7, Y4..Y7, Y12..Y15, Y12..Y15
    vi = 16'b1010_0110_1100_0011; kind = F_IN_SA1; idx = 4'd2; #1;
    begin
      logic [15:0] e;
      for (int n = 0; n < 16; n++) e[n] = vi[(n / 8) * 8 + 4 + (n % 4)];
      chk(e, "F3 SA1 example");
    end
    kind = F_OUT_SA0; #1; chk(16'h0000, "output SA0 example");
    for (int t = 0; t < 300; t++) begin
      vi = 16'($urandom);
      for (int k = 0; k <= 5; k++) begin
        int imax;
        imax = (k == 1 || k == 2) ? 4 : ((k == 5) ? 16 : 1);
        for (int ix = 0; ix < imax; ix++) begin
          kind = fault_kind_e'(k); idx = 4'(ix); #1;
          chk(ref_inject(vi, k, ix), $sformatf("kind %0d idx %0d vec %h", k, ix, vi));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
