// tb_tpg: the exhaustive counter gives 0..31, the LFSR 31 distinct
// non-zero values in the x^5+x^3+1 order from seed 1, the stored set its
// 12 patterns; 'last' marks the final pattern of each.
module tb_tpg;
  import c17_ref_pkg::*;
  logic clk = 0, rst_n = 0, init = 0, nxt = 0, last; logic [1:0] mode; logic [4:0] p;
  int checks = 0, failures = 0;
  tpg dut (.clk, .rst_n, .mode, .init, .next(nxt), .pattern(p), .last);
  always #5 clk = ~clk;
  task automatic chk(logic [31:0] g, logic [31:0] e, string what);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: got %h exp %h", what, g, e); end
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    mode = 0;
    repeat (2) @(posedge clk); #1; rst_n = 1;
    for (int m = 0; m < 3; m++) begin
      bit seen [32];
      mode = 2'(m); init = 1; @(posedge clk); #1; init = 0;
      for (int k = 0; k < num_patterns(m); k++) begin
        chk(p, pattern_at(m, k), $sformatf("mode %0d pattern %0d", m, k));
        chk(last, k == num_patterns(m) - 1, "last");
        if (m == 1) begin chk(seen[p] || p == 0, 0, "LFSR value repeats or zero"); seen[p] = 1; end
        nxt = 1; @(posedge clk); #1; nxt = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
