// tb_hw_block: the active module must compute C17 from InBus[0..4], put
// out22/out23 on OutBus[0..1] with the rest 0, report ID 17 and drive the
// LED from InBus[39].
module tb_hw_block;
  import c17_ref_pkg::*;
  logic [0:39] ib; logic [3:0][15:0] L; logic led; logic [0:6] ob; logic [0:8] id;
  int checks = 0, failures = 0;
  hw_block dut (.InBus(ib), .lut_init(L), .Led1_out(led), .OutBus(ob), .IDBus(id));
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    L = C17_INIT;
    for (int t = 0; t < 256; t++) begin
      ib = {8'($urandom), 32'($urandom)};
      #1;
      checks++; if ({ob[0], ob[1]} !== c17_gates({ib[0], ib[1], ib[2], ib[3], ib[4]})) begin failures++; $display("FAIL cut"); end
      checks++; if ({ob[2], ob[3], ob[4], ob[5], ob[6]} !== 5'b0) begin failures++; $display("FAIL unused"); end
      checks++; if (id !== 9'd17) begin failures++; $display("FAIL id %0d", id); end
      checks++; if (led !== ib[39]) begin failures++; $display("FAIL led"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
