// tb_bist_engine: the test task on its own. The testbench models the
// processor-side peripherals: the pattern GPIO feeds a C17 built from LUT
// vectors, the input GPIO returns {ID 17, outputs}, the LED GPIO is a flag,
// and the OMA captures records. It also answers each INJECT on the FSL with
// a DONE after a random delay and applies the fault to its C17 model.
// For each campaign (several pattern modes, with and without contents
// faults) the fault, detected and detection counts must equal the fault
// simulation in c17_ref_pkg, every OMA record must match the fault applied
// at that time, the ID must read 17, the LED must light for the campaign,
// and after the campaign the model must be back to fault-free.
module tb_bist_engine;
  import erace_pkg::*;
  import c17_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, contents = 0;
  logic [1:0] mode = 0;
  opb_req_t req; opb_rsp_t rsp;
  logic [31:0] m_data, s_data = 0; logic m_write, s_exists = 0, s_read;
  logic busy, done; logic [8:0] hb_id; logic [15:0] inj, det, dets;
  int checks = 0, failures = 0;

  bist_engine dut (.clk, .rst_n, .start, .tpg_mode(mode), .contents_faults(contents),
    .opb_req(req), .opb_rsp(rsp), .fsl_m_data(m_data), .fsl_m_write(m_write), .fsl_m_full(1'b0),
    .fsl_s_data(s_data), .fsl_s_exists(s_exists), .fsl_s_read(s_read),
    .busy, .done, .hb_id, .faults_injected(inj), .faults_detected(det), .detections(dets));
  always #5 clk = ~clk;

  task automatic chk(logic [31:0] g, logic [31:0] e, string what);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: got %h exp %h", what, g, e); end
  endtask

  // ---- peripheral model ----
  logic [3:0][15:0] L = C17_INIT;
  logic [4:0] pat = 0;
  logic led = 0, ack_q = 0;
  int n_rec = 0, n_msg = 0, led_on_seen = 0;
  fault_t cur = '0;
  always_comb begin
    logic [1:0] o;
    o = c17_luts(L, pat);
    rsp = OPB_RSP_IDLE;
    rsp.xfer_ack = ack_q;
    if (ack_q && req.rnw && req.abus == ADDR_GPIO1_A) rsp.dbus = {16'h0, C17_HB_ID, o, 5'b0};
  end
  always @(posedge clk) begin
    ack_q <= req.select && !ack_q;
    if (req.select && !ack_q && !req.rnw) begin
      if (req.abus == ADDR_GPIO2_A) pat <= req.dbus[31:27];
      else if (req.abus == ADDR_GPIO3_A) begin led <= req.dbus[0]; if (req.dbus[0]) led_on_seen++; end
      else if (req.abus >= ADDR_OMA && req.abus < ADDR_OMA + OMA_BYTES) begin
        int hits; logic [7:0] first;
        hits = 0; first = 0;
        for (int k = 0; k < num_patterns(mode); k++)
          if (c17_luts(L, pattern_at(mode, k)) != c17_gates(pattern_at(mode, k))) begin
            if (hits == 0) first = 8'(pattern_at(mode, k));
            hits++;
          end
        chk(req.abus, ADDR_OMA + 4 * n_rec, "record address");
        chk(req.dbus, {16'(hits), first, 7'd0, hits != 0}, $sformatf("record %0d", n_rec));
        n_rec++;
      end else begin
        failures++; $display("FAIL write to unexpected address %h", req.abus);
      end
    end
  end
  // FSL partner: apply the fault, answer DONE after a random delay
  initial forever begin
    @(posedge clk);
    if (m_write) begin
      fault_t f;
      f = fault_t'(m_data[15:0]);
      chk(m_data[31:28], MSG_INJECT, "message type");
      n_msg++;
      L = C17_INIT;
      if (f.kind != F_NONE) L[f.lut] = ref_inject(L[f.lut], f.kind, f.idx);
      cur = f;
      repeat ($urandom_range(20)) @(posedge clk);
      #1; s_data = {MSG_DONE, 12'h0, f}; s_exists = 1;
      do @(posedge clk); while (!s_read);
      #1; s_exists = 0;
    end
  end

  initial begin
    #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    automatic int modes [4] = '{0, 0, 1, 2};
    automatic bit conts [4] = '{0, 1, 0, 1};
    repeat (2) @(posedge clk); #1; rst_n = 1;
    chk(busy, 0, "idle after reset");
    for (int c = 0; c < 4; c++) begin
      result_t r;
      r = campaign(modes[c], conts[c]);
      mode = 2'(modes[c]); contents = conts[c];
      n_rec = 0; n_msg = 0; led_on_seen = 0;
      @(posedge clk); #1; start = 1; @(posedge clk); #1; start = 0;
      chk(busy, 1, "busy after start");
      while (!done) begin @(posedge clk); #1; end
      chk(inj, r.injected, $sformatf("faults injected mode %0d contents %0d", modes[c], conts[c]));
      chk(det, r.detected, "faults detected");
      chk(dets, r.detections, "detections");
      chk(n_rec, r.injected, "OMA records");
      chk(n_msg, r.injected + 1, "INJECT messages incl. restore");
      chk(hb_id, C17_HB_ID, "hardware block ID");
      chk(led_on_seen, 1, "LED lit once");
      @(posedge clk); #1;
      chk(led, 0, "LED off at end");
      chk(cur, '0, "fault removed at end");
      chk(busy, 0, "idle at end");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
