// tb_erace_top: end-to-end test of the whole platform at its full size
// (584-byte frames, 22-frame column, 448 LUTs). It runs five test campaigns
// (exhaustive, LFSR and stored patterns; with and without LUT contents
// faults) and checks the fault, detected and detection counts against the
// fault simulation in c17_ref_pkg and the hardware block ID (17).
// On the configuration port it checks the exact number of bytes written
// (4-byte read header plus 588-byte header-and-frame per read-modify-write),
// read back (584 per read-modify-write) and BUSY cycles (commit of every
// written frame plus the read setup), and that no OPB transfer timed out.
// Every mechanism of the platform is counted and a mechanism that never
// occurred is a failure: campaign, fault inject, fault restore,
// read-modify-write, frame write, frame readback, commit stall, read setup
// stall, both LEDs, each pattern mode, contents faults and detections.
module tb_erace_top;
  import erace_pkg::*;
  import c17_ref_pkg::*;
  localparam int FB = 584, RS = 8;
  logic clk = 0, rst_n = 0, start = 0, contents = 0;
  logic [1:0] mode = 0;
  logic busy, done, led_r, led_a, fa, to, isel, iwr, istall;
  logic [8:0] hb_id; logic [15:0] inj, det, dets, rmw;
  int checks = 0, failures = 0;

  erace_top dut (.clk, .rst_n, .start, .tpg_mode(mode), .contents_faults(contents),
    .busy, .done, .hb_id, .faults_injected(inj), .faults_detected(det), .detections(dets),
    .rmw_count(rmw), .led_r, .led_active(led_a), .fault_active(fa), .opb_timeout(to),
    .icap_sel(isel), .icap_wr(iwr), .icap_stall(istall));
  always #5 clk = ~clk;

  task automatic chk(longint g, longint e, string what);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: got %0d exp %0d", what, g, e); end
  endtask

  // ---- mechanism monitors ----
  longint wr_bytes = 0, rd_bytes = 0, stall_cyc = 0, cycles = 0;
  int n_inject = 0, n_restore = 0, n_led_r = 0, n_led_a = 0, n_commit = 0, n_rsetup = 0, n_to = 0;
  int stall_len = 0;
  logic fa_q = 0, led_r_q = 0, led_a_q = 0;
  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (isel && iwr) wr_bytes++;
    if (isel && !iwr) rd_bytes++;
    if (istall) begin stall_cyc++; stall_len++; end
    else if (stall_len != 0) begin
      if (stall_len == FB) n_commit++;
      else if (stall_len == RS) n_rsetup++;
      else begin failures++; $display("FAIL BUSY lasted %0d cycles", stall_len); end
      stall_len = 0;
    end
    if (fa && !fa_q) n_inject++;
    if (!fa && fa_q) n_restore++;
    if (led_r && !led_r_q) n_led_r++;
    if (led_a && !led_a_q) n_led_a++;
    if (to) n_to++;
    fa_q <= fa; led_r_q <= led_r; led_a_q <= led_a;
  end

  initial begin
    #400000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    automatic int modes [5] = '{0, 1, 2, 2, 0};
    automatic bit conts [5] = '{0, 0, 0, 1, 1};
    automatic int mode_seen [3] = '{0, 0, 0};
    automatic int n_campaign = 0, n_contents = 0, n_detect = 0;
    repeat (3) @(posedge clk); #1; rst_n = 1;
    repeat (3) @(posedge clk); #1;
    chk(busy, 0, "idle after reset");
    chk(fa, 0, "no fault after reset");
    for (int c = 0; c < 5; c++) begin
      result_t r; longint w0, r0, s0, c0; int m0;
      r = campaign(modes[c], conts[c]);
      mode = 2'(modes[c]); contents = conts[c];
      w0 = wr_bytes; r0 = rd_bytes; s0 = stall_cyc; m0 = rmw; c0 = cycles;
      @(posedge clk); #1; start = 1; @(posedge clk); #1; start = 0;
      while (!done) begin @(posedge clk); #1; end
      repeat (2) @(posedge clk); #1;
      while (istall) begin @(posedge clk); #1; end
      repeat (2) @(posedge clk); #1;
      $display("campaign mode %0d contents %0d: %0d faults, %0d detected, %0d detections, %0d read-modify-writes, %0d cycles",
               modes[c], conts[c], inj, det, dets, 16'(rmw - m0), cycles - c0);
      chk(inj, r.injected, "faults injected");
      chk(det, r.detected, "faults detected");
      chk(dets, r.detections, "detections");
      chk(hb_id, C17_HB_ID, "hardware block ID");
      // one read-modify-write per injection plus one per restore (the
      // first injection and the final restore of no fault share the count)
      chk(16'(rmw - m0), 2 * r.injected, "read-modify-writes");
      chk(wr_bytes - w0, longint'(16'(rmw - m0)) * (4 + 4 + FB), "ICAP bytes written");
      chk(rd_bytes - r0, longint'(16'(rmw - m0)) * FB, "ICAP bytes read back");
      chk(stall_cyc - s0, longint'(16'(rmw - m0)) * (FB + RS), "ICAP BUSY cycles");
      // latency: each read-modify-write moves 4 + 584 + 588 bytes at two
      // cycles per byte and waits 8 cycles of read setup and 584 of commit;
      // the test patterns and bus handshakes add little on top of that
      checks++;
      if (cycles - c0 < longint'(16'(rmw - m0)) * (2 * (4 + FB + 4 + FB) + RS + FB) ||
          cycles - c0 > longint'(16'(rmw - m0)) * (2 * (4 + FB + 4 + FB) + RS + FB) + 100 * r.injected + 2000) begin
        failures++; $display("FAIL campaign took %0d cycles", cycles - c0);
      end
      chk(fa, 0, "fault removed after campaign");
      chk(led_r, 0, "reconfiguration LED off");
      chk(led_a, 0, "active module LED off");
      n_campaign++; mode_seen[modes[c]]++;
      if (conts[c]) n_contents++;
      if (det > 0) n_detect++;
    end
    chk(n_to, 0, "OPB timeouts");
    // every mechanism happened
    chk(n_campaign > 0, 1, "campaign");
    chk(n_inject > 0, 1, "fault injection");
    chk(n_restore > 0, 1, "fault restore");
    chk(rmw > 0, 1, "read-modify-write");
    chk(wr_bytes > 0, 1, "frame write");
    chk(rd_bytes > 0, 1, "frame readback");
    chk(n_commit > 0, 1, "commit BUSY");
    chk(n_rsetup > 0, 1, "read setup BUSY");
    chk(n_led_r > 0, 1, "reconfiguration LED");
    chk(n_led_a > 0, 1, "active module LED");
    chk(mode_seen[0] > 0 && mode_seen[1] > 0 && mode_seen[2] > 0, 1, "all pattern modes");
    chk(n_contents > 0, 1, "contents faults");
    chk(n_detect > 0, 1, "detections");
    chk(n_commit, n_rsetup, "one commit per read setup");
    $display("mechanisms: campaigns=%0d injects=%0d restores=%0d rmw=%0d commits=%0d read_setups=%0d led_r=%0d led_a=%0d bytes_w=%0d bytes_r=%0d",
             n_campaign, n_inject, n_restore, rmw, n_commit, n_rsetup, n_led_r, n_led_a, wr_bytes, rd_bytes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
