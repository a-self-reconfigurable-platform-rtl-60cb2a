// erace_top: a self-reconfigurable platform for built-in self-test of a
// combinational circuit under test (CUT), faults injected by rewriting the
// CUT's LUT configuration at run time.
//
// Two sides share one FPGA:
//  * Application side (OPB_A): bist_engine applies test patterns to the
//    active module through output GPIOs (GPIO2 -> InBus[0:31], GPIO3 ->
//    InBus[32:39]), reads OutBus and IDBus back through an input GPIO
//    (GPIO1), compares with a fault-free signature and stores one record per
//    fault in the shared memory OMA.
//  * Reconfiguration side (OPB_R): rcfg_engine receives INJECT messages over
//    FSL_AtoR, rewrites the targeted LUT with a faulty vector by frame
//    read-modify-write through the HWICAP and the configuration port
//    (icap_virtex2 into cfg_memory), lights the LED GPIO while a fault is
//    in place, and answers DONE over FSL_RtoA.
//  * Active module (hw_block): the C17 benchmark mapped onto four LUTs whose
//    vectors come from the configuration memory of the active CLB column.
// One clock runs everything. The configuration memory powers up with the
// full configuration (fault-free C17); reset clears the logic only.
// Pulse start for one cycle with tpg_mode and contents_faults set; done rises when the campaign is over and the CUT
// is fault-free again.
//
// Besides the campaign results, the top brings out the read-modify-write
// count, whether a fault is in place, a bus timeout flag and the
// configuration port's CE, WRITE and BUSY lines for observation.
// One read-modify-write takes 2*(4+584+588)+8+584 = 2944 cycles plus bus
// handshakes with the default sizes.
//
// The platform's two soft processors are replaced by the two engines, which
// perform their tasks as state machines; bus macros are plain wires here.
//
// Lint notes: InBus, OutBus and IDBus keep the ascending [0:n] numbering of
// the active-module interface. Only the four CUT LUT vectors of the 448 in
// the column are read, since the C17 module uses no more; the FSL control
// bits are carried but unused. rst_n also disables the bus assertions,
// which lint reports as a mixed synchronous/asynchronous use.
module erace_top
  import erace_pkg::*;
#(
  parameter int unsigned FRAME_BYTES = 584,
  parameter int unsigned NUM_FRAMES  = 22,
  parameter int unsigned NUM_LUTS    = 448,
  parameter int unsigned READ_SETUP  = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [1:0]  tpg_mode,          // 0 exhaustive, 1 LFSR, 2 stored
  input  logic        contents_faults,   // also inject LUT contents faults
  output logic        busy,
  output logic        done,
  output logic [8:0]  hb_id,
  output logic [15:0] faults_injected,
  output logic [15:0] faults_detected,
  output logic [15:0] detections,
  output logic [15:0] rmw_count,
  output logic        led_r,
  output logic        led_active,
  output logic        fault_active,      // a fault is injected in the CUT
  output logic        opb_timeout,       // an OPB transfer went unanswered
  // configuration port activity, for observation
  output logic        icap_sel,          // ICAP CE asserted
  output logic        icap_wr,           // ICAP WRITE asserted (else reading)
  output logic        icap_stall         // ICAP BUSY
);
  // ---------------- application side ----------------
  opb_req_t a_req;  opb_rsp_t a_rsp;
  opb_req_t a_sreq [4];  opb_rsp_t a_srsp [4];
  logic     a_to, r_to;

  logic [31:0] atr_m_data, atr_s_data, rta_m_data, rta_s_data;
  logic        atr_m_write, atr_m_full, atr_s_read, atr_s_exists, atr_s_ctl;
  logic        rta_m_write, rta_m_full, rta_s_read, rta_s_exists, rta_s_ctl;

  bist_engine u_bist (
    .clk, .rst_n, .start, .tpg_mode, .contents_faults,
    .opb_req(a_req), .opb_rsp(a_rsp),
    .fsl_m_data(atr_m_data), .fsl_m_write(atr_m_write), .fsl_m_full(atr_m_full),
    .fsl_s_data(rta_s_data), .fsl_s_exists(rta_s_exists), .fsl_s_read(rta_s_read),
    .busy, .done, .hb_id, .faults_injected, .faults_detected, .detections
  );

  opb_bus #(.N_SLAVES(4)) u_opb_a (
    .clk, .rst_n, .m_req(a_req), .m_rsp(a_rsp), .timeout(a_to), .s_req(a_sreq), .s_rsp(a_srsp)
  );

  logic [0:39] in_bus;
  logic [0:6]  out_bus;
  logic [0:8]  id_bus;
  logic [31:0] gpio2_out;
  logic [7:0]  gpio3_out;
  logic [15:0] gpio1_in, gpio1_unused;

  opb_gpio #(.BASE_ADDR(ADDR_GPIO1_A), .WIDTH(16), .IS_INPUT(1'b1)) u_gpio1_a (
    .clk, .rst_n, .opb_req(a_sreq[0]), .opb_rsp(a_srsp[0]), .gpio_in(gpio1_in), .gpio_out(gpio1_unused)
  );
  opb_gpio #(.BASE_ADDR(ADDR_GPIO2_A), .WIDTH(32), .IS_INPUT(1'b0)) u_gpio2_a (
    .clk, .rst_n, .opb_req(a_sreq[1]), .opb_rsp(a_srsp[1]), .gpio_in('0), .gpio_out(gpio2_out)
  );
  opb_gpio #(.BASE_ADDR(ADDR_GPIO3_A), .WIDTH(8), .IS_INPUT(1'b0)) u_gpio3_a (
    .clk, .rst_n, .opb_req(a_sreq[2]), .opb_rsp(a_srsp[2]), .gpio_in('0), .gpio_out(gpio3_out)
  );

  // bus macros: five 8-bit right-to-left (InBus), two left-to-right (OutBus, IDBus)
  always_comb begin
    in_bus   = {gpio2_out, gpio3_out};   // InBus[0] = GPIO2 bit 31, InBus[39] = GPIO3 bit 0
    gpio1_in = {id_bus, out_bus};        // IDBus in bits 15:7, OutBus in bits 6:0
  end

  // ---------------- reconfiguration side ----------------
  opb_req_t r_req;  opb_rsp_t r_rsp;
  opb_req_t r_sreq [3];  opb_rsp_t r_srsp [3];

  rcfg_engine #(.FRAME_BYTES(FRAME_BYTES)) u_rcfg (
    .clk, .rst_n,
    .fsl_s_data(atr_s_data), .fsl_s_exists(atr_s_exists), .fsl_s_read(atr_s_read),
    .fsl_m_data(rta_m_data), .fsl_m_write(rta_m_write), .fsl_m_full(rta_m_full),
    .opb_req(r_req), .opb_rsp(r_rsp), .fault_active(fault_active), .rmw_count
  );

  opb_bus #(.N_SLAVES(3)) u_opb_r (
    .clk, .rst_n, .m_req(r_req), .m_rsp(r_rsp), .timeout(r_to), .s_req(r_sreq), .s_rsp(r_srsp)
  );

  logic [0:0] gpio_r_out;
  opb_gpio #(.BASE_ADDR(ADDR_GPIO_R), .WIDTH(1), .IS_INPUT(1'b0)) u_gpio1_r (
    .clk, .rst_n, .opb_req(r_sreq[0]), .opb_rsp(r_srsp[0]), .gpio_in('0), .gpio_out(gpio_r_out)
  );
  always_comb led_r = gpio_r_out[0];

  opb_bram_dual #(.BASE_ADDR(ADDR_OMA), .BYTES(OMA_BYTES)) u_oma (
    .clk, .rst_n, .req_a(a_sreq[3]), .rsp_a(a_srsp[3]), .req_b(r_sreq[1]), .rsp_b(r_srsp[1])
  );

  logic [7:0] icap_i, icap_o;
  logic       icap_write_n, icap_ce_n, icap_busy;

  opb_hwicap #(.BASE_ADDR(ADDR_HWICAP)) u_hwicap (
    .clk, .rst_n, .opb_req(r_sreq[2]), .opb_rsp(r_srsp[2]),
    .icap_i, .icap_write_n, .icap_ce_n, .icap_o, .icap_busy
  );

  // ---------------- FSLs ----------------
  fsl_fifo u_fsl_atr (
    .clk, .rst_n, .m_data(atr_m_data), .m_control(1'b0), .m_write(atr_m_write), .m_full(atr_m_full),
    .s_data(atr_s_data), .s_control(atr_s_ctl), .s_read(atr_s_read), .s_exists(atr_s_exists)
  );
  fsl_fifo u_fsl_rta (
    .clk, .rst_n, .m_data(rta_m_data), .m_control(1'b0), .m_write(rta_m_write), .m_full(rta_m_full),
    .s_data(rta_s_data), .s_control(rta_s_ctl), .s_read(rta_s_read), .s_exists(rta_s_exists)
  );

  // ---------------- configuration port, memory, active module ----------------
  logic        mem_we;
  logic [15:0] mem_wframe, mem_wbyte, mem_rframe, mem_rbyte;
  logic [7:0]  mem_wdata, mem_rdata;
  logic [NUM_LUTS-1:0][15:0] lut_init;

  assign icap_sel   = !icap_ce_n;
  assign icap_wr    = !icap_write_n;
  assign icap_stall = icap_busy;

  icap_virtex2 #(.FRAME_BYTES(FRAME_BYTES), .READ_SETUP(READ_SETUP)) u_icap (
    .CLK(clk), .CE(icap_ce_n), .WRITE(icap_write_n), .I(icap_i), .O(icap_o), .BUSY(icap_busy),
    .mem_we, .mem_wframe, .mem_wbyte, .mem_wdata, .mem_rframe, .mem_rbyte, .mem_rdata, .rst_n
  );

  cfg_memory #(.FRAME_BYTES(FRAME_BYTES), .NUM_FRAMES(NUM_FRAMES), .NUM_LUTS(NUM_LUTS)) u_cfg (
    .clk, .we(mem_we), .wframe(mem_wframe), .wbyte(mem_wbyte), .wdata(mem_wdata),
    .rframe(mem_rframe), .rbyte(mem_rbyte), .rdata(mem_rdata), .lut_init
  );

  hw_block u_active (
    .InBus(in_bus), .lut_init(lut_init[3:0]), .Led1_out(led_active), .OutBus(out_bus), .IDBus(id_bus)
  );

  always_comb opb_timeout = a_to || r_to;
endmodule
