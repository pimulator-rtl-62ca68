// tb_pimulator_full: end-to-end test of the model at its full default size
// (16 x4 chips, 4 bank groups x 4 banks, 32 cached rows of 1024 columns per
// bank, 65536 rows per bank, DDR4-2400 timing); the top is instantiated with
// no parameter overrides.
//
// The same controller and reference model as the reduced-size test drive the
// pins. Scenario: a write and reads in a fresh row (miss, full-row fetch over
// AXI, hits), two banks open at once, a RowClone-FPM copy inside a subarray,
// a LISA copy into the next subarray, and one Ambit AND through a triple-row
// activation. Every read beat is checked with its cycle and each mechanism
// must appear in the statistics.
module tb_pimulator_full;
  import pim_pkg::*;

  // must equal the top's defaults
  localparam int unsigned P_NCHIPS = 16, P_DW = 4, P_NBG = 4, P_NBA = 4;
  localparam int unsigned P_ROWS = 32, P_COLS = 1024, P_ROW_W = 16, P_SA = 512, P_BL = 8;
  localparam int unsigned P_T_RCD = 17, P_T_CL = 17, P_T_CWL = 12, P_T_RAS = 39, P_T_RP = 17;
  localparam int unsigned P_T_RFC = 312, P_T_WR = 18, P_T_RTP = 9;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ck_t, cs_n = 1'b1, act_n = 1'b1;
  logic [1:0] bg = '0;
  logic [1:0] ba = '0;
  logic [17:0] addr = '0;
  int checks = 0, failures = 0;

  `include "tb_ddr_tasks.svh"

  word_t dq_in, dq_out;
  logic  dq_oe, dqs_t, stall;
  bank_state_t [P_NB-1:0] bank_state;
  stats_t stats;

  logic [33:0] awaddr, araddr;
  logic [7:0]  awlen, arlen;
  logic [2:0]  awsize, arsize;
  logic [1:0]  awburst, arburst, bresp, rresp;
  logic        awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  logic        arvalid, arready, rlast, rvalid, rready;
  word_t       wdata, rdata;
  logic [P_DQ_W/8-1:0] wstrb;

  pimulator_top dut (
    .clk, .rst_n, .ck_t, .cs_n, .act_n, .bg, .ba, .addr, .dq_in, .dq_out, .dq_oe, .dqs_t, .stall,
    .bank_state, .stats,
    .m_axi_awaddr(awaddr), .m_axi_awlen(awlen), .m_axi_awsize(awsize), .m_axi_awburst(awburst),
    .m_axi_awvalid(awvalid), .m_axi_awready(awready), .m_axi_wdata(wdata), .m_axi_wstrb(wstrb),
    .m_axi_wlast(wlast), .m_axi_wvalid(wvalid), .m_axi_wready(wready), .m_axi_bresp(bresp),
    .m_axi_bvalid(bvalid), .m_axi_bready(bready), .m_axi_araddr(araddr), .m_axi_arlen(arlen),
    .m_axi_arsize(arsize), .m_axi_arburst(arburst), .m_axi_arvalid(arvalid),
    .m_axi_arready(arready), .m_axi_rdata(rdata), .m_axi_rresp(rresp), .m_axi_rlast(rlast),
    .m_axi_rvalid(rvalid), .m_axi_rready(rready)
  );

  axi_mem_model #(.ADDR_W(34), .DATA_W(P_DQ_W)) u_mem (
    .clk, .rst_n, .awaddr, .awlen, .awvalid, .awready, .wdata, .wlast, .wvalid, .wready,
    .bresp, .bvalid, .bready, .araddr, .arlen, .arvalid, .arready, .rdata, .rresp, .rlast,
    .rvalid, .rready
  );

  always #5 clk = ~clk;

  int unsigned interleave_seen = 0;
  always @(posedge clk) begin
    int busy_banks;
    busy_banks = 0;
    for (int b = 0; b < P_NB; b++) begin
      if (bank_state[b] == ST_ACTIVATING || bank_state[b] == ST_READING ||
          bank_state[b] == ST_WRITING) busy_banks++;
    end
    if (busy_banks > 1) interleave_seen++;
  end

  task automatic expect_count(input string what, input logic [31:0] n, input int unsigned min);
    checks++;
    if (n < min) begin
      failures++;
      $display("FAIL: %s happened %0d times, expected at least %0d", what, n, min);
    end else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // write and read in a fresh row of bank 0 (miss + fetch, then hits)
    act(0, 5);   wait_e(W_RCD);
    wr(0, 16);   wait_e(W_COL);
    rd(0, 16);   wait_e(W_COL);
    rd(0, 1000); wait_e(W_COL);
    pre(0);      wait_e(W_RP);

    // banks 5 and 10 open together
    act(5, 300);  wait_e(2);
    act(10, 301); wait_e(W_RCD);
    rd(5, 8);     wait_e(P_BL);
    rd(10, 64);   wait_e(W_COL);
    pre(5);       wait_e(2);
    pre(10);      wait_e(W_RP);

    // RowClone-FPM (row 5 -> 6, subarray 0), LISA (row 5 -> 700, subarray 1)
    aap(0, 5, 6);
    aap(0, 5, 700);
    act(0, 6);   wait_e(W_RCD);
    rd(0, 16);   wait_e(W_COL);
    pre(0);      wait_e(W_RP);
    act(0, 700); wait_e(W_RCD);
    rd(0, 16);   wait_e(W_COL);
    rd(0, 1016); wait_e(W_COL);
    pre(0);      wait_e(W_RP);

    // Ambit AND: row 6 AND row 300 of bank 0 -> row 7
    aap(0, 6, RSV + 0);
    aap(0, 300, RSV + 1);
    aap(0, RSV + 8, RSV + 2);
    act(0, RSV + 12);
    ref_tra(0, RSV + 12);
    wait_e(W_RCD);
    act(0, 7);
    for (int c = 0; c < P_COLS; c++) dst_put(0, 7, c, src_val(0, RSV + 12, c));
    wait_e(W_RAS); pre(0); wait_e(W_RP);
    act(0, 7);   wait_e(W_RCD);
    rd(0, 16);   wait_e(W_COL);
    rd(0, 512);  wait_e(W_COL);
    pre(0);      wait_e(W_RP);

    wait_e(40);
    check_reads();

    expect_count("row cache hits",         stats.n_hit, 1);
    expect_count("row cache misses",       stats.n_miss, 1);
    expect_count("stalled cycles",         stats.stall_cycles, 1);
    expect_count("second activations",     stats.n_reactivate, 4);
    expect_count("triple-row activations", stats.n_tra, 1);
    expect_count("LISA subarray hops",     stats.n_lisa_hops, 1);
    expect_count("interleaved cycles",     interleave_seen, 1);
    checks++;
    if (stats.n_violation != 0) begin
      failures++;
      $display("FAIL: %0d commands refused", stats.n_violation);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
