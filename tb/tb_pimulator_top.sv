// tb_pimulator_top: end-to-end test of the memory + PiM channel model at
// reduced size (2 chips, 2x2 banks, 4 cached rows per bank, 32 columns,
// 4096 rows in 16 subarrays, short timings).
//
// A memory controller model drives DDR4 commands on the pins, honours stall
// and checks every read beat, including its cycle, against a reference model.
// It exercises: row cache misses with fetch, hits, dirty write back and
// refetch; bank interleaving; RDA/WRA auto precharge; REF after PREA;
// a refused command (timing violation); RowClone-FPM and a LISA copy
// across subarrays; Ambit AND, OR through triple-row activation and NOT
// through the dual-contact row. Each mechanism is counted from the model's
// own statistics and must have happened at least once.
module tb_pimulator_top;
  import pim_pkg::*;

  localparam int unsigned P_NCHIPS = 2, P_DW = 4, P_NBG = 2, P_NBA = 2;
  localparam int unsigned P_ROWS = 4, P_COLS = 32, P_ROW_W = 12, P_SA = 256, P_BL = 8;
  localparam int unsigned P_T_RCD = 3, P_T_CL = 3, P_T_CWL = 2, P_T_RAS = 8, P_T_RP = 3;
  localparam int unsigned P_T_RFC = 10, P_T_WR = 4, P_T_RTP = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ck_t, cs_n = 1'b1, act_n = 1'b1;
  logic [0:0] bg = '0;
  logic [0:0] ba = '0;
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

  pimulator_top #(
    .NCHIPS(P_NCHIPS), .DW(P_DW), .NBG(P_NBG), .NBA(P_NBA), .ROWS(P_ROWS), .COLS(P_COLS),
    .ROW_W(P_ROW_W), .SUBARRAY_ROWS(P_SA), .BL(P_BL),
    .T_RCD(P_T_RCD), .T_CL(P_T_CL), .T_CWL(P_T_CWL), .T_RAS(P_T_RAS), .T_RP(P_T_RP),
    .T_RFC(P_T_RFC), .T_WR(P_T_WR), .T_RTP(P_T_RTP)
  ) dut (
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

  int unsigned apr_seen = 0, refresh_seen = 0, interleave_seen = 0;
  always @(posedge clk) begin
    int busy_banks;
    busy_banks = 0;
    for (int b = 0; b < P_NB; b++) begin
      if (bank_state[b] == ST_READING_APR || bank_state[b] == ST_WRITING_APR) apr_seen++;
      if (bank_state[b] == ST_REFRESHING) refresh_seen++;
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
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. write then read in bank 0 (miss + fetch, then hits)
    act(0, 5);   wait_e(W_RCD);
    wr(0, 0);    wait_e(W_COL);
    rd(0, 0);    wait_e(W_COL);
    rd(0, 11);   wait_e(W_COL);
    pre(0);      wait_e(W_RP);

    // 2. fill bank 0's row cache so that the dirty row 5 is written back, then reread it
    for (int r = 6; r <= 9; r++) begin
      act(0, r);  wait_e(W_RCD);
      wr(0, 8 * (r % 4)); wait_e(W_COL);
      pre(0);     wait_e(W_RP);
    end
    act(0, 5);   wait_e(W_RCD);
    rd(0, 0);    wait_e(W_COL);
    rd(0, 24);   wait_e(W_COL);
    pre(0);      wait_e(W_RP);

    // 3. bank interleaving: banks 1 and 2 open together, reads overlap their activations
    act(1, 100); wait_e(2);
    act(2, 200); wait_e(W_RCD);
    rd(1, 16);   wait_e(P_BL);
    rd(2, 8);    wait_e(W_COL);
    wr(1, 0);    wait_e(W_COL);
    wr(2, 16);   wait_e(W_COL);
    pre(1);      wait_e(2);
    pre(2);      wait_e(W_RP);

    // 4. auto precharge
    act(3, 40);  wait_e(W_RCD);
    wr(3, 0, 1'b1); wait_e(W_COL + W_RP);
    act(3, 40);  wait_e(W_RCD);
    rd(3, 0, 1'b1); wait_e(W_COL + W_RP);

    // 5. a refused command: RD to an idle bank
    begin
      longint unsigned t;
      issue(1'b1, 3'b101, 3, 18'd0, t);
    end
    wait_e(W_COL);

    // 6. refresh
    prea();      wait_e(W_RP);
    refresh();   wait_e(2 * P_T_RFC + 2);

    // 7. RowClone-FPM (same subarray) and LISA copy (two subarrays away)
    act(1, 10);  wait_e(W_RCD);
    wr(1, 8);    wait_e(W_COL);
    pre(1);      wait_e(W_RP);
    aap(1, 10, 11);
    aap(1, 10, 600);
    act(1, 11);  wait_e(W_RCD);
    rd(1, 8);    wait_e(W_COL);
    rd(1, 0);    wait_e(W_COL);
    pre(1);      wait_e(W_RP);
    act(1, 600); wait_e(W_RCD);
    rd(1, 8);    wait_e(W_COL);
    pre(1);      wait_e(W_RP);

    // 8. Ambit: D1 = A AND B, D2 = A OR B, D3 = NOT A (A = row 20, B = row 21)
    act(2, 20);  wait_e(W_RCD);  wr(2, 0);  wait_e(W_COL);  pre(2);  wait_e(W_RP);
    act(2, 21);  wait_e(W_RCD);  wr(2, 0);  wait_e(W_COL);  pre(2);  wait_e(W_RP);
    aap(2, 20, RSV + 0);                 // A  -> T0
    aap(2, 21, RSV + 1);                 // B  -> T1
    aap(2, RSV + 8, RSV + 2);            // C0 -> T2
    act(2, RSV + 12);                    // TRA {T0,T1,T2}
    ref_tra(2, RSV + 12);
    wait_e(W_RCD);
    act(2, 22);                          // result -> D1
    for (int c = 0; c < P_COLS; c++) dst_put(2, 22, c, src_val(2, RSV + 12, c));
    wait_e(W_RAS);  pre(2);  wait_e(W_RP);
    aap(2, 20, RSV + 0);
    aap(2, 21, RSV + 1);
    aap(2, RSV + 9, RSV + 2);            // C1 -> T2
    act(2, RSV + 12);
    ref_tra(2, RSV + 12);
    wait_e(W_RCD);
    act(2, 23);                          // result -> D2
    for (int c = 0; c < P_COLS; c++) dst_put(2, 23, c, src_val(2, RSV + 12, c));
    wait_e(W_RAS);  pre(2);  wait_e(W_RP);
    aap(2, 20, RSV + 5);                 // A -> DCC0 through its negated wordline
    aap(2, RSV + 4, 24);                 // DCC0 -> D3
    for (int r = 22; r <= 24; r++) begin
      act(2, r);   wait_e(W_RCD);
      rd(2, 0);    wait_e(W_COL);
      rd(2, 8);    wait_e(W_COL);
      pre(2);      wait_e(W_RP);
    end

    wait_e(20);
    check_reads();

    // every mechanism must have happened
    expect_count("row cache hits",        stats.n_hit, 1);
    expect_count("row cache misses",      stats.n_miss, 1);
    expect_count("dirty write backs",     stats.n_writeback, 1);
    expect_count("stalled cycles",        stats.stall_cycles, 1);
    expect_count("second activations",    stats.n_reactivate, 1);
    expect_count("triple-row activations", stats.n_tra, 2);
    expect_count("LISA subarray hops",    stats.n_lisa_hops, 2);
    expect_count("refused commands",      stats.n_violation, 1);
    expect_count("refreshes",             stats.n_ref, 1);
    expect_count("auto-precharge cycles", apr_seen, 1);
    expect_count("refresh cycles",        refresh_seen, 2 * P_T_RFC - 1);
    expect_count("interleaved cycles",    interleave_seen, 1);
    checks++;
    if (stats.n_lisa_hops != 2) begin
      failures++;
      $display("FAIL: LISA hops %0d, expected 2", stats.n_lisa_hops);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
