// tb_ambit_ops: bulk bitwise operations AND, OR, NOT, NAND and XOR built
// from RowClone copies and triple-row activations (the Ambit scheme), run
// through the model at the same reduced size as tb_pimulator_top.
//
// The controller model issues only DDR4 commands: a copy is ACT src, ACT dst,
// PRE; AND/OR copy the operands to T0/T1 and the constant row C0/C1 to T2,
// activate the triple-row address {T0,T1,T2} and copy the result out; NOT
// goes through the negated wordline of DCC0. NAND is NOT of AND, XOR is
// (A AND NOT B) OR (NOT A AND B). Each result row is compared column by
// column with the operation computed directly on the operands, every read
// beat on the pins is checked, and the emulated cycles each operation takes
// (its throughput at this timing) are printed.
module tb_ambit_ops;
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

  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // triple-row activation of group grp, result copied to row d
  task automatic tra_to(input int unsigned b, input int unsigned grp, input int unsigned d);
    act(b, RSV + grp);
    ref_tra(b, RSV + grp);
    wait_e(W_RCD);
    act(b, d);
    for (int c = 0; c < P_COLS; c++) dst_put(b, d, c, src_val(b, RSV + grp, c));
    wait_e(W_RAS);  pre(b);  wait_e(W_RP);
  endtask
  task automatic and_or(input int unsigned b, input int unsigned x, input int unsigned y,
                        input int unsigned d, input bit is_or);
    aap(b, x, RSV + 0);
    aap(b, y, RSV + 1);
    aap(b, is_or ? RSV + 9 : RSV + 8, RSV + 2);
    tra_to(b, 12, d);
  endtask
  task automatic not_op(input int unsigned b, input int unsigned x, input int unsigned d);
    aap(b, x, RSV + 5);
    aap(b, RSV + 4, d);
  endtask

  localparam int unsigned BK = 1, A = 30, B = 31;
  word_t va [P_COLS], vb [P_COLS];

  task automatic check_row(input string what, input int unsigned d, input int op);
    for (int c = 0; c < P_COLS; c++) begin
      word_t e;
      case (op)
        0: e = va[c] & vb[c];
        1: e = va[c] | vb[c];
        2: e = ~va[c];
        3: e = ~(va[c] & vb[c]);
        default: e = va[c] ^ vb[c];
      endcase
      checks++;
      if (ref_get(BK, d, c) !== e) begin
        failures++;
        $display("FAIL: %s column %0d", what, c);
      end
    end
    // read the result row back through the pins
    act(BK, d);  wait_e(W_RCD);
    for (int c = 0; c < P_COLS; c += P_BL) begin
      rd(BK, c);  wait_e(W_COL);
    end
    pre(BK);     wait_e(W_RP);
  endtask

  task automatic timed(input string what, input longint unsigned t0);
    $display("  %-5s %0d emulated cycles for %0d bits", what, ecyc - t0, P_COLS * P_DQ_W);
  endtask

  initial begin
    longint unsigned t0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < P_COLS; c++) begin
      va[c] = ref_get(BK, A, c);
      vb[c] = ref_get(BK, B, c);
    end

    t0 = ecyc;  and_or(BK, A, B, 40, 1'b0);  timed("AND", t0);
    t0 = ecyc;  and_or(BK, A, B, 41, 1'b1);  timed("OR", t0);
    t0 = ecyc;  not_op(BK, A, 42);           timed("NOT", t0);
    t0 = ecyc;  and_or(BK, A, B, 50, 1'b0);  not_op(BK, 50, 43);  timed("NAND", t0);
    t0 = ecyc;
    not_op(BK, A, 51);
    not_op(BK, B, 52);
    and_or(BK, A, 52, 53, 1'b0);
    and_or(BK, 51, B, 54, 1'b0);
    and_or(BK, 53, 54, 44, 1'b1);
    timed("XOR", t0);

    check_row("AND", 40, 0);
    check_row("OR", 41, 1);
    check_row("NOT", 42, 2);
    check_row("NAND", 43, 3);
    check_row("XOR", 44, 4);

    wait_e(20);
    check_reads();
    checks++;
    if (stats.n_tra != 6) begin
      failures++;
      $display("FAIL: %0d triple-row activations, expected 6", stats.n_tra);
    end
    checks++;
    if (stats.n_violation != 0) begin
      failures++;
      $display("FAIL: %0d commands refused", stats.n_violation);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
