// tb_hopscotch: memory access kernels in the style of the Hopscotch suite
// (sequential, strided and random reads and writes) run through the model
// at the same reduced size as tb_pimulator_top.
//
// Each kernel issues a stream of closed-page accesses (ACT, RD or WR burst,
// PRE) through the controller model; a linear burst address is mapped as
// column burst (low bits), bank, row. Every read beat is checked against the
// reference model, and the row cache hit rate of each kernel is printed from
// the model's statistics. Sequential kernels reuse each fetched row for all
// its bursts, random ones almost never do, so the test also requires the
// sequential hit rate to exceed the random one.
module tb_hopscotch;
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
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int unsigned BURSTS_PER_ROW = P_COLS / P_BL;
  localparam int unsigned N_ACC = 48;

  // one closed-page access to linear burst address a
  task automatic access(input longint unsigned a, input bit write);
    int unsigned col, b, row;
    col = 32'(a % BURSTS_PER_ROW) * P_BL;
    b   = 32'((a / BURSTS_PER_ROW) % P_NB);
    row = 32'((a / BURSTS_PER_ROW / P_NB) % (RSV - 1));
    act(b, row);  wait_e(W_RCD);
    if (write) wr(b, col); else rd(b, col);
    wait_e(W_COL);
    pre(b);       wait_e(W_RP);
  endtask

  // mode: 0 sequential, 1 strided, 2 random; rw: 0 read, 1 write, 2 alternate
  task automatic kernel(input string name, input int mode, input int unsigned stride,
                        input int rw, input longint unsigned base, output real hitrate);
    logic [31:0] h0, m0;
    h0 = stats.n_hit;
    m0 = stats.n_miss;
    for (int i = 0; i < N_ACC; i++) begin
      longint unsigned a;
      case (mode)
        0:       a = base + longint'(i);
        1:       a = base + longint'(i) * stride;
        default: a = base + longint'($urandom % 200000);
      endcase
      access(a, (rw == 1) || (rw == 2 && i[0]));
    end
    hitrate = real'(stats.n_hit - h0) / real'(stats.n_hit - h0 + stats.n_miss - m0);
    $display("  %-14s row cache hit rate %0.2f", name, hitrate);
  endtask

  initial begin
    real hr_seq, hr_rand, hr;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    kernel("w_seq_fill",   0, 1, 1, 0,       hr);
    kernel("r_seq_reduce", 0, 1, 0, 0,       hr_seq);
    kernel("rw_seq_copy",  0, 1, 2, 4096,    hr);
    kernel("r_stride_2",   1, 2, 0, 8192,    hr);
    kernel("w_stride_4",   1, 4, 1, 12288,   hr);
    kernel("r_rand_ind",   2, 1, 0, 20000,   hr_rand);
    kernel("w_rand_ind",   2, 1, 1, 20000,   hr);
    kernel("rw_scatter",   2, 1, 2, 20000,   hr);

    wait_e(20);
    check_reads();
    checks++;
    if (!(hr_seq > hr_rand)) begin
      failures++;
      $display("FAIL: sequential hit rate %0.2f not above random %0.2f", hr_seq, hr_rand);
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
