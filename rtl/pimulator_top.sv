// pimulator_top: memory + processing-in-memory channel model of one DDR4 rank.
//
// An FPGA-synthesizable, cycle-level model of a DDR4 rank with bulk bitwise
// processing inside its banks. A memory controller drives it through the DIMM
// pins (cs_n, act_n, bg, ba, A17..A0, dq); the model clock clk runs at twice
// the interface clock and ck_t gives the interface clock level, so that one
// data beat moves per model clock (double data rate).
//
// Structure (all modules below are instantiated here):
//   cmd_decoder       DDR4 truth table, open row / column / burst per bank
//   bank_timing_fsm   one per bank: bank state and tRCD/tCL/tCWL/tRAS/... timing
//   dsync             one per bank: row cache mapping memory rows to the few
//                     bank module rows kept on the FPGA
//   dsync_axi_ctrl    moves rows between bank modules and board memory (AXI)
//   pim_bank_ctrl     one per bank: RowClone / LISA / Ambit sequencing
//   dq_slice_demux    data into the chips (controller or board memory side)
//   chip x NCHIPS     bank groups -> banks (bank_mem) with bank PUs (bank_pu)
//   dq_concat_mux     data out of the chips (controller or board memory side)
//   trace_capture     statistics
//
// Timing seen at the pins (model clocks, command in cycle c, tX in tCK):
//   RD: data beats on dq_out with dq_oe high in cycles c+2*tCL+1 .. c+2*tCL+BL
//   WR: dq_in is sampled in cycles c+2*tCWL .. c+2*tCWL+BL-1
// stall: while high the controller must hold (issue nothing, its clock paused)
// and all emulated state is frozen; it is raised for row cache write back and
// fetch and for in-memory operations, which take emulation time but no
// emulated time. The controller-side pins are the split form of the
// bidirectional dq/dqs pads (dq_in, dq_out, dq_oe).
// The block structure, the double-rate model clock, the stall and the AXI
// link to board memory follow the published PiMulator design; the DDR4-2400 x4 rank defaults
// (16 chips, 4 bank groups of 4 banks, 64K rows, 1K columns, BL8) follow its
// evaluated configuration; the one-cycle read register at the pins, the
// reserved Ambit rows and the statistics set are this design's choices.
// Lint notes: cmd_ap and cmd_col of the decoder are not needed here (the bank
// state machines get auto precharge from the command code, the column comes
// from the burst counter); only chip 0's pu_done is used, since all chips run
// the same operation in step; pu_busy and the row caches' busy and
// idx_subarray outputs are left unconnected.
module pimulator_top
  import pim_pkg::*;
#(
  parameter int unsigned NCHIPS        = 16,
  parameter int unsigned DW            = 4,
  parameter int unsigned NBG           = 4,
  parameter int unsigned NBA           = 4,
  parameter int unsigned ROWS          = 32,
  parameter int unsigned COLS          = 1024,
  parameter int unsigned ROW_W         = 16,
  parameter int unsigned SUBARRAY_ROWS = 512,
  parameter bit          POLICY_RANDOM = 1'b0,
  parameter int unsigned AXI_ADDR_W    = 34,
  parameter int unsigned BL            = 8,
  parameter int unsigned T_RCD = 17,
  parameter int unsigned T_CL  = 17,
  parameter int unsigned T_CWL = 12,
  parameter int unsigned T_RAS = 39,
  parameter int unsigned T_RP  = 17,
  parameter int unsigned T_RFC = 312,
  parameter int unsigned T_WR  = 18,
  parameter int unsigned T_RTP = 9,
  localparam int unsigned DQ_W  = NCHIPS * DW,
  localparam int unsigned BG_W  = $clog2(NBG),
  localparam int unsigned BA_W  = $clog2(NBA),
  localparam int unsigned NB    = NBG * NBA,
  localparam int unsigned BK_W  = BG_W + BA_W,
  localparam int unsigned IDX_W = $clog2(ROWS),
  localparam int unsigned COL_W = $clog2(COLS),
  localparam int unsigned SA_W  = ROW_W - $clog2(SUBARRAY_ROWS)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // DIMM interface
  input  logic                   ck_t,
  input  logic                   cs_n,
  input  logic                   act_n,
  input  logic [BG_W-1:0]        bg,
  input  logic [BA_W-1:0]        ba,
  input  logic [17:0]            addr,
  input  logic [DQ_W-1:0]        dq_in,
  output logic [DQ_W-1:0]        dq_out,
  output logic                   dq_oe,
  output logic                   dqs_t,
  output logic                   stall,
  // observability
  output bank_state_t [NB-1:0]   bank_state,
  output stats_t                 stats,
  // AXI4 master to board memory
  output logic [AXI_ADDR_W-1:0]  m_axi_awaddr,
  output logic [7:0]             m_axi_awlen,
  output logic [2:0]             m_axi_awsize,
  output logic [1:0]             m_axi_awburst,
  output logic                   m_axi_awvalid,
  input  logic                   m_axi_awready,
  output logic [DQ_W-1:0]        m_axi_wdata,
  output logic [DQ_W/8-1:0]      m_axi_wstrb,
  output logic                   m_axi_wlast,
  output logic                   m_axi_wvalid,
  input  logic                   m_axi_wready,
  input  logic [1:0]             m_axi_bresp,
  input  logic                   m_axi_bvalid,
  output logic                   m_axi_bready,
  output logic [AXI_ADDR_W-1:0]  m_axi_araddr,
  output logic [7:0]             m_axi_arlen,
  output logic [2:0]             m_axi_arsize,
  output logic [1:0]             m_axi_arburst,
  output logic                   m_axi_arvalid,
  input  logic                   m_axi_arready,
  input  logic [DQ_W-1:0]        m_axi_rdata,
  input  logic [1:0]             m_axi_rresp,
  input  logic                   m_axi_rlast,
  input  logic                   m_axi_rvalid,
  output logic                   m_axi_rready
);

  logic en;
  assign en = !stall;

  // ---------------------------------------------------------------- decode
  logic                     cmd_valid, cmd_ap;
  cmd_t                     cmd;
  logic [BK_W-1:0]          cmd_bank;
  logic [ROW_W-1:0]         cmd_row, cmd_prev_row;
  logic [COL_W-1:0]         cmd_col;
  logic [NB-1:0][ROW_W-1:0] open_row;
  logic [NB-1:0][COL_W-1:0] cur_col;
  logic [NB-1:0]            rd_beat, wr_beat, act_accept, react, violation;

  cmd_decoder #(.BG_W(BG_W), .BA_W(BA_W), .ROW_W(ROW_W), .COL_W(COL_W), .BL(BL)) u_dec (
    .clk, .rst_n, .en, .ck_t, .cs_n, .act_n, .bg, .ba, .addr,
    .burst_inc(rd_beat | wr_beat),
    .cmd_valid, .cmd, .cmd_bank, .cmd_row, .cmd_prev_row, .cmd_col, .cmd_ap,
    .open_row, .cur_col
  );

  // ----------------------------------------------- per-bank state and cache
  logic [NB-1:0]             ds_req, ds_write, ds_done, ds_stall, ds_hit, ds_miss, ds_wb;
  logic [NB-1:0][ROW_W-1:0]  ds_row;
  logic [NB-1:0][IDX_W-1:0]  ds_idx;
  logic [NB-1:0]             sync_req, sync_wb, sync_done;
  logic [NB-1:0][IDX_W-1:0]  sync_idx;
  logic [NB-1:0][ROW_W-1:0]  sync_row;
  logic [NB-1:0]             pc_stall, pc_tra, pc_copy, pc_ds_req, pc_ds_write, pc_pin_valid;
  logic [NB-1:0][ROW_W-1:0]  pc_ds_row;
  logic [NB-1:0][IDX_W-1:0]  pc_pin_idx;
  logic [NB-1:0][SA_W-1:0]   pc_hops;
  pu_cmd_t [NB-1:0]          pu_cmd;
  logic [NCHIPS-1:0][NB-1:0] pu_busy, pu_done;

  for (genvar b = 0; b < NB; b++) begin : g_bank
    logic cmd_here, col_here;
    assign cmd_here = cmd_valid && (cmd_bank == BK_W'(b) || cmd == CMD_PREA || cmd == CMD_REF);
    assign col_here = cmd_valid && cmd_bank == BK_W'(b) &&
                      (cmd == CMD_RD || cmd == CMD_RDA || cmd == CMD_WR || cmd == CMD_WRA);

    bank_timing_fsm #(
      .RATIO(2), .BL(BL), .T_RCD(T_RCD), .T_CL(T_CL), .T_CWL(T_CWL), .T_RAS(T_RAS),
      .T_RP(T_RP), .T_RFC(T_RFC), .T_WR(T_WR), .T_RTP(T_RTP)
    ) u_fsm (
      .clk, .rst_n, .en, .cmd_hit(cmd_here), .cmd,
      .state(bank_state[b]), .rd_beat(rd_beat[b]), .wr_beat(wr_beat[b]),
      .act_accept(act_accept[b]), .react(react[b]), .violation(violation[b])
    );

    // The row cache is looked up on RD/WR (open row) or by the PiM sequencer.
    assign ds_req[b]   = col_here || pc_ds_req[b];
    assign ds_row[b]   = pc_stall[b] ? pc_ds_row[b] : open_row[b];
    assign ds_write[b] = pc_stall[b] ? pc_ds_write[b] : (cmd == CMD_WR || cmd == CMD_WRA);

    dsync #(.ROWS(ROWS), .ROW_W(ROW_W), .SUBARRAY_ROWS(SUBARRAY_ROWS),
            .POLICY_RANDOM(POLICY_RANDOM)) u_dsync (
      .clk, .rst_n,
      .req(ds_req[b]), .req_row(ds_row[b]), .req_write(ds_write[b]),
      .pin_valid(pc_pin_valid[b]), .pin_idx(pc_pin_idx[b]),
      .done(ds_done[b]), .idx(ds_idx[b]), .idx_subarray(),
      .hit_pulse(ds_hit[b]), .miss_pulse(ds_miss[b]), .wb_pulse(ds_wb[b]),
      .stall(ds_stall[b]), .busy(),
      .sync_req(sync_req[b]), .sync_wb(sync_wb[b]), .sync_idx(sync_idx[b]),
      .sync_row(sync_row[b]), .sync_done(sync_done[b])
    );

    pim_bank_ctrl #(.ROWS(ROWS), .ROW_W(ROW_W), .SUBARRAY_ROWS(SUBARRAY_ROWS)) u_pim (
      .clk, .rst_n,
      .act_idle(act_accept[b]), .react(react[b]),
      .src_row(cmd_prev_row), .dst_row(cmd_row),
      .ds_req(pc_ds_req[b]), .ds_row(pc_ds_row[b]), .ds_write(pc_ds_write[b]),
      .ds_pin_valid(pc_pin_valid[b]), .ds_pin_idx(pc_pin_idx[b]),
      .ds_done(ds_done[b]), .ds_idx(ds_idx[b]),
      .pu_cmd(pu_cmd[b]), .pu_done(pu_done[0][b]),
      .stall(pc_stall[b]), .tra_pulse(pc_tra[b]), .copy_pulse(pc_copy[b]),
      .lisa_hops(pc_hops[b])
    );
  end

  assign stall = (|ds_stall) || (|pc_stall);

  // -------------------------------------------------- controller-side access
  logic             c_en, c_we;
  logic [BK_W-1:0]  c_bank;
  always_comb begin
    c_en   = 1'b0;
    c_we   = 1'b0;
    c_bank = '0;
    for (int b = NB - 1; b >= 0; b--)
      if (rd_beat[b] || wr_beat[b]) begin
        c_en   = 1'b1;
        c_we   = wr_beat[b];
        c_bank = BK_W'(b);
      end
  end

  // ------------------------------------------------------ board memory link
  logic             sync_active, m_en, m_we;
  logic [BK_W-1:0]  m_bank;
  logic [IDX_W-1:0] m_idx;
  logic [COL_W-1:0] m_col;
  logic [DQ_W-1:0]  dq_in_m, dq_out_m;

  dsync_axi_ctrl #(.NB(NB), .ROWS(ROWS), .ROW_W(ROW_W), .COLS(COLS), .DATA_W(DQ_W),
                   .ADDR_W(AXI_ADDR_W)) u_axi (
    .clk, .rst_n,
    .sync_req, .sync_wb, .sync_idx, .sync_row, .sync_done,
    .active(sync_active), .m_en, .m_we, .m_bank, .m_idx, .m_col, .m_wdata(dq_in_m),
    .m_rdata(dq_out_m),
    .awaddr(m_axi_awaddr), .awlen(m_axi_awlen), .awsize(m_axi_awsize), .awburst(m_axi_awburst),
    .awvalid(m_axi_awvalid), .awready(m_axi_awready),
    .wdata(m_axi_wdata), .wstrb(m_axi_wstrb), .wlast(m_axi_wlast), .wvalid(m_axi_wvalid),
    .wready(m_axi_wready), .bresp(m_axi_bresp), .bvalid(m_axi_bvalid), .bready(m_axi_bready),
    .araddr(m_axi_araddr), .arlen(m_axi_arlen), .arsize(m_axi_arsize), .arburst(m_axi_arburst),
    .arvalid(m_axi_arvalid), .arready(m_axi_arready),
    .rdata(m_axi_rdata), .rresp(m_axi_rresp), .rlast(m_axi_rlast), .rvalid(m_axi_rvalid),
    .rready(m_axi_rready)
  );

  // --------------------------------------------------------------- data path
  logic                      a_en, a_we;
  logic [BK_W-1:0]           a_bank;
  logic [IDX_W-1:0]          a_idx;
  logic [COL_W-1:0]          a_col;
  logic [NCHIPS-1:0][DW-1:0] chip_wdata, chip_rdata;

  dq_slice_demux #(.NCHIPS(NCHIPS), .DW(DW), .BK_W(BK_W), .IDX_W(IDX_W), .COL_W(COL_W)) u_in (
    .sel_m(sync_active),
    .c_en, .c_we, .c_bank, .c_idx(ds_idx[c_bank]), .c_col(cur_col[c_bank]), .dq_in_c(dq_in),
    .m_en, .m_we, .m_bank, .m_idx, .m_col, .dq_in_m,
    .a_en, .a_we, .a_bank, .a_idx, .a_col, .chip_wdata
  );

  for (genvar i = 0; i < NCHIPS; i++) begin : g_chip
    chip #(.NBG(NBG), .NBA(NBA), .ROWS(ROWS), .COLS(COLS), .DW(DW)) u_chip (
      .clk, .rst_n,
      .en(a_en), .we(a_we), .bank(a_bank), .idx(a_idx), .col(a_col),
      .wdata(chip_wdata[i]), .rdata(chip_rdata[i]),
      .pu_cmd, .pu_busy(pu_busy[i]), .pu_done(pu_done[i])
    );
  end

  dq_concat_mux #(.NCHIPS(NCHIPS), .DW(DW)) u_out (
    .clk, .rst_n, .rd_c(c_en && !c_we && !sync_active), .chip_rdata,
    .dq_out_c(dq_out), .dq_oe, .dqs_t, .dq_out_m
  );

  // -------------------------------------------------------------- statistics
  trace_capture #(.NB(NB), .HOP_W(SA_W)) u_trace (
    .clk, .rst_n, .stall, .cmd_valid, .cmd,
    .react, .tra(pc_tra), .copy(pc_copy), .hops(pc_hops),
    .hit(ds_hit), .miss(ds_miss), .wb(ds_wb), .violation,
    .stats
  );

endmodule
