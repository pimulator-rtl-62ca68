// tb_dsync_axi_ctrl: checks whole-row transfers between bank modules and an
// AXI memory model (2 banks, 4 local rows, 16 columns, bursts of at most 8
// beats): a write back lands at ((bank*2^12 + row)*16 + col)*8 in two bursts,
// a fetch fills the local row with the memory words, sync_done pulses once
// for the requesting bank, and requests of two banks are served in turn.
module tb_dsync_axi_ctrl;
  localparam int NB = 2, ROWS = 4, COLS = 16, DW = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NB-1:0] sync_req = '0, sync_wb = '0, sync_done;
  logic [NB-1:0][1:0] sync_idx = '0;
  logic [NB-1:0][11:0] sync_row = '0;
  logic active, m_en, m_we;
  logic [0:0] m_bank;
  logic [1:0] m_idx;
  logic [3:0] m_col;
  logic [DW-1:0] m_wdata, m_rdata;
  logic [33:0] awaddr, araddr;
  logic [7:0] awlen, arlen;
  logic [2:0] awsize, arsize;
  logic [1:0] awburst, arburst, bresp, rresp;
  logic awvalid, awready, wlast, wvalid, wready, bvalid, bready, arvalid, arready, rlast, rvalid, rready;
  logic [DW-1:0] wdata, rdata;
  logic [7:0] wstrb;
  logic [DW-1:0] bank [NB][ROWS][COLS];
  int checks = 0, failures = 0;
  int unsigned done_cnt [NB];

  dsync_axi_ctrl #(.NB(NB), .ROWS(ROWS), .ROW_W(12), .COLS(COLS), .DATA_W(DW), .MAX_BEATS(8)) dut (.*);
  axi_mem_model #(.ADDR_W(34), .DATA_W(DW)) u_mem (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (m_en && m_we) bank[m_bank][m_idx][m_col] <= m_wdata;
    if (m_en && !m_we) m_rdata <= bank[m_bank][m_idx][m_col];
    for (int b = 0; b < NB; b++) if (sync_done[b]) done_cnt[b]++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic longint unsigned wa(input int b, input int row, input int col);
    return ((longint'(b) << 12) + row) * COLS + col;
  endfunction

  initial begin
    for (int b = 0; b < NB; b++)
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) bank[b][r][c] = {$urandom, $urandom};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // write back bank 1, local row 2, as memory row 33
    sync_req[1] = 1'b1; sync_wb[1] = 1'b1; sync_idx[1] = 2; sync_row[1] = 33;
    while (!sync_done[1]) @(negedge clk);
    sync_req[1] = 1'b0;
    @(negedge clk);
    for (int c = 0; c < COLS; c++)
      chk($sformatf("write back column %0d", c), u_mem.peek(wa(1, 33, c)) == bank[1][2][c]);
    chk("two write bursts", u_mem.n_wbursts == 2);
    chk("neighbouring row untouched", !u_mem.mem.exists(wa(1, 34, 0)) && !u_mem.mem.exists(wa(1, 32, COLS - 1)));
    // fetch for both banks at once: bank 0 first, then bank 1
    sync_req = 2'b11; sync_wb = 2'b00;
    sync_idx[0] = 3; sync_row[0] = 7;
    sync_idx[1] = 0; sync_row[1] = 33;
    while (!sync_done[0]) @(negedge clk);
    sync_req[0] = 1'b0;
    chk("bank 1 still waiting", done_cnt[1] == 1);
    while (!sync_done[1]) @(negedge clk);
    sync_req[1] = 1'b0;
    repeat (3) @(negedge clk);
    for (int c = 0; c < COLS; c++) begin
      chk($sformatf("fetch bank 0 column %0d", c), bank[0][3][c] == u_mem.init_word(wa(0, 7, c)));
      chk($sformatf("refetch bank 1 column %0d", c), bank[1][0][c] == bank[1][2][c]);
    end
    chk("one done pulse per transfer", done_cnt[0] == 1 && done_cnt[1] == 2);
    chk("four read bursts", u_mem.n_rbursts == 4);
    chk("idle", !active);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
