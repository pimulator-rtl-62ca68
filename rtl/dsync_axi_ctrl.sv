// dsync_axi_ctrl: links the per-bank row caches with board memory over AXI.
//
// Each bank's data synchronization engine asks for a whole-row transfer with
// sync_req (sync_wb = 1: write the local row back to board memory, 0: fetch
// the memory row into the local row). Requests are served one at a time, the
// lowest bank number first. The controller walks the row column by column
// over the model's internal data path (m_* port, the same port the memory bus
// uses, free because emulated activity is stalled during a transfer): one
// column of all chips is one AXI data beat of DATA_W bits.
//
// Fixed addressing: a memory row of a bank is stored contiguously at
//   ((bank * 2^ROW_W + row) * COLS + col) * DATA_W/8
// so a row is one linear INCR region, split into bursts of at most
// MAX_BEATS beats (256, the AXI4 limit).
//
// Timing: write back takes three cycles per beat plus the AW and B handshakes
// of each burst; a fetch takes one cycle per R beat plus the AR handshake.
// sync_done pulses for one cycle for the requesting bank at the end.
// The role of the block and that it uses AXI follow the published PiMulator design; the address
// layout, the burst split and the beat-serial flow are this design's choices.
// Lint note: bresp and rresp are accepted but not checked; board memory is
// assumed not to report errors.
module dsync_axi_ctrl #(
  parameter int unsigned NB         = 16,
  parameter int unsigned ROWS       = 32,
  parameter int unsigned ROW_W      = 16,
  parameter int unsigned COLS       = 1024,
  parameter int unsigned DATA_W     = 64,
  parameter int unsigned ADDR_W     = 34,
  parameter int unsigned MAX_BEATS  = 256,
  localparam int unsigned BK_W  = $clog2(NB),
  localparam int unsigned IDX_W = $clog2(ROWS),
  localparam int unsigned COL_W = $clog2(COLS),
  localparam int unsigned BURST = (COLS < MAX_BEATS) ? COLS : MAX_BEATS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // row cache requests
  input  logic [NB-1:0]            sync_req,
  input  logic [NB-1:0]            sync_wb,
  input  logic [NB-1:0][IDX_W-1:0] sync_idx,
  input  logic [NB-1:0][ROW_W-1:0] sync_row,
  output logic [NB-1:0]            sync_done,
  // internal data path to the bank modules
  output logic                     active,
  output logic                     m_en,
  output logic                     m_we,
  output logic [BK_W-1:0]          m_bank,
  output logic [IDX_W-1:0]         m_idx,
  output logic [COL_W-1:0]         m_col,
  output logic [DATA_W-1:0]        m_wdata,
  input  logic [DATA_W-1:0]        m_rdata,
  // AXI4 master
  output logic [ADDR_W-1:0]        awaddr,
  output logic [7:0]               awlen,
  output logic [2:0]               awsize,
  output logic [1:0]               awburst,
  output logic                     awvalid,
  input  logic                     awready,
  output logic [DATA_W-1:0]        wdata,
  output logic [DATA_W/8-1:0]      wstrb,
  output logic                     wlast,
  output logic                     wvalid,
  input  logic                     wready,
  input  logic [1:0]               bresp,
  input  logic                     bvalid,
  output logic                     bready,
  output logic [ADDR_W-1:0]        araddr,
  output logic [7:0]               arlen,
  output logic [2:0]               arsize,
  output logic [1:0]               arburst,
  output logic                     arvalid,
  input  logic                     arready,
  input  logic [DATA_W-1:0]        rdata,
  input  logic [1:0]               rresp,
  input  logic                     rlast,
  input  logic                     rvalid,
  output logic                     rready
);

  typedef enum logic [3:0] {
    AX_IDLE, AX_AW, AX_RD_REQ, AX_RD_CAP, AX_W, AX_B, AX_AR, AX_R, AX_DONE
  } ax_state_t;

  ax_state_t          st;
  logic [BK_W-1:0]    sel;
  logic [IDX_W-1:0]   lidx;
  logic [ROW_W-1:0]   mrow;
  logic [COL_W:0]     col;      // one extra bit: reaches COLS at the end
  logic [DATA_W-1:0]  wbuf;

  logic               any_req;
  logic [BK_W-1:0]    pick;

  always_comb begin
    any_req = 1'b0;
    pick    = '0;
    for (int b = NB - 1; b >= 0; b--)
      if (sync_req[b]) begin
        any_req = 1'b1;
        pick    = BK_W'(b);
      end
  end

  localparam int unsigned BYTE_SH = $clog2(DATA_W / 8);

  logic [ADDR_W-1:0] cur_addr;
  assign cur_addr = ADDR_W'({sel, mrow, col[COL_W-1:0]}) << BYTE_SH;

  assign active  = (st != AX_IDLE);
  assign awaddr  = cur_addr;
  assign araddr  = cur_addr;
  assign awlen   = 8'(BURST - 1);
  assign arlen   = 8'(BURST - 1);
  assign awsize  = 3'(BYTE_SH);
  assign arsize  = 3'(BYTE_SH);
  assign awburst = 2'b01;
  assign arburst = 2'b01;
  assign awvalid = (st == AX_AW);
  assign arvalid = (st == AX_AR);
  assign wvalid  = (st == AX_W);
  assign wdata   = wbuf;
  assign wstrb   = '1;
  assign wlast   = (st == AX_W) && (((32'(col) + 32'd1) % BURST) == 0);
  assign bready  = (st == AX_B);
  assign rready  = (st == AX_R);

  assign m_bank  = sel;
  assign m_idx   = lidx;
  assign m_col   = col[COL_W-1:0];
  assign m_en    = (st == AX_RD_REQ) || (st == AX_R && rvalid);
  assign m_we    = (st == AX_R);
  assign m_wdata = rdata;

  always_comb begin
    sync_done = '0;
    if (st == AX_DONE) sync_done[sel] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= AX_IDLE;
      sel  <= '0;
      lidx <= '0;
      mrow <= '0;
      col  <= '0;
      wbuf <= '0;
    end else begin
      unique case (st)
        AX_IDLE: if (any_req) begin
          sel  <= pick;
          lidx <= sync_idx[pick];
          mrow <= sync_row[pick];
          col  <= '0;
          st   <= sync_wb[pick] ? AX_AW : AX_AR;
        end
        AX_AW:     if (awready) st <= AX_RD_REQ;
        AX_RD_REQ: st <= AX_RD_CAP;
        AX_RD_CAP: begin
          wbuf <= m_rdata;
          st   <= AX_W;
        end
        AX_W: if (wready) begin
          col <= col + 1'b1;
          st  <= wlast ? AX_B : AX_RD_REQ;
        end
        AX_B: if (bvalid) st <= (col == (COL_W+1)'(COLS)) ? AX_DONE : AX_AW;
        AX_AR: if (arready) st <= AX_R;
        AX_R: if (rvalid) begin
          col <= col + 1'b1;
          if (rlast) st <= (col + 1'b1 == (COL_W+1)'(COLS)) ? AX_DONE : AX_AR;
        end
        AX_DONE: st <= AX_IDLE;
        default: st <= AX_IDLE;
      endcase
    end
  end

endmodule
