// bank_group: one bank group of one chip.
//
// Holds NBA bank modules, each with its bank processing unit. The bus port
// (the chip's share of the memory data bus, or the board-memory transfer
// path) is demultiplexed to the bank named by `bank`; the read word of the
// bank read in the previous cycle is returned on rdata. While a bank's
// processing unit is busy it owns that bank's storage port; otherwise the bus
// port does. The processing units of bank b are started by pu_cmd[b], which
// is shared by all chips, and report busy/done per bank.
// Timing: read data one cycle after the access.
// The hierarchy (bank group of banks with a PiM unit beside each bank)
// follows the published PiMulator design; the port sharing rule is this design's choice.
module bank_group
  import pim_pkg::*;
#(
  parameter int unsigned NBA  = 4,
  parameter int unsigned ROWS = 32,
  parameter int unsigned COLS = 1024,
  parameter int unsigned DW   = 4,
  localparam int unsigned BA_W  = $clog2(NBA),
  localparam int unsigned IDX_W = $clog2(ROWS),
  localparam int unsigned COL_W = $clog2(COLS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                we,
  input  logic [BA_W-1:0]     bank,
  input  logic [IDX_W-1:0]    idx,
  input  logic [COL_W-1:0]    col,
  input  logic [DW-1:0]       wdata,
  output logic [DW-1:0]       rdata,
  input  pu_cmd_t [NBA-1:0]   pu_cmd,
  output logic [NBA-1:0]      pu_busy,
  output logic [NBA-1:0]      pu_done
);

  logic [NBA-1:0][DW-1:0] bank_rdata;
  logic [BA_W-1:0]        rd_sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               rd_sel <= '0;
    else if (en && !we)       rd_sel <= bank;
  end
  assign rdata = bank_rdata[rd_sel];

  for (genvar b = 0; b < NBA; b++) begin : g_bank
    logic             p_en, p_we;
    logic [IDX_W-1:0] p_idx;
    logic [COL_W-1:0] p_col;
    logic [DW-1:0]    p_wdata;
    logic             m_en, m_we;
    logic [IDX_W-1:0] m_idx;
    logic [COL_W-1:0] m_col;
    logic [DW-1:0]    m_wdata;

    bank_pu #(.ROWS(ROWS), .COLS(COLS), .DW(DW)) u_pu (
      .clk, .rst_n,
      .op_valid (pu_cmd[b].valid),
      .op       (pu_cmd[b].op),
      .src_kind (pu_cmd[b].src_kind),
      .src_idx  (pu_cmd[b].src_idx[IDX_W-1:0]),
      .src_amb  (pu_cmd[b].src_amb),
      .src_neg  (pu_cmd[b].src_neg),
      .dst_local(pu_cmd[b].dst_local),
      .dst_idx  (pu_cmd[b].dst_idx[IDX_W-1:0]),
      .dst_amask(pu_cmd[b].dst_amask),
      .dst_neg  (pu_cmd[b].dst_neg),
      .tra_mask (pu_cmd[b].tra_mask),
      .busy     (pu_busy[b]),
      .done     (pu_done[b]),
      .b_en     (p_en),
      .b_we     (p_we),
      .b_idx    (p_idx),
      .b_col    (p_col),
      .b_wdata  (p_wdata),
      .b_rdata  (bank_rdata[b])
    );

    always_comb begin
      if (pu_busy[b]) begin
        m_en = p_en;  m_we = p_we;  m_idx = p_idx;  m_col = p_col;  m_wdata = p_wdata;
      end else begin
        m_en = en && bank == BA_W'(b);
        m_we = we;  m_idx = idx;  m_col = col;  m_wdata = wdata;
      end
    end

    bank_mem #(.ROWS(ROWS), .COLS(COLS), .DW(DW)) u_mem (
      .clk, .en(m_en), .we(m_we), .idx(m_idx), .col(m_col), .wdata(m_wdata), .rdata(bank_rdata[b])
    );
  end

endmodule
