// dq_slice_demux: input side of the model's internal data bus.
//
// Two sources write into the bank modules: the memory controller through the
// DIMM data pins (dq_in_C, during write bursts) and the board memory through
// the row cache transfer controller (dq_in_M, while a row is fetched). sel_m
// selects the board-memory side together with its access (bank, local row,
// column, write enable); otherwise the controller-side access is used. The
// selected DQ_W-bit word is sliced into NCHIPS slices of DW bits, slice i
// (bits i*DW and up) going to chip i, matching how a x4 rank spreads the bus
// over its chips. Purely combinational.
// The slicing over chips and the controller/board-memory source follow the
// document; the access bundle that travels with the data is this design's
// choice.
module dq_slice_demux #(
  parameter int unsigned NCHIPS = 16,
  parameter int unsigned DW     = 4,
  parameter int unsigned BK_W   = 4,
  parameter int unsigned IDX_W  = 5,
  parameter int unsigned COL_W  = 10,
  localparam int unsigned DQ_W  = NCHIPS * DW
) (
  input  logic                       sel_m,
  input  logic                       c_en,
  input  logic                       c_we,
  input  logic [BK_W-1:0]            c_bank,
  input  logic [IDX_W-1:0]           c_idx,
  input  logic [COL_W-1:0]           c_col,
  input  logic [DQ_W-1:0]            dq_in_c,
  input  logic                       m_en,
  input  logic                       m_we,
  input  logic [BK_W-1:0]            m_bank,
  input  logic [IDX_W-1:0]           m_idx,
  input  logic [COL_W-1:0]           m_col,
  input  logic [DQ_W-1:0]            dq_in_m,
  output logic                       a_en,
  output logic                       a_we,
  output logic [BK_W-1:0]            a_bank,
  output logic [IDX_W-1:0]           a_idx,
  output logic [COL_W-1:0]           a_col,
  output logic [NCHIPS-1:0][DW-1:0]  chip_wdata
);

  logic [DQ_W-1:0] word;

  always_comb begin
    if (sel_m) begin
      a_en = m_en;  a_we = m_we;  a_bank = m_bank;  a_idx = m_idx;  a_col = m_col;  word = dq_in_m;
    end else begin
      a_en = c_en;  a_we = c_we;  a_bank = c_bank;  a_idx = c_idx;  a_col = c_col;  word = dq_in_c;
    end
    for (int i = 0; i < NCHIPS; i++) chip_wdata[i] = word[i*DW +: DW];
  end

endmodule
