// chip: one memory chip of the rank.
//
// A chip holds NBG bank groups of NBA banks. It takes its DW-bit slice of the
// data bus; the flat bank number (bank group in the high bits, bank in the
// low bits) selects the bank group, which selects the bank. Read data comes
// back one cycle after the access from the bank group read in that cycle.
// Processing-unit commands are given per flat bank number and are the same
// for every chip, so all chips of the rank compute in lockstep on their own
// slices of a row.
// The chip / bank group / bank hierarchy follows the published PiMulator design; the flat bank
// numbering is this design's choice.
module chip
  import pim_pkg::*;
#(
  parameter int unsigned NBG  = 4,
  parameter int unsigned NBA  = 4,
  parameter int unsigned ROWS = 32,
  parameter int unsigned COLS = 1024,
  parameter int unsigned DW   = 4,
  localparam int unsigned NB    = NBG * NBA,
  localparam int unsigned BG_W  = $clog2(NBG),
  localparam int unsigned BA_W  = $clog2(NBA),
  localparam int unsigned BK_W  = BG_W + BA_W,
  localparam int unsigned IDX_W = $clog2(ROWS),
  localparam int unsigned COL_W = $clog2(COLS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               we,
  input  logic [BK_W-1:0]    bank,
  input  logic [IDX_W-1:0]   idx,
  input  logic [COL_W-1:0]   col,
  input  logic [DW-1:0]      wdata,
  output logic [DW-1:0]      rdata,
  input  pu_cmd_t [NB-1:0]   pu_cmd,
  output logic [NB-1:0]      pu_busy,
  output logic [NB-1:0]      pu_done
);

  logic [NBG-1:0][DW-1:0] bg_rdata;
  logic [BG_W-1:0]        rd_sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         rd_sel <= '0;
    else if (en && !we) rd_sel <= bank[BK_W-1:BA_W];
  end
  assign rdata = bg_rdata[rd_sel];

  for (genvar g = 0; g < NBG; g++) begin : g_bg
    bank_group #(.NBA(NBA), .ROWS(ROWS), .COLS(COLS), .DW(DW)) u_bg (
      .clk, .rst_n,
      .en     (en && bank[BK_W-1:BA_W] == BG_W'(g)),
      .we,
      .bank   (bank[BA_W-1:0]),
      .idx, .col, .wdata,
      .rdata  (bg_rdata[g]),
      .pu_cmd (pu_cmd[g*NBA +: NBA]),
      .pu_busy(pu_busy[g*NBA +: NBA]),
      .pu_done(pu_done[g*NBA +: NBA])
    );
  end

endmodule
