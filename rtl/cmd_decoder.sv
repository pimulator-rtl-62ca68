// cmd_decoder: DDR4 command decoder with RAS/CAS bookkeeping.
//
// Translates the DIMM command pins into memory commands following the DDR4
// truth table (CS_n low; ACT_n low is ACTIVATE, otherwise RAS_n/CAS_n/WE_n on
// A16/A15/A14 select MRS, REF, PRE, WR, RD, ZQC or NOP; A10 selects auto
// precharge for RD/WR and all-bank precharge for PRE). On ACT the row address
// is recorded as the open row of the addressed bank; on RD/WR the column is
// recorded and a per-bank burst counter restarts, then advances on every
// data beat the bank's state machine reports (burst_inc), giving the column
// of the current beat in DDR4 sequential burst order (the low log2(BL) bits
// wrap).
//
// Timing: the model clock runs at twice the interface clock. A command is
// taken in a model clock cycle in which ck_t is high, cs_n is low and en is
// high; the decoded command is combinational and valid in that same cycle,
// open_row/cur_col update at the end of it. cmd_prev_row gives the row that
// was open before the command (the source row of a second activation).
// The truth table and the row/column/burst bookkeeping follow the published PiMulator design;
// the single-cycle command window and the fixed BL8 are this design's choice.
// Lint note: A17 is not used. The 8 GB rank is built from 4 Gb x4 devices
// with 16 row address bits (A15..A0); A16..A14 carry RAS/CAS/WE.
module cmd_decoder
  import pim_pkg::*;
#(
  parameter int unsigned BG_W  = 2,
  parameter int unsigned BA_W  = 2,
  parameter int unsigned ROW_W = 16,
  parameter int unsigned COL_W = 10,
  parameter int unsigned BL    = 8,
  localparam int unsigned NB   = 1 << (BG_W + BA_W),
  localparam int unsigned BK_W = BG_W + BA_W,
  localparam int unsigned BC_W = $clog2(BL)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,        // low while the emulated system is stalled
  input  logic                  ck_t,      // interface clock level, sampled by the model clock
  input  logic                  cs_n,
  input  logic                  act_n,
  input  logic [BG_W-1:0]       bg,
  input  logic [BA_W-1:0]       ba,
  input  logic [17:0]           addr,      // A17..A0; A16/A15/A14 double as RAS_n/CAS_n/WE_n
  input  logic [NB-1:0]         burst_inc, // one data beat of this bank's burst done
  output logic                  cmd_valid,
  output cmd_t                  cmd,
  output logic [BK_W-1:0]       cmd_bank,
  output logic [ROW_W-1:0]      cmd_row,
  output logic [ROW_W-1:0]      cmd_prev_row,
  output logic [COL_W-1:0]      cmd_col,
  output logic                  cmd_ap,
  output logic [NB-1:0][ROW_W-1:0] open_row,
  output logic [NB-1:0][COL_W-1:0] cur_col
);

  logic [NB-1:0][COL_W-1:0] col_base;
  logic [NB-1:0][BC_W-1:0]  burst_cnt;

  always_comb begin
    cmd = CMD_NOP;
    if (en && ck_t && !cs_n) begin
      if (!act_n) cmd = CMD_ACT;
      else begin
        unique case (addr[16:14])   // RAS_n, CAS_n, WE_n
          3'b000: cmd = CMD_MRS;
          3'b001: cmd = CMD_REF;
          3'b010: cmd = addr[10] ? CMD_PREA : CMD_PRE;
          3'b011: cmd = CMD_RFU;
          3'b100: cmd = addr[10] ? CMD_WRA : CMD_WR;
          3'b101: cmd = addr[10] ? CMD_RDA : CMD_RD;
          3'b110: cmd = CMD_ZQC;
          default: cmd = CMD_NOP;
        endcase
      end
    end
  end

  assign cmd_valid    = (cmd != CMD_NOP);
  assign cmd_bank     = {bg, ba};
  assign cmd_row      = addr[ROW_W-1:0];
  assign cmd_col      = addr[COL_W-1:0];
  assign cmd_ap       = addr[10];
  assign cmd_prev_row = open_row[cmd_bank];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      open_row  <= '0;
      col_base  <= '0;
      burst_cnt <= '0;
    end else begin
      for (int b = 0; b < NB; b++) begin
        if (cmd_bank == BK_W'(b) && cmd == CMD_ACT) open_row[b] <= cmd_row;
        if (cmd_bank == BK_W'(b) &&
            (cmd == CMD_RD || cmd == CMD_RDA || cmd == CMD_WR || cmd == CMD_WRA)) begin
          col_base[b]  <= cmd_col;
          burst_cnt[b] <= '0;
        end else if (burst_inc[b]) begin
          burst_cnt[b] <= burst_cnt[b] + 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int b = 0; b < NB; b++)
      cur_col[b] = {col_base[b][COL_W-1:BC_W], col_base[b][BC_W-1:0] + burst_cnt[b]};
  end

endmodule
