// bank_pu: bank processing unit of one bank of one chip (bitwise PiM).
//
// Emulates bulk bitwise processing inside the bank in the style of RowClone
// and Ambit. It holds the dedicated Ambit rows (T0..T3 and the dual-contact
// rows DCC0, DCC1) in distributed RAM: one COLS-word memory whose word holds
// the N_AMBIT rows' DW bits of one column, read asynchronously and written
// back whole, so that a majority reads all rows of a column at once. It works
// on whole rows one column per step:
//   PU_COPY  copy a source row to the destination: the source is a bank
//            module row (through the bank port), an Ambit row, or the
//            constant row C0/C1; src_neg reads a dual-contact row through its
//            negated wordline. The destination is a bank module row and/or
//            the Ambit rows set in dst_amask; dst_neg stores the complement
//            (writing through a negated wordline). This is RowClone-FPM
//            (and, with Ambit rows, the AAP copies Ambit is built from).
//   PU_TRA   triple-row activation: the bitwise majority of the three Ambit
//            rows set in tra_mask is written back to all three. With a C0/C1
//            operand this gives AND/OR; with the DCC rows, NOT.
// Interface: op_valid starts an operation when idle (busy low); busy stays
// high until the one-cycle done pulse. Timing: a copy takes 2 cycles per
// column (read, then write), a TRA 1 cycle per column, plus one cycle.
// The bank port (b_*) is used only while busy.
// The operations follow the Ambit/RowClone strategies of the published PiMulator design; the
// column-serial schedule and the operand encoding are this design's choices.
module bank_pu
  import pim_pkg::*;
#(
  parameter int unsigned ROWS = 32,
  parameter int unsigned COLS = 1024,
  parameter int unsigned DW   = 4,
  localparam int unsigned IDX_W = $clog2(ROWS),
  localparam int unsigned COL_W = $clog2(COLS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               op_valid,
  input  pu_op_t             op,
  input  src_kind_t          src_kind,
  input  logic [IDX_W-1:0]   src_idx,
  input  logic [2:0]         src_amb,
  input  logic               src_neg,
  input  logic               dst_local,
  input  logic [IDX_W-1:0]   dst_idx,
  input  logic [N_AMBIT-1:0] dst_amask,
  input  logic               dst_neg,
  input  logic [N_AMBIT-1:0] tra_mask,
  output logic               busy,
  output logic               done,
  // bank module port
  output logic               b_en,
  output logic               b_we,
  output logic [IDX_W-1:0]   b_idx,
  output logic [COL_W-1:0]   b_col,
  output logic [DW-1:0]      b_wdata,
  input  logic [DW-1:0]      b_rdata
);

  typedef enum logic [2:0] {PU_IDLE, PU_RD, PU_WR, PU_MAJ, PU_DONE} pu_state_t;

  pu_state_t          st;
  logic [N_AMBIT-1:0][DW-1:0] amb [COLS];   // one word per column holds all Ambit rows
  logic [N_AMBIT-1:0][DW-1:0] amb_rd, amb_wr;
  logic [COL_W-1:0]   col;
  src_kind_t          r_src_kind;
  logic [IDX_W-1:0]   r_src_idx, r_dst_idx;
  logic [2:0]         r_src_amb;
  logic               r_src_neg, r_dst_local, r_dst_neg;
  logic [N_AMBIT-1:0] r_dst_amask, r_tra_mask;

  initial begin
    for (int c = 0; c < COLS; c++) amb[c] = '0;
  end

  // Value of the source row at the current column (valid in PU_WR).
  logic [DW-1:0] src_val, maj_val;
  assign amb_rd = amb[col];

  always_comb begin
    unique case (r_src_kind)
      SRC_LOCAL: src_val = b_rdata;
      SRC_AMBIT: src_val = amb_rd[r_src_amb];
      SRC_C0:    src_val = '0;
      default:   src_val = '1;
    endcase
    if (r_src_neg) src_val = ~src_val;
  end

  // Bitwise majority of the three rows in the TRA mask.
  always_comb begin
    for (int b = 0; b < DW; b++) begin
      int unsigned ones;
      ones = 0;
      for (int r = 0; r < N_AMBIT; r++)
        if (r_tra_mask[r] && amb_rd[r][b]) ones++;
      maj_val[b] = (ones >= 2);
    end
  end

  assign busy    = (st != PU_IDLE);
  assign done    = (st == PU_DONE);
  assign b_en    = (st == PU_RD && r_src_kind == SRC_LOCAL) || (st == PU_WR && r_dst_local);
  assign b_we    = (st == PU_WR);
  assign b_idx   = (st == PU_RD) ? r_src_idx : r_dst_idx;
  assign b_col   = col;
  assign b_wdata = r_dst_neg ? ~src_val : src_val;

  always_comb begin
    amb_wr = amb_rd;
    for (int r = 0; r < N_AMBIT; r++) begin
      if (st == PU_WR && r_dst_amask[r]) amb_wr[r] = b_wdata;
      if (st == PU_MAJ && r_tra_mask[r]) amb_wr[r] = maj_val;
    end
  end

  always_ff @(posedge clk)
    if (st == PU_WR || st == PU_MAJ) amb[col] <= amb_wr;


  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= PU_IDLE;
      col         <= '0;
      r_src_kind  <= SRC_C0;
      r_src_idx   <= '0;
      r_src_amb   <= '0;
      r_src_neg   <= 1'b0;
      r_dst_local <= 1'b0;
      r_dst_idx   <= '0;
      r_dst_amask <= '0;
      r_dst_neg   <= 1'b0;
      r_tra_mask  <= '0;
    end else begin
      unique case (st)
        PU_IDLE: if (op_valid) begin
          col         <= '0;
          r_src_kind  <= src_kind;
          r_src_idx   <= src_idx;
          r_src_amb   <= src_amb;
          r_src_neg   <= src_neg;
          r_dst_local <= dst_local;
          r_dst_idx   <= dst_idx;
          r_dst_amask <= dst_amask;
          r_dst_neg   <= dst_neg;
          r_tra_mask  <= tra_mask;
          st          <= (op == PU_TRA) ? PU_MAJ : PU_RD;
        end
        PU_RD: st <= PU_WR;
        PU_WR: begin
          col <= col + 1'b1;
          st  <= (col == COL_W'(COLS - 1)) ? PU_DONE : PU_RD;
        end
        PU_MAJ: begin
          col <= col + 1'b1;
          if (col == COL_W'(COLS - 1)) st <= PU_DONE;
        end
        PU_DONE: st <= PU_IDLE;
        default: st <= PU_IDLE;
      endcase
    end
  end

endmodule
