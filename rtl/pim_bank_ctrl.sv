// pim_bank_ctrl: sequences the in-memory operations of one bank.
//
// Bulk bitwise PiM is driven through ordinary DDR4 commands, as RowClone and
// Ambit do:
//  * a second ACT to a bank whose row is open (the bank state machine goes
//    to ReActivating) copies the open (source) row into the newly activated
//    (destination) row: RowClone fast parallel mode when both rows are in the
//    same subarray, a LISA copy over the inter-subarray links otherwise (the
//    number of subarray hops is reported for statistics);
//  * an ACT from Idle to one of the reserved triple-row addresses performs a
//    triple-row activation (Ambit AND/OR through majority);
//  * the reserved rows T0..T3, DCC0/DCC1 (with their negated wordlines) and
//    C0/C1 can be the source or destination of a copy (Ambit NOT, operand
//    staging and result return).
// Ordinary rows are first mapped to bank module rows by the bank's row cache
// (source read, destination write; the source row is pinned while the
// destination is looked up); then the command is sent to the bank processing
// units of all chips. stall stays high from the cycle after the ACT until the
// processing units report done, so emulated time does not advance during the
// emulation work.
// The triggering commands follow the published design's ReActivating state and its
// RowClone/LISA/Ambit strategies; the reserved row map and the sequencing are
// this design's choices.
// Lint note: only the fields of the decoded reserved-row records that the
// source or the destination role needs are read, so some bits stay unused.
module pim_bank_ctrl
  import pim_pkg::*;
#(
  parameter int unsigned ROWS          = 32,
  parameter int unsigned ROW_W         = 16,
  parameter int unsigned SUBARRAY_ROWS = 512,
  localparam int unsigned IDX_W = $clog2(ROWS),
  localparam int unsigned SA_SH = $clog2(SUBARRAY_ROWS),
  localparam int unsigned SA_W  = (ROW_W > SA_SH) ? ROW_W - SA_SH : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             act_idle,   // ACT accepted in Idle
  input  logic             react,      // ACT accepted in Bank Active
  input  logic [ROW_W-1:0] src_row,    // row open before the ACT
  input  logic [ROW_W-1:0] dst_row,    // row of the ACT
  // row cache of this bank
  output logic             ds_req,
  output logic [ROW_W-1:0] ds_row,
  output logic             ds_write,
  output logic             ds_pin_valid,
  output logic [IDX_W-1:0] ds_pin_idx,
  input  logic             ds_done,
  input  logic [IDX_W-1:0] ds_idx,
  // processing units of this bank
  output pu_cmd_t          pu_cmd,
  input  logic             pu_done,
  output logic             stall,
  output logic             tra_pulse,
  output logic             copy_pulse,
  output logic [SA_W-1:0]  lisa_hops   // valid with copy_pulse
);

  typedef enum logic [2:0] {
    PC_IDLE, PC_LOOK_SRC, PC_WAIT_SRC, PC_LOOK_DST, PC_WAIT_DST, PC_ISSUE, PC_WAIT_PU
  } pc_state_t;

  pc_state_t        st;
  logic [ROW_W-1:0] r_src, r_dst;
  logic             r_tra;
  logic [IDX_W-1:0] src_idx, dst_idx;
  amb_row_t         dsrc, ddst;

  function automatic logic is_special(input logic [ROW_W-1:0] r);
    return &r[ROW_W-1:4];
  endfunction

  assign dsrc = decode_ambit_row(r_src[3:0], is_special(r_src));
  assign ddst = decode_ambit_row(r_dst[3:0], is_special(r_dst));

  assign stall        = (st != PC_IDLE);
  assign ds_req       = (st == PC_LOOK_SRC) || (st == PC_LOOK_DST);
  assign ds_row       = (st == PC_LOOK_SRC) ? r_src : r_dst;
  assign ds_write     = (st == PC_LOOK_DST);
  assign ds_pin_valid = (st == PC_LOOK_DST || st == PC_WAIT_DST) && !dsrc.special;
  assign ds_pin_idx   = src_idx;
  assign tra_pulse    = (st == PC_ISSUE) && r_tra;
  assign copy_pulse   = (st == PC_ISSUE) && !r_tra;

  logic [SA_W-1:0] sa_src, sa_dst;
  assign sa_src    = SA_W'(r_src >> SA_SH);
  assign sa_dst    = SA_W'(r_dst >> SA_SH);
  assign lisa_hops = (dsrc.special || ddst.special) ? '0 :
                     (sa_src > sa_dst) ? sa_src - sa_dst : sa_dst - sa_src;

  always_comb begin
    pu_cmd       = '0;
    pu_cmd.valid = (st == PC_ISSUE);
    if (r_tra) begin
      pu_cmd.op       = PU_TRA;
      pu_cmd.tra_mask = ddst.amask;
      pu_cmd.src_kind = SRC_C0;
    end else begin
      pu_cmd.op = PU_COPY;
      if (dsrc.special) begin
        pu_cmd.src_kind = dsrc.src_kind;
        pu_cmd.src_amb  = dsrc.src_idx;
        pu_cmd.src_neg  = dsrc.neg;
      end else begin
        pu_cmd.src_kind = SRC_LOCAL;
        pu_cmd.src_idx  = PU_IDX_W'(src_idx);
      end
      if (ddst.special) begin
        pu_cmd.dst_amask = (ddst.src_kind == SRC_AMBIT) ? ddst.amask : '0;
        pu_cmd.dst_neg   = ddst.neg;
      end else begin
        pu_cmd.dst_local = 1'b1;
        pu_cmd.dst_idx   = PU_IDX_W'(dst_idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= PC_IDLE;
      r_src   <= '0;
      r_dst   <= '0;
      r_tra   <= 1'b0;
      src_idx <= '0;
      dst_idx <= '0;
    end else begin
      unique case (st)
        PC_IDLE: begin
          if (act_idle && is_special(dst_row) &&
              decode_ambit_row(dst_row[3:0], 1'b1).is_tra) begin
            r_dst <= dst_row;
            r_src <= dst_row;
            r_tra <= 1'b1;
            st    <= PC_ISSUE;
          end else if (react) begin
            r_src <= src_row;
            r_dst <= dst_row;
            r_tra <= 1'b0;
            st    <= !is_special(src_row) ? PC_LOOK_SRC :
                     !is_special(dst_row) ? PC_LOOK_DST : PC_ISSUE;
          end
        end
        PC_LOOK_SRC: st <= PC_WAIT_SRC;
        PC_WAIT_SRC: if (ds_done) begin
          src_idx <= ds_idx;
          st      <= ddst.special ? PC_ISSUE : PC_LOOK_DST;
        end
        PC_LOOK_DST: st <= PC_WAIT_DST;
        PC_WAIT_DST: if (ds_done) begin
          dst_idx <= ds_idx;
          st      <= PC_ISSUE;
        end
        PC_ISSUE:   st <= PC_WAIT_PU;
        PC_WAIT_PU: if (pu_done) st <= PC_IDLE;
        default:    st <= PC_IDLE;
      endcase
    end
  end

endmodule
