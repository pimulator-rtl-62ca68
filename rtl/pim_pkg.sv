// pim_pkg: types and constants shared by the memory + PiM channel model.
//
// Holds the decoded DDR4 command set, the bank state encoding of the per-bank
// timing state machine, the row selector used by the bank processing unit, the
// reserved Ambit row map and the statistics record of the trace capture block.
// The command set and the bank states follow the DDR4 truth table and the bank
// state diagram of the model; the numeric encodings, the reserved row map and
// the statistics record layout are this design's own choices.
package pim_pkg;

  // Decoded memory command (DDR4 truth table, CS_n low).
  typedef enum logic [3:0] {
    CMD_NOP  = 4'd0,
    CMD_ACT  = 4'd1,
    CMD_RD   = 4'd2,
    CMD_RDA  = 4'd3,
    CMD_WR   = 4'd4,
    CMD_WRA  = 4'd5,
    CMD_PRE  = 4'd6,
    CMD_PREA = 4'd7,
    CMD_REF  = 4'd8,
    CMD_MRS  = 4'd9,
    CMD_ZQC  = 4'd10,
    CMD_RFU  = 4'd11
  } cmd_t;

  // Bank state (bank state and timing diagram).
  typedef enum logic [3:0] {
    ST_IDLE          = 4'd0,
    ST_ACTIVATING    = 4'd1,
    ST_ACTIVE        = 4'd2,
    ST_REACTIVATING  = 4'd3,
    ST_READING       = 4'd4,
    ST_READING_APR   = 4'd5,
    ST_WRITING       = 4'd6,
    ST_WRITING_APR   = 4'd7,
    ST_PRECHARGING   = 4'd8,
    ST_REFRESHING    = 4'd9
  } bank_state_t;

  // Dedicated Ambit rows held by each bank processing unit:
  // T0..T3 designated rows and the two dual-contact rows DCC0, DCC1.
  localparam int unsigned N_AMBIT = 6;
  localparam int unsigned AMB_T0 = 0, AMB_T1 = 1, AMB_T2 = 2, AMB_T3 = 3,
                          AMB_DCC0 = 4, AMB_DCC1 = 5;

  // Where a bank processing unit reads a row from.
  typedef enum logic [1:0] {
    SRC_LOCAL = 2'd0,   // a bank module row (index given by the row cache)
    SRC_AMBIT = 2'd1,   // one dedicated Ambit row (optionally through its negated wordline)
    SRC_C0    = 2'd2,   // constant all-zero row
    SRC_C1    = 2'd3    // constant all-one row
  } src_kind_t;

  // Decoded meaning of a reserved row address.
  typedef struct packed {
    logic               special;  // address lies in the reserved Ambit window
    logic               is_tra;   // activating it performs a triple-row activation
    src_kind_t          src_kind; // how it reads when used as a copy source
    logic [2:0]         src_idx;  // Ambit row read as a copy source
    logic               neg;      // negated wordline of a dual-contact row
    logic [N_AMBIT-1:0] amask;    // Ambit rows written when it is a copy destination
  } amb_row_t;

  // Reserved row map: the 16 highest row addresses of every bank.
  //   +0..+3 T0..T3    +4 DCC0  +5 DCC0 negated  +6 DCC1  +7 DCC1 negated
  //   +8 C0 (zeros)    +9 C1 (ones)
  //   +12 {T0,T1,T2}   +13 {T1,T2,T3}   +14 {DCC0,T1,T2}   +15 {DCC1,T0,T3}
  function automatic amb_row_t decode_ambit_row(input logic [3:0] off, input logic special);
    amb_row_t r;
    r          = '0;
    r.special  = special;
    r.src_kind = SRC_AMBIT;
    if (special) begin
      unique case (off)
        4'd0:  begin r.src_idx = 3'(AMB_T0);   r.amask = 6'b000001; end
        4'd1:  begin r.src_idx = 3'(AMB_T1);   r.amask = 6'b000010; end
        4'd2:  begin r.src_idx = 3'(AMB_T2);   r.amask = 6'b000100; end
        4'd3:  begin r.src_idx = 3'(AMB_T3);   r.amask = 6'b001000; end
        4'd4:  begin r.src_idx = 3'(AMB_DCC0); r.amask = 6'b010000; end
        4'd5:  begin r.src_idx = 3'(AMB_DCC0); r.amask = 6'b010000; r.neg = 1'b1; end
        4'd6:  begin r.src_idx = 3'(AMB_DCC1); r.amask = 6'b100000; end
        4'd7:  begin r.src_idx = 3'(AMB_DCC1); r.amask = 6'b100000; r.neg = 1'b1; end
        4'd8:  begin r.src_kind = SRC_C0; end
        4'd9:  begin r.src_kind = SRC_C1; end
        4'd12: begin r.is_tra = 1'b1; r.src_idx = 3'(AMB_T0);   r.amask = 6'b000111; end
        4'd13: begin r.is_tra = 1'b1; r.src_idx = 3'(AMB_T1);   r.amask = 6'b001110; end
        4'd14: begin r.is_tra = 1'b1; r.src_idx = 3'(AMB_DCC0); r.amask = 6'b010110; end
        4'd15: begin r.is_tra = 1'b1; r.src_idx = 3'(AMB_DCC1); r.amask = 6'b101001; end
        default: begin r.src_kind = SRC_C0; end
      endcase
    end
    return r;
  endfunction

  // Bank processing unit operation.
  typedef enum logic [1:0] {
    PU_COPY = 2'd0,   // RowClone copy, source row to destination row(s)
    PU_TRA  = 2'd1    // triple-row activation: majority written back to all three rows
  } pu_op_t;

  // Command to the bank processing units of one bank (all chips alike).
  localparam int unsigned PU_IDX_W = 8;   // local row index field, up to 256 rows
  typedef struct packed {
    logic                valid;
    pu_op_t              op;
    src_kind_t           src_kind;
    logic [PU_IDX_W-1:0] src_idx;
    logic [2:0]          src_amb;
    logic                src_neg;
    logic                dst_local;
    logic [PU_IDX_W-1:0] dst_idx;
    logic [N_AMBIT-1:0]  dst_amask;
    logic                dst_neg;
    logic [N_AMBIT-1:0]  tra_mask;
  } pu_cmd_t;

  // Statistics collected by the trace capture block.
  typedef struct packed {
    logic [31:0] cycles;        // emulated (not stalled) model clock cycles
    logic [31:0] stall_cycles;  // cycles the emulated system was paused
    logic [31:0] n_act;
    logic [31:0] n_rd;
    logic [31:0] n_wr;
    logic [31:0] n_pre;
    logic [31:0] n_ref;
    logic [31:0] n_reactivate;  // second activations (RowClone / Ambit)
    logic [31:0] n_tra;         // triple-row activations
    logic [31:0] n_lisa_hops;   // inter-subarray hops of LISA copies
    logic [31:0] n_hit;         // row cache hits
    logic [31:0] n_miss;        // row cache misses
    logic [31:0] n_writeback;   // dirty rows written to board memory
    logic [31:0] n_violation;   // commands refused by a bank state machine
  } stats_t;

endpackage
