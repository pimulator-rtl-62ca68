// dsync: data synchronization engine of one bank (row cache).
//
// The bank module on the FPGA holds only ROWS whole rows of the bank. This
// engine lets them stand for any row of the emulated bank, like a cache whose
// block is one whole row. A tag table keeps, per local row, a valid and a
// dirty bit, the memory row address and its subarray number (row address /
// SUBARRAY_ROWS). A lookup (req with req_row) compares the row with every tag:
//   Idle --req--> Compare Tag --hit--> Read / Write (Write sets dirty) --> Idle
//   Compare Tag --miss--> Update Tag (replacement policy picks a victim)
//   Update Tag --dirty--> Write Back (dirty=0, stall) --sync--> Allocate
//   Update Tag --not dirty--> Allocate (valid=1, stall) --sync--> Compare Tag
// Write Back and Allocate ask the board memory controller (sync_req, sync_wb
// selects direction, sync_idx/sync_row name the local and memory row) and wait
// for sync_done; stall is high in these two states so that all emulated
// activity pauses and emulated time is preserved.
//
// A pinned local row (pin_valid/pin_idx) is never chosen as the victim; this
// keeps the source row of a row copy in place while its destination is looked
// up. Timing: a hit takes two cycles from req to done (Compare Tag, then Read or
// Write); idx is valid from done until the next lookup.
// The states, the tag contents, stall and the FIFO / random policies follow
// the published PiMulator design; preferring an invalid row over the policy's victim, the LFSR
// used for the random policy, the pin and the request/done handshake are this design's
// choices.
module dsync #(
  parameter int unsigned ROWS          = 32,
  parameter int unsigned ROW_W         = 16,
  parameter int unsigned SUBARRAY_ROWS = 512,
  parameter bit          POLICY_RANDOM = 1'b0,   // 0: FIFO, 1: random
  localparam int unsigned IDX_W = $clog2(ROWS),
  localparam int unsigned SA_SH = $clog2(SUBARRAY_ROWS),
  localparam int unsigned SA_W  = (ROW_W > SA_SH) ? ROW_W - SA_SH : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req,
  input  logic [ROW_W-1:0] req_row,
  input  logic             req_write,
  input  logic             pin_valid,   // keep this local row from being replaced
  input  logic [IDX_W-1:0] pin_idx,
  output logic             done,
  output logic [IDX_W-1:0] idx,
  output logic [SA_W-1:0]  idx_subarray,
  output logic             hit_pulse,
  output logic             miss_pulse,
  output logic             wb_pulse,
  output logic             stall,
  output logic             busy,
  output logic             sync_req,
  output logic             sync_wb,
  output logic [IDX_W-1:0] sync_idx,
  output logic [ROW_W-1:0] sync_row,
  input  logic             sync_done
);

  typedef enum logic [2:0] {
    DS_IDLE, DS_COMPARE, DS_READ, DS_WRITE, DS_UPDATE, DS_WRITEBACK, DS_ALLOCATE
  } ds_state_t;

  ds_state_t              st;
  logic [ROWS-1:0]        valid, dirty;
  logic [ROW_W-1:0]       tag_row [ROWS];
  logic [SA_W-1:0]        tag_sa  [ROWS];
  logic [ROW_W-1:0]       lat_row;
  logic                   lat_write, refill;
  logic [IDX_W-1:0]       victim, fifo_ptr;
  logic [15:0]            lfsr;

  logic                   hit;
  logic [IDX_W-1:0]       hit_idx, free_idx;
  logic                   have_free;

  always_comb begin
    hit      = 1'b0;
    hit_idx  = '0;
    have_free = 1'b0;
    free_idx = '0;
    for (int i = ROWS - 1; i >= 0; i--) begin
      if (valid[i] && tag_row[i] == lat_row) begin
        hit     = 1'b1;
        hit_idx = IDX_W'(i);
      end
      if (!valid[i]) begin
        have_free = 1'b1;
        free_idx  = IDX_W'(i);
      end
    end
  end

  // victim choice: a free row first, else the policy's row, skipping the pinned one
  logic [IDX_W-1:0]       pick;
  always_comb begin
    if (have_free)          pick = free_idx;
    else if (POLICY_RANDOM) pick = lfsr[IDX_W-1:0];
    else                    pick = fifo_ptr;
    if (!have_free && pin_valid && pick == pin_idx) pick = pick + 1'b1;
  end

  assign done         = (st == DS_READ) || (st == DS_WRITE);
  assign stall        = (st == DS_WRITEBACK) || (st == DS_ALLOCATE);
  assign busy         = (st != DS_IDLE);
  assign sync_req     = stall;
  assign sync_wb      = (st == DS_WRITEBACK);
  assign sync_idx     = victim;
  assign sync_row     = (st == DS_WRITEBACK) ? tag_row[victim] : lat_row;
  assign hit_pulse    = (st == DS_COMPARE) && hit && !refill;
  assign miss_pulse   = (st == DS_COMPARE) && !hit;
  assign wb_pulse     = (st == DS_WRITEBACK) && sync_done;
  assign idx_subarray = tag_sa[idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= DS_IDLE;
      valid     <= '0;
      dirty     <= '0;
      lat_row   <= '0;
      lat_write <= 1'b0;
      refill    <= 1'b0;
      victim    <= '0;
      fifo_ptr  <= '0;
      idx       <= '0;
      lfsr      <= 16'hACE1;
      for (int i = 0; i < ROWS; i++) begin
        tag_row[i] <= '0;
        tag_sa[i]  <= '0;
      end
    end else begin
      lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      unique case (st)
        DS_IDLE: if (req) begin
          lat_row   <= req_row;
          lat_write <= req_write;
          refill    <= 1'b0;
          st        <= DS_COMPARE;
        end
        DS_COMPARE: begin
          if (hit) begin
            idx <= hit_idx;
            st  <= lat_write ? DS_WRITE : DS_READ;
          end else begin
            st <= DS_UPDATE;
          end
        end
        DS_READ:  st <= DS_IDLE;
        DS_WRITE: begin
          dirty[idx] <= 1'b1;
          st         <= DS_IDLE;
        end
        DS_UPDATE: begin
          if (!have_free && !POLICY_RANDOM) fifo_ptr <= fifo_ptr + 1'b1;
          victim <= pick;
          st     <= (valid[pick] && dirty[pick]) ? DS_WRITEBACK : DS_ALLOCATE;
        end
        DS_WRITEBACK: if (sync_done) begin
          dirty[victim] <= 1'b0;
          valid[victim] <= 1'b0;
          st            <= DS_ALLOCATE;
        end
        DS_ALLOCATE: if (sync_done) begin
          valid[victim]   <= 1'b1;
          tag_row[victim] <= lat_row;
          tag_sa[victim]  <= SA_W'(lat_row >> SA_SH);
          refill          <= 1'b1;
          st              <= DS_COMPARE;
        end
        default: st <= DS_IDLE;
      endcase
    end
  end

endmodule
