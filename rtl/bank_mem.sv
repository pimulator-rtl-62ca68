// bank_mem: the bank module's row storage on the FPGA (block RAM).
//
// Holds ROWS whole rows of one bank of one chip; a row is COLS columns of DW
// bits (the chip's data width). Which memory rows these local rows stand for
// is decided by the bank's data synchronization engine. One synchronous port:
// with en high, a write stores wdata at (idx, col) at the clock edge; a read
// returns the word at (idx, col) on rdata one clock later. Rows are cleared at
// start-up (initial block) so that reads of unwritten rows are defined.
// That the bank module keeps several whole rows in block RAM follows the
// document; the single port and the one-cycle read latency are this design's
// choices.
module bank_mem #(
  parameter int unsigned ROWS = 32,
  parameter int unsigned COLS = 1024,
  parameter int unsigned DW   = 4,
  localparam int unsigned IDX_W = $clog2(ROWS),
  localparam int unsigned COL_W = $clog2(COLS)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [IDX_W-1:0] idx,
  input  logic [COL_W-1:0] col,
  input  logic [DW-1:0]    wdata,
  output logic [DW-1:0]    rdata
);

  logic [DW-1:0] mem [ROWS*COLS];

  initial begin
    for (int i = 0; i < ROWS * COLS; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[{idx, col}] <= wdata;
      else    rdata <= mem[{idx, col}];
    end
  end

endmodule
