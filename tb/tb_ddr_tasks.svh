// tb_ddr_tasks.svh: memory controller model and reference model shared by the
// end-to-end testbenches of pimulator_top.
//
// The including module declares the localparams P_* (the top's sizes and
// timing), clk, rst_n, the DIMM pins, stall, dq_out/dq_oe, and `int checks,
// failures`. Emulated time: ecyc counts model clocks in which the model was
// not stalled; the controller issues commands only in cycles where ck_t is
// high (even ecyc) and never while stall is high. Read data is expected at
// ecyc = command + 2*tCL + 1 + beat, write data is driven at ecyc = command +
// 2*tCWL + beat. The reference model keeps every word written and, for words
// never written, the board memory's initial pattern; reserved Ambit rows are
// modelled as the Ambit scheme defines them (T0..T3, DCC0/DCC1 with negated
// wordlines, C0/C1, triple-row groups).

localparam int unsigned P_DQ_W = P_NCHIPS * P_DW;
localparam int unsigned P_NB   = P_NBG * P_NBA;
localparam int unsigned RSV    = (1 << P_ROW_W) - 16;   // first reserved row

typedef logic [P_DQ_W-1:0] word_t;

longint unsigned ecyc = 0;
word_t           ref_mem [longint unsigned];
word_t           amb_ref [P_NB][6][P_COLS];
word_t           wsched  [longint unsigned];
word_t           exp_rd  [longint unsigned];
word_t           got_rd  [longint unsigned];
int unsigned     open_row [P_NB];

assign ck_t = ~ecyc[0];

always @(posedge clk) begin
  if (rst_n && !stall) ecyc <= ecyc + 1;
  if (rst_n && dq_oe) got_rd[ecyc] = dq_out;
end

always @(negedge clk) dq_in = wsched.exists(ecyc) ? wsched[ecyc] : '0;

function automatic word_t init_word(input longint unsigned wa);
  word_t v;
  for (int i = 0; i < P_DQ_W; i += 32) v[i +: 32] = 32'(wa * 32'h9E3779B1 + 32'(i) + 32'h1234567);
  return v;
endfunction

function automatic longint unsigned waddr(input int unsigned b, input int unsigned row,
                                          input int unsigned col);
  return ((longint'(b) << P_ROW_W) + longint'(row)) * P_COLS + longint'(col);
endfunction

function automatic word_t ref_get(input int unsigned b, input int unsigned row, input int unsigned col);
  longint unsigned a = waddr(b, row, col);
  return ref_mem.exists(a) ? ref_mem[a] : init_word(a);
endfunction

// Value a row reads as when it is the source of a copy.
function automatic word_t src_val(input int unsigned b, input int unsigned row, input int unsigned col);
  if (row < RSV) return ref_get(b, row, col);
  case (row - RSV)
    0, 1, 2, 3: return amb_ref[b][row - RSV][col];
    4:  return amb_ref[b][4][col];
    5:  return ~amb_ref[b][4][col];
    6:  return amb_ref[b][5][col];
    7:  return ~amb_ref[b][5][col];
    8:  return '0;
    9:  return '1;
    12: return amb_ref[b][0][col];
    13: return amb_ref[b][1][col];
    14: return amb_ref[b][4][col];
    15: return amb_ref[b][5][col];
    default: return '0;
  endcase
endfunction

task automatic dst_put(input int unsigned b, input int unsigned row, input int unsigned col, input word_t v);
  if (row < RSV) begin
    ref_mem[waddr(b, row, col)] = v;
    return;
  end
  case (row - RSV)
    0, 1, 2, 3: amb_ref[b][row - RSV][col] = v;
    4:  amb_ref[b][4][col] = v;
    5:  amb_ref[b][4][col] = ~v;
    6:  amb_ref[b][5][col] = v;
    7:  amb_ref[b][5][col] = ~v;
    12: begin amb_ref[b][0][col] = v; amb_ref[b][1][col] = v; amb_ref[b][2][col] = v; end
    13: begin amb_ref[b][1][col] = v; amb_ref[b][2][col] = v; amb_ref[b][3][col] = v; end
    14: begin amb_ref[b][4][col] = v; amb_ref[b][1][col] = v; amb_ref[b][2][col] = v; end
    15: begin amb_ref[b][5][col] = v; amb_ref[b][0][col] = v; amb_ref[b][3][col] = v; end
    default: ;
  endcase
endtask

task automatic ref_tra(input int unsigned b, input int unsigned row);
  int unsigned r0, r1, r2;
  case (row - RSV)
    12: begin r0 = 0; r1 = 1; r2 = 2; end
    13: begin r0 = 1; r1 = 2; r2 = 3; end
    14: begin r0 = 4; r1 = 1; r2 = 2; end
    default: begin r0 = 5; r1 = 0; r2 = 3; end
  endcase
  for (int c = 0; c < P_COLS; c++) begin
    word_t a = amb_ref[b][r0][c], bb = amb_ref[b][r1][c], cc = amb_ref[b][r2][c];
    word_t m = (a & bb) | (a & cc) | (bb & cc);
    amb_ref[b][r0][c] = m; amb_ref[b][r1][c] = m; amb_ref[b][r2][c] = m;
  end
endtask

task automatic wait_e(input longint unsigned n);
  longint unsigned t0 = ecyc;
  while (ecyc < t0 + n) @(negedge clk);
endtask

// Drive one command in the next cycle where ck_t is high and the model is not stalled.
task automatic issue(input logic a_n, input logic [2:0] rcw, input int unsigned b,
                     input logic [17:0] a, output longint unsigned at);
  @(negedge clk);
  while (stall || ecyc[0]) @(negedge clk);
  cs_n  = 1'b0;
  act_n = a_n;
  bg    = (P_NBG > 1) ? ($bits(bg))'(b / P_NBA) : '0;
  ba    = ($bits(ba))'(b % P_NBA);
  addr  = a;
  if (a_n) addr[16:14] = rcw;
  at = ecyc;
  @(negedge clk);
  cs_n  = 1'b1;
  act_n = 1'b1;
  addr  = '0;
endtask

task automatic act(input int unsigned b, input int unsigned row);
  longint unsigned t;
  issue(1'b0, 3'b000, b, 18'(row), t);
  open_row[b] = row;
endtask

task automatic rd(input int unsigned b, input int unsigned col, input bit ap = 1'b0);
  longint unsigned t;
  logic [17:0] a = 18'(col);
  a[10] = ap;
  issue(1'b1, 3'b101, b, a, t);
  for (int i = 0; i < P_BL; i++) begin
    int unsigned c = (col & ~(P_BL - 1)) | ((col + i) & (P_BL - 1));
    exp_rd[t + 2 * P_T_CL + 1 + i] = ref_get(b, open_row[b], c);
  end
endtask

task automatic wr(input int unsigned b, input int unsigned col, input bit ap = 1'b0);
  longint unsigned t;
  logic [17:0] a = 18'(col);
  a[10] = ap;
  issue(1'b1, 3'b100, b, a, t);
  for (int i = 0; i < P_BL; i++) begin
    int unsigned c = (col & ~(P_BL - 1)) | ((col + i) & (P_BL - 1));
    word_t v;
    for (int k = 0; k < P_DQ_W; k += 32) v[k +: 32] = $urandom;
    wsched[t + 2 * P_T_CWL + i] = v;
    ref_mem[waddr(b, open_row[b], c)] = v;
  end
endtask

task automatic pre(input int unsigned b);
  longint unsigned t;
  issue(1'b1, 3'b010, b, 18'd0, t);
endtask

task automatic prea();
  longint unsigned t;
  issue(1'b1, 3'b010, 0, 18'h400, t);
endtask

task automatic refresh();
  longint unsigned t;
  issue(1'b1, 3'b001, 0, 18'd0, t);
endtask

// Standard spacing (model clocks) that respects every timing rule.
localparam int unsigned W_RCD = 2 * P_T_RCD;
localparam int unsigned W_RAS = 2 * P_T_RAS;
localparam int unsigned W_RP  = 2 * P_T_RP;
localparam int unsigned W_COL = 2 * P_T_CL + P_BL + 2 * P_T_WR + 2;

// ACT src, ACT dst (second activation: copy), PRE; updates the reference model.
task automatic aap(input int unsigned b, input int unsigned src, input int unsigned dst);
  act(b, src);
  wait_e(W_RCD);
  act(b, dst);
  for (int c = 0; c < P_COLS; c++) dst_put(b, dst, c, src_val(b, src, c));
  wait_e(W_RAS);
  pre(b);
  wait_e(W_RP);
endtask

// Compare every read beat seen on the pins with the reference model.
task automatic check_reads();
  foreach (exp_rd[k]) begin
    checks++;
    if (!got_rd.exists(k)) begin
      failures++;
      $display("FAIL: no read data at emulated cycle %0d", k);
    end else if (got_rd[k] !== exp_rd[k]) begin
      failures++;
      $display("FAIL: read data at emulated cycle %0d: got %h expected %h", k, got_rd[k], exp_rd[k]);
    end
  end
  checks++;
  if (got_rd.num() != exp_rd.num()) begin
    failures++;
    $display("FAIL: %0d read beats seen, %0d expected", got_rd.num(), exp_rd.num());
  end
endtask
