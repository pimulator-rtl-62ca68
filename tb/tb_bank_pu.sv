// tb_bank_pu: checks the bank processing unit (8 local rows, 16 columns,
// 4-bit chip slice) attached to a bank module: RowClone copy local->local,
// copies into Ambit rows, AND and OR by triple-row activation with a C0 / C1
// operand, NOT through the negated wordline of DCC0, copying results back,
// and the operation times (2 cycles per column for a copy, 1 for a TRA).
module tb_bank_pu;
  import pim_pkg::*;
  localparam int ROWS = 8, COLS = 16, DW = 4;
  logic clk = 1'b0, rst_n = 1'b0, op_valid = 1'b0;
  pu_op_t op = PU_COPY;
  src_kind_t src_kind = SRC_LOCAL;
  logic [2:0] src_idx = '0, dst_idx = '0, src_amb = '0;
  logic src_neg = 1'b0, dst_local = 1'b0, dst_neg = 1'b0;
  logic [5:0] dst_amask = '0, tra_mask = '0;
  logic busy, done, b_en, b_we;
  logic [2:0] b_idx;
  logic [3:0] b_col;
  logic [3:0] b_wdata, b_rdata;
  logic [3:0] rows [ROWS][COLS];
  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  bank_pu #(.ROWS(ROWS), .COLS(COLS), .DW(DW)) dut (.*);
  bank_mem #(.ROWS(ROWS), .COLS(COLS), .DW(DW)) u_mem (
    .clk, .en(b_en), .we(b_we), .idx(b_idx), .col(b_col), .wdata(b_wdata), .rdata(b_rdata));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input pu_op_t o, input src_kind_t sk, input int si, input int sa, input bit sn,
                     input bit dl, input int di, input logic [5:0] am, input bit dn,
                     input logic [5:0] tm, input int cycles);
    int unsigned t0;
    @(negedge clk);
    op = o; src_kind = sk; src_idx = 3'(si); src_amb = 3'(sa); src_neg = sn;
    dst_local = dl; dst_idx = 3'(di); dst_amask = am; dst_neg = dn; tra_mask = tm;
    op_valid = 1'b1; t0 = cyc;
    @(negedge clk);
    op_valid = 1'b0;
    while (!done) @(negedge clk);
    chk($sformatf("operation time %0d expected %0d", cyc - t0, cycles), cyc - t0 == cycles);
    @(negedge clk);
  endtask

  function automatic logic [3:0] mem_at(input int r, input int c);
    return u_mem.mem[r * COLS + c];
  endfunction

  initial begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        rows[r][c] = 4'($urandom);
        u_mem.mem[r * COLS + c] = rows[r][c];
      end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // RowClone: row 1 -> row 5
    run(PU_COPY, SRC_LOCAL, 1, 0, 0, 1, 5, 6'b0, 0, 6'b0, 2 * COLS + 1);
    for (int c = 0; c < COLS; c++) chk("rowclone", mem_at(5, c) == rows[1][c]);
    // A = row 2 -> T0, B = row 3 -> T1, C0 -> T2, TRA -> AND, result -> row 6
    run(PU_COPY, SRC_LOCAL, 2, 0, 0, 0, 0, 6'b000001, 0, 6'b0, 2 * COLS + 1);
    run(PU_COPY, SRC_LOCAL, 3, 0, 0, 0, 0, 6'b000010, 0, 6'b0, 2 * COLS + 1);
    run(PU_COPY, SRC_C0,    0, 0, 0, 0, 0, 6'b000100, 0, 6'b0, 2 * COLS + 1);
    run(PU_TRA,  SRC_C0,    0, 0, 0, 0, 0, 6'b0,      0, 6'b000111, COLS + 1);
    run(PU_COPY, SRC_AMBIT, 0, 0, 0, 1, 6, 6'b0, 0, 6'b0, 2 * COLS + 1);
    for (int c = 0; c < COLS; c++) chk("AND", mem_at(6, c) == (rows[2][c] & rows[3][c]));
    // OR with C1, copied into T1,T2,T3 group then TRA {T1,T2,T3}
    run(PU_COPY, SRC_LOCAL, 2, 0, 0, 0, 0, 6'b000010, 0, 6'b0, 2 * COLS + 1);
    run(PU_COPY, SRC_LOCAL, 3, 0, 0, 0, 0, 6'b000100, 0, 6'b0, 2 * COLS + 1);
    run(PU_COPY, SRC_C1,    0, 0, 0, 0, 0, 6'b001000, 0, 6'b0, 2 * COLS + 1);
    run(PU_TRA,  SRC_C0,    0, 0, 0, 0, 0, 6'b0,      0, 6'b001110, COLS + 1);
    run(PU_COPY, SRC_AMBIT, 0, 3, 0, 1, 7, 6'b0, 0, 6'b0, 2 * COLS + 1);
    for (int c = 0; c < COLS; c++) chk("OR", mem_at(7, c) == (rows[2][c] | rows[3][c]));
    // NOT: row 4 -> DCC0 through the negated wordline, DCC0 -> row 0
    run(PU_COPY, SRC_LOCAL, 4, 0, 0, 0, 0, 6'b010000, 1, 6'b0, 2 * COLS + 1);
    run(PU_COPY, SRC_AMBIT, 0, 4, 0, 1, 0, 6'b0, 0, 6'b0, 2 * COLS + 1);
    for (int c = 0; c < COLS; c++) chk("NOT", mem_at(0, c) == ~rows[4][c]);
    // reading DCC0 through its negated wordline gives back row 4
    run(PU_COPY, SRC_AMBIT, 0, 4, 1, 1, 1, 6'b0, 0, 6'b0, 2 * COLS + 1);
    for (int c = 0; c < COLS; c++) chk("double NOT", mem_at(1, c) == rows[4][c]);
    chk("idle", !busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
