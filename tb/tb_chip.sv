// tb_chip: checks one chip (2 bank groups x 2 banks, 4 rows, 16 columns):
// the flat bank number selects bank group and bank for writes and reads,
// and a processing-unit TRA/copy sequence started on one flat bank number
// acts in that bank only.
module tb_chip;
  import pim_pkg::*;
  localparam int NB = 4, ROWS = 4, COLS = 16;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, we = 1'b0;
  logic [1:0] bank = '0, idx = '0;
  logic [3:0] col = '0, wdata = '0, rdata;
  pu_cmd_t [NB-1:0] pu_cmd = '0;
  logic [NB-1:0] pu_busy, pu_done;
  logic [3:0] ref_m [NB][ROWS][COLS];
  int checks = 0, failures = 0;

  chip #(.NBG(2), .NBA(2), .ROWS(ROWS), .COLS(COLS), .DW(4)) dut (.*);
  always #5 clk = ~clk;
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
  task automatic wr1(input int b, input int r, input int c, input logic [3:0] v);
    @(negedge clk); en = 1; we = 1; bank = 2'(b); idx = 2'(r); col = 4'(c); wdata = v;
    ref_m[b][r][c] = v;
    @(negedge clk); en = 0; we = 0;
  endtask
  task automatic rd1(input int b, input int r, input int c);
    @(negedge clk); en = 1; we = 0; bank = 2'(b); idx = 2'(r); col = 4'(c);
    @(negedge clk); en = 0;
    chk($sformatf("read bank %0d row %0d col %0d", b, r, c), rdata == ref_m[b][r][c]);
  endtask
  task automatic pu(input int b, input pu_cmd_t c);
    @(negedge clk); pu_cmd[b] = c; pu_cmd[b].valid = 1'b1;
    @(negedge clk); pu_cmd[b] = '0;
    while (!pu_done[b]) @(negedge clk);
  endtask

  initial begin
    pu_cmd_t c;
    for (int b = 0; b < NB; b++) for (int r = 0; r < ROWS; r++) for (int k = 0; k < COLS; k++)
      ref_m[b][r][k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NB; b++) for (int r = 0; r < 2; r++) for (int k = 0; k < COLS; k++)
      wr1(b, r, k, 4'($urandom));
    for (int b = 0; b < NB; b++) for (int k = 0; k < COLS; k++) rd1(b, 0, k);
    // bank 3: row 0 -> T0, row 1 -> T1, C1 -> T2, TRA, T0 -> row 2  (row 2 = row0 | row1)
    c = '0; c.op = PU_COPY; c.src_kind = SRC_LOCAL; c.src_idx = 0; c.dst_amask = 6'b000001; pu(3, c);
    c = '0; c.op = PU_COPY; c.src_kind = SRC_LOCAL; c.src_idx = 1; c.dst_amask = 6'b000010; pu(3, c);
    c = '0; c.op = PU_COPY; c.src_kind = SRC_C1; c.dst_amask = 6'b000100; pu(3, c);
    c = '0; c.op = PU_TRA; c.tra_mask = 6'b000111; pu(3, c);
    c = '0; c.op = PU_COPY; c.src_kind = SRC_AMBIT; c.src_amb = 0; c.dst_local = 1; c.dst_idx = 2; pu(3, c);
    for (int k = 0; k < COLS; k++) ref_m[3][2][k] = ref_m[3][0][k] | ref_m[3][1][k];
    for (int b = 0; b < NB; b++) for (int k = 0; k < COLS; k++) rd1(b, 2, k);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
