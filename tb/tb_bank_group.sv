// tb_bank_group: checks one bank group (4 banks, 4 rows, 16 columns):
// writes through the bus port reach only the addressed bank, reads return
// that bank's word one cycle later, and a processing-unit copy in one bank
// runs while the other banks stay reachable over the bus.
module tb_bank_group;
  import pim_pkg::*;
  localparam int NBA = 4, ROWS = 4, COLS = 16;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, we = 1'b0;
  logic [1:0] bank = '0, idx = '0;
  logic [3:0] col = '0, wdata = '0, rdata;
  pu_cmd_t [NBA-1:0] pu_cmd = '0;
  logic [NBA-1:0] pu_busy, pu_done;
  logic [3:0] ref_m [NBA][ROWS][COLS];
  int checks = 0, failures = 0;

  bank_group #(.NBA(NBA), .ROWS(ROWS), .COLS(COLS), .DW(4)) dut (.*);
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

  initial begin
    for (int b = 0; b < NBA; b++) for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++)
      ref_m[b][r][c] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NBA; b++) for (int c = 0; c < COLS; c++) wr1(b, 1, c, 4'($urandom));
    for (int b = 0; b < NBA; b++) for (int c = 0; c < COLS; c++) rd1(b, 1, c);
    // bank 2: copy row 1 -> row 3 in its processing unit
    @(negedge clk);
    pu_cmd[2].valid = 1'b1; pu_cmd[2].op = PU_COPY; pu_cmd[2].src_kind = SRC_LOCAL;
    pu_cmd[2].src_idx = 8'd1; pu_cmd[2].dst_local = 1'b1; pu_cmd[2].dst_idx = 8'd3;
    @(negedge clk);
    pu_cmd[2] = '0;
    chk("bank 2 busy", pu_busy == 4'b0100);
    rd1(0, 1, 5);   // other banks still usable
    wr1(3, 0, 7, 4'hA);
    rd1(3, 0, 7);
    while (!pu_done[2]) @(negedge clk);
    @(negedge clk);
    for (int c = 0; c < COLS; c++) ref_m[2][3][c] = ref_m[2][1][c];
    for (int c = 0; c < COLS; c++) rd1(2, 3, c);
    for (int c = 0; c < COLS; c++) rd1(1, 3, c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
