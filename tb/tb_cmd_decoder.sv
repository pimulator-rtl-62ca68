// tb_cmd_decoder: checks the DDR4 truth-table decode, the command window
// (ck_t high, cs_n low, en high), the open row per bank and the column of
// each burst beat in sequential BL8 order.
module tb_cmd_decoder;
  import pim_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, ck_t = 1'b1, cs_n = 1'b1, act_n = 1'b1;
  logic [1:0] bg = '0, ba = '0;
  logic [17:0] addr = '0;
  logic [15:0] burst_inc = '0;
  logic cmd_valid, cmd_ap;
  cmd_t cmd;
  logic [3:0] cmd_bank;
  logic [15:0] cmd_row, cmd_prev_row;
  logic [9:0] cmd_col;
  logic [15:0][15:0] open_row;
  logic [15:0][9:0] cur_col;
  int checks = 0, failures = 0;

  cmd_decoder dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Present pins for one cycle and check the decode in that cycle.
  task automatic drive(input logic a_n, input logic [2:0] rcw, input int b, input logic [17:0] a,
                       input cmd_t expect_cmd);
    @(negedge clk);
    cs_n = 1'b0; act_n = a_n; bg = 2'(b >> 2); ba = 2'(b); addr = a;
    if (a_n) addr[16:14] = rcw;
    #1;
    chk($sformatf("decode %s got %s", expect_cmd.name(), cmd.name()), cmd == expect_cmd);
    chk("bank", cmd_bank == 4'(b));
    @(negedge clk);
    cs_n = 1'b1; act_n = 1'b1; addr = '0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    drive(1'b0, 3'b000, 5, 18'h0ABCD, CMD_ACT);
    chk("open row", open_row[5] == 16'hABCD);
    drive(1'b0, 3'b000, 5, 18'h01234, CMD_ACT);
    chk("open row updated", open_row[5] == 16'h1234);
    drive(1'b1, 3'b101, 5, 18'h00005, CMD_RD);
    chk("col base", cur_col[5] == 10'h005);
    // burst beats: 5,6,7,0,1,2,3,4 within the aligned group of eight
    for (int i = 0; i < 8; i++) begin
      chk($sformatf("beat %0d column %0d", i, cur_col[5]), cur_col[5] == 10'((5 + i) % 8));
      @(negedge clk); burst_inc[5] = 1'b1; @(negedge clk); burst_inc[5] = 1'b0;
    end
    drive(1'b1, 3'b101, 9, 18'h00408, CMD_RDA);
    chk("rda column", cur_col[9] == 10'h008);
    drive(1'b1, 3'b100, 9, 18'h00010, CMD_WR);
    drive(1'b1, 3'b100, 9, 18'h00410, CMD_WRA);
    drive(1'b1, 3'b010, 9, 18'h00000, CMD_PRE);
    drive(1'b1, 3'b010, 9, 18'h00400, CMD_PREA);
    drive(1'b1, 3'b001, 0, 18'h00000, CMD_REF);
    drive(1'b1, 3'b000, 0, 18'h00000, CMD_MRS);
    drive(1'b1, 3'b110, 0, 18'h00000, CMD_ZQC);
    drive(1'b1, 3'b111, 0, 18'h00000, CMD_NOP);
    // second clock phase and stall: not taken
    ck_t = 1'b0;
    drive(1'b0, 3'b000, 3, 18'h00777, CMD_NOP);
    ck_t = 1'b1; en = 1'b0;
    drive(1'b0, 3'b000, 3, 18'h00777, CMD_NOP);
    en = 1'b1;
    chk("row unchanged when not taken", open_row[3] == 16'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
