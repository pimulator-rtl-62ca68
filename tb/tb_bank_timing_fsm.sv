// tb_bank_timing_fsm: checks the bank state machine at DDR4-2400 timing
// (tRCD = tCL = tRP = 17, tCWL = 12, tRAS = 39, tRFC = 312, tWR = 18,
// tRTP = 9 tCK; two model clocks per tCK, BL8). Every state entry is checked
// to the exact model clock, burst beats are counted, refused commands must
// raise violation, and a stall (en low) must shift all timing.
module tb_bank_timing_fsm;
  import pim_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, cmd_hit = 1'b0;
  cmd_t cmd = CMD_NOP;
  bank_state_t state;
  logic rd_beat, wr_beat, act_accept, react, violation;
  int checks = 0, failures = 0;
  int unsigned cyc = 0, n_rd = 0, n_wr = 0;

  bank_timing_fsm dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rd_beat) n_rd++;
    if (wr_beat) n_wr++;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s (state %s)", cyc, what, state.name()); end
  endtask

  // Present a command for one cycle; returns its cycle number and the flags seen.
  task automatic give(input cmd_t c, output int unsigned t, output logic viol, output logic re);
    @(negedge clk);
    cmd = c; cmd_hit = 1'b1; t = cyc;
    #1; viol = violation; re = react;
    @(negedge clk);
    cmd = CMD_NOP; cmd_hit = 1'b0;
  endtask

  task automatic at(input int unsigned k);
    while (cyc < k) @(negedge clk);
  endtask

  task automatic state_at(input int unsigned k, input bank_state_t s);
    at(k);
    chk($sformatf("state %s expected at cycle %0d", s.name(), k), state == s);
  endtask

  int unsigned t_act, t, t2;
  logic v, r;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    give(CMD_RD, t, v, r);             chk("RD in Idle refused", v);
    give(CMD_ACT, t_act, v, r);        chk("ACT accepted", !v);
    state_at(t_act + 1, ST_ACTIVATING);
    state_at(t_act + 33, ST_ACTIVATING);
    state_at(t_act + 34, ST_ACTIVE);
    give(CMD_PRE, t, v, r);            chk("PRE before tRAS refused", v);
    chk("still active", state == ST_ACTIVE);
    give(CMD_RD, t, v, r);
    state_at(t + 33, ST_ACTIVE);
    state_at(t + 34, ST_READING);
    state_at(t + 41, ST_READING);
    state_at(t + 42, ST_ACTIVE);
    chk("8 read beats", n_rd == 8);
    give(CMD_WR, t, v, r);
    state_at(t + 23, ST_ACTIVE);
    state_at(t + 24, ST_WRITING);
    state_at(t + 32, ST_ACTIVE);
    chk("8 write beats", n_wr == 8);
    at(t + 32 + 10);
    give(CMD_PRE, t2, v, r);           chk("PRE before tWR refused", v);
    at(t + 32 + 36);
    give(CMD_PRE, t2, v, r);           chk("PRE after tWR taken", !v);
    state_at(t2 + 33, ST_PRECHARGING);
    state_at(t2 + 34, ST_IDLE);
    give(CMD_REF, t, v, r);
    state_at(t + 623, ST_REFRESHING);
    state_at(t + 624, ST_IDLE);
    // second activation
    give(CMD_ACT, t_act, v, r);
    at(t_act + 34);
    give(CMD_ACT, t, v, r);            chk("second ACT flagged as reactivation", r && !v);
    state_at(t + 33, ST_REACTIVATING);
    state_at(t + 34, ST_ACTIVE);
    // read with auto precharge: burst, then tRTP (from burst start) and tRAS
    give(CMD_RDA, t, v, r);
    state_at(t + 34, ST_READING_APR);
    state_at(t + 34 + 18, ST_READING_APR);
    state_at(t + 34 + 19, ST_PRECHARGING);
    state_at(t + 34 + 19 + 34, ST_IDLE);
    // stall: en low for 10 cycles while activating shifts Bank Active by 10
    give(CMD_ACT, t_act, v, r);
    at(t_act + 5);
    @(negedge clk); en = 1'b0;
    repeat (10) @(negedge clk);
    en = 1'b1;
    state_at(t_act + 43, ST_ACTIVATING);
    state_at(t_act + 44, ST_ACTIVE);
    // write with auto precharge
    give(CMD_WRA, t, v, r);
    state_at(t + 24, ST_WRITING_APR);
    at(t + 40);
    give(CMD_ACT, t2, v, r);           chk("ACT during Writing APR refused", v);
    state_at(t + 24 + 8 + 36, ST_PRECHARGING);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
