// tb_pim_bank_ctrl: checks the in-memory operation sequencer of one bank
// (4096 rows, subarrays of 256): a second ACT between ordinary rows looks up
// source then destination (source pinned) and sends a local-to-local copy;
// the subarray distance is reported as LISA hops; an ACT from Idle to a
// triple-row address sends a TRA; copies into a negated dual-contact row and
// out of a constant row need no lookup; stall covers the whole sequence.
module tb_pim_bank_ctrl;
  import pim_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, act_idle = 1'b0, react = 1'b0;
  logic [11:0] src_row = '0, dst_row = '0, ds_row;
  logic ds_req, ds_write, ds_pin_valid, ds_done = 1'b0, pu_done = 1'b0, stall, tra_pulse, copy_pulse;
  logic [4:0] ds_pin_idx, ds_idx = '0;
  logic [3:0] lisa_hops;
  pu_cmd_t pu_cmd, got;
  int checks = 0, failures = 0;
  int unsigned lookups[$], writes[$], pins[$], n_tra = 0, n_copy = 0, hops = 0;

  pim_bank_ctrl #(.ROWS(32), .ROW_W(12), .SUBARRAY_ROWS(256)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    n_tra += tra_pulse;
    n_copy += copy_pulse;
    if (copy_pulse) hops += lisa_hops;
    if (pu_cmd.valid) got <= pu_cmd;
  end
  // row cache: local index = row % 32, answers in 3 cycles
  initial forever begin
    @(negedge clk);
    ds_done = 1'b0;
    if (ds_req) begin
      lookups.push_back(ds_row); writes.push_back(ds_write); pins.push_back(ds_pin_valid);
      ds_idx = 5'(ds_row % 32);
      repeat (2) @(negedge clk);
      ds_done = 1'b1;
    end
  end
  // processing units: done 6 cycles after the command
  initial forever begin
    @(negedge clk);
    pu_done = 1'b0;
    if (pu_cmd.valid) begin
      repeat (5) @(negedge clk);
      pu_done = 1'b1;
    end
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic fire(input bit re, input int s, input int d, output int unsigned stalled);
    @(negedge clk);
    react = re; act_idle = !re; src_row = 12'(s); dst_row = 12'(d);
    @(negedge clk);
    react = 0; act_idle = 0;
    stalled = 0;
    while (stall) begin stalled++; @(negedge clk); end
  endtask

  int unsigned st;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    fire(1, 10, 11, st);
    chk("two lookups, source then destination", lookups.size() == 2 && lookups[0] == 10 && lookups[1] == 11);
    chk("destination looked up for write with source pinned", writes[0] == 0 && writes[1] == 1 && pins[1] == 1);
    chk("local copy", got.op == PU_COPY && got.src_kind == SRC_LOCAL && got.src_idx == 10 &&
        got.dst_local && got.dst_idx == 11 && got.dst_amask == 0);
    chk("stall covers lookups and copy", st >= 3 + 3 + 6);
    chk("same subarray: no hop", hops == 0 && n_copy == 1);
    fire(1, 10, 600, st);
    chk("LISA: two hops", hops == 2);
    // ordinary row into DCC0 through its negated wordline
    fire(1, 20, 12'hFF5, st);
    chk("one lookup only", lookups.size() == 5 && lookups[4] == 20);
    chk("copy to DCC0 negated", got.src_kind == SRC_LOCAL && got.src_idx == 20 && !got.dst_local &&
        got.dst_amask == 6'b010000 && got.dst_neg);
    // C1 into T2: no lookup
    fire(1, 12'hFF9, 12'hFF2, st);
    chk("no lookup for reserved rows", lookups.size() == 5);
    chk("constant source", got.src_kind == SRC_C1 && got.dst_amask == 6'b000100 && !got.dst_local);
    // triple-row activation from Idle
    fire(0, 0, 12'hFFD, st);
    chk("TRA {T1,T2,T3}", got.op == PU_TRA && got.tra_mask == 6'b001110 && n_tra == 1);
    // an ordinary ACT from Idle does nothing
    fire(0, 0, 33, st);
    chk("plain ACT: no operation", st == 0 && n_tra == 1 && n_copy == 4);
    // triple-row group as source: reads its first row, written into a local row
    fire(1, 12'hFFE, 40, st);
    chk("TRA group as source", got.src_kind == SRC_AMBIT && got.src_amb == 3'(AMB_DCC0) && got.dst_local &&
        got.dst_idx == 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
