// tb_dsync: checks the row cache of one bank (4 local rows, FIFO policy):
// misses fill free rows first, hits answer in two cycles without stall,
// a FIFO victim that is clean is simply refilled, a dirty victim is written
// back (with its own row address) before the fetch, stall is high exactly
// while a transfer is outstanding, and a pinned row is never replaced.
// A second instance uses the random replacement policy: every missed row
// must hit afterwards at the index it was given, and the victims must not
// follow the FIFO order.
module tb_dsync;
  logic clk = 1'b0, rst_n = 1'b0, req = 1'b0, req_write = 1'b0, pin_valid = 1'b0;
  logic [11:0] req_row = '0;
  logic [1:0] pin_idx = '0;
  logic done, hit_pulse, miss_pulse, wb_pulse, stall, busy, sync_req, sync_wb, sync_done = 1'b0;
  logic [1:0] idx, sync_idx;
  logic [3:0] idx_subarray;
  logic [11:0] sync_row;
  int checks = 0, failures = 0;
  int unsigned cyc = 0, n_hit = 0, n_miss = 0, n_wb = 0, stall_cyc = 0, busy_sync = 0;
  int unsigned log_wb[$], log_row[$], log_idx[$];

  dsync #(.ROWS(4), .ROW_W(12), .SUBARRAY_ROWS(256)) dut (.*);

  // random-policy instance with a board memory that answers at once
  logic        r_req = 1'b0, r_done, r_sync_req, r_sync_wb, r_sync_done = 1'b0;
  logic [11:0] r_row = '0, r_sync_row;
  logic [1:0]  r_idx, r_sync_idx;
  dsync #(.ROWS(4), .ROW_W(12), .SUBARRAY_ROWS(256), .POLICY_RANDOM(1'b1)) dut_rand (
    .clk, .rst_n, .req(r_req), .req_row(r_row), .req_write(1'b1), .pin_valid(1'b0), .pin_idx(2'd0),
    .done(r_done), .idx(r_idx), .idx_subarray(), .hit_pulse(), .miss_pulse(), .wb_pulse(), .stall(),
    .busy(), .sync_req(r_sync_req), .sync_wb(r_sync_wb), .sync_idx(r_sync_idx), .sync_row(r_sync_row),
    .sync_done(r_sync_done)
  );
  always @(negedge clk) r_sync_done = r_sync_req && !r_sync_done;

  task automatic lookup_r(input int row, output logic [1:0] got);
    @(negedge clk);
    r_req = 1'b1; r_row = 12'(row);
    @(negedge clk);
    r_req = 1'b0;
    while (!r_done) @(negedge clk);
    got = r_idx;
    @(negedge clk);
  endtask

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    n_hit += hit_pulse; n_miss += miss_pulse; n_wb += wb_pulse;
    if (stall) stall_cyc++;
  end

  // Board-memory side: answer each transfer after 5 cycles.
  initial forever begin
    @(negedge clk);
    if (sync_req) begin
      log_wb.push_back(sync_wb); log_row.push_back(sync_row); log_idx.push_back(sync_idx);
      repeat (4) begin
        @(negedge clk);
        busy_sync += stall;
      end
      sync_done = 1'b1;
      @(negedge clk);
      sync_done = 1'b0;
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
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  task automatic lookup(input int row, input bit w, output int unsigned lat);
    int unsigned t0;
    @(negedge clk);
    req = 1'b1; req_row = 12'(row); req_write = w; t0 = cyc;
    @(negedge clk);
    req = 1'b0;
    while (!done) @(negedge clk);
    lat = cyc - t0;
    @(negedge clk);
  endtask

  int unsigned lat;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    lookup(5, 0, lat);
    chk("miss fills local row 0", idx == 0 && log_row.size() == 1 && log_wb[0] == 0 && log_row[0] == 5);
    chk("subarray of row 5", idx_subarray == 0);
    lookup(5, 0, lat);
    chk("hit in two cycles", lat == 2 && idx == 0);
    lookup(6, 1, lat);  chk("row 6 -> local 1", idx == 1);
    lookup(7, 0, lat);  chk("row 7 -> local 2", idx == 2);
    lookup(600, 0, lat); chk("row 600 -> local 3", idx == 3 && idx_subarray == 2);
    lookup(6, 0, lat);  chk("hit row 6", idx == 1 && lat == 2);
    chk("no transfer on hits", log_row.size() == 4);
    lookup(9, 0, lat);
    chk("FIFO victim 0 clean: fetch only", idx == 0 && log_row.size() == 5 && log_wb[4] == 0 && log_row[4] == 9);
    lookup(10, 0, lat);
    chk("dirty victim 1 written back first", log_row.size() == 7 && log_wb[5] == 1 && log_row[5] == 6 &&
        log_idx[5] == 1 && log_wb[6] == 0 && log_row[6] == 10 && idx == 1);
    pin_valid = 1'b1; pin_idx = 2'd2;
    lookup(11, 0, lat);
    chk("pinned row 2 kept, victim 3", idx == 3);
    pin_valid = 1'b0;
    lookup(7, 0, lat);  chk("row 7 still cached", idx == 2 && lat == 2);
    chk("hit count", n_hit == 3);
    chk("miss count", n_miss == 7);
    chk("write back count", n_wb == 1);
    chk("stalled while every transfer was outstanding", busy_sync == 4 * 8);

    begin
      logic [1:0] got, again;
      int unsigned not_fifo = 0;
      for (int i = 0; i < 24; i++) begin
        lookup_r(100 + i, got);
        if (i >= 4 && got != 2'(i)) not_fifo++;
        lookup_r(100 + i, again);
        chk("random policy: new row hits where it was placed", again == got);
      end
      chk("random policy: victims differ from FIFO order", not_fifo > 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
