// tb_bank_mem: random writes and reads of the bank module storage
// (default 32 rows x 1024 columns x 4 bits) against a reference array;
// read data must appear exactly one cycle after the access and hold while
// the port is idle.
module tb_bank_mem;
  logic clk = 1'b0, en = 1'b0, we = 1'b0;
  logic [4:0] idx = '0;
  logic [9:0] col = '0;
  logic [3:0] wdata = '0, rdata;
  logic [3:0] ref_m [32][1024];
  int checks = 0, failures = 0;

  bank_mem dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 32; r++) for (int c = 0; c < 1024; c++) ref_m[r][c] = '0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en = 1'b1; we = ($urandom % 2) == 0;
      idx = 5'($urandom); col = 10'($urandom % 16);
      wdata = 4'($urandom);
      if (we) ref_m[idx][col] = wdata;
      else begin
        logic [3:0] e;
        e = ref_m[idx][col];
        @(negedge clk);
        en = 1'b0;
        checks++;
        if (rdata !== e) begin
          failures++;
          $display("FAIL: row %0d col %0d got %h expected %h", idx, col, rdata, e);
        end
        @(negedge clk);
        checks++;
        if (rdata !== e) begin failures++; $display("FAIL: read data not held"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
