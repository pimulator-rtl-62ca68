// tb_trace_capture: drives random event pulses into the statistics block
// (16 banks) and compares every counter with counts kept by the testbench.
module tb_trace_capture;
  import pim_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, stall = 1'b0, cmd_valid = 1'b0;
  cmd_t cmd = CMD_NOP;
  logic [15:0] react = '0, tra = '0, copy = '0, hit = '0, miss = '0, wb = '0, violation = '0;
  logic [15:0][6:0] hops = '0;
  stats_t stats, e;
  int checks = 0, failures = 0;

  trace_capture dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic logic [31:0] pc(input logic [15:0] v);
    return 32'($countones(v));
  endfunction
  initial begin
    e = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      begin
        if (stall) e.stall_cycles++; else e.cycles++;
        if (cmd_valid) case (cmd)
          CMD_ACT: e.n_act++;
          CMD_RD, CMD_RDA: e.n_rd++;
          CMD_WR, CMD_WRA: e.n_wr++;
          CMD_PRE, CMD_PREA: e.n_pre++;
          CMD_REF: e.n_ref++;
          default: ;
        endcase
        e.n_reactivate += pc(react); e.n_tra += pc(tra); e.n_hit += pc(hit); e.n_miss += pc(miss);
        e.n_writeback += pc(wb); e.n_violation += pc(violation);
        for (int b = 0; b < 16; b++) if (copy[b]) e.n_lisa_hops += 32'(hops[b]);
      end
      stall = ($urandom % 4) == 0; cmd_valid = 1'($urandom % 2); cmd = cmd_t'($urandom % 12);
      react = 16'($urandom); tra = 16'($urandom); copy = 16'($urandom); hit = 16'($urandom);
      miss = 16'($urandom); wb = 16'($urandom); violation = 16'($urandom);
      for (int b = 0; b < 16; b++) hops[b] = 7'($urandom);
      #1;
      checks++;
      if (stats != e) begin
        failures++;
        if (failures < 5) $display("FAIL: cycle %0d statistics differ", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
