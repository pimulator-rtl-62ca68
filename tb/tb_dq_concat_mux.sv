// tb_dq_concat_mux: checks the output side of the data bus (16 chips x 4
// bits): chip i's word appears at bits 4i+3..4i, the pins are driven only in
// the cycle after a controller read, and the strobe toggles per driven beat.
module tb_dq_concat_mux;
  logic clk = 1'b0, rst_n = 1'b0, rd_c = 1'b0, dq_oe, dqs_t;
  logic [15:0][3:0] chip_rdata;
  logic [63:0] dq_out_c, dq_out_m;
  int checks = 0, failures = 0;
  int unsigned rises = 0;

  dq_concat_mux dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    logic prev_rd, prev_dqs, prev_oe;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    prev_rd = 1'b0;
    prev_dqs = 1'b0;
    prev_oe = 1'b0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      for (int c = 0; c < 16; c++) chip_rdata[c] = 4'($urandom);
      #1;
      chk("driven one cycle after a read", dq_oe == prev_rd);
      for (int c = 0; c < 16; c++) begin
        chk("board-side slice", dq_out_m[4*c +: 4] == chip_rdata[c]);
        chk("pin slice", dq_out_c[4*c +: 4] == (dq_oe ? chip_rdata[c] : 4'h0));
      end
      if (dq_oe && prev_oe) chk("strobe toggles per beat", dqs_t != prev_dqs);
      if (!dq_oe)           chk("strobe low when not driven", !dqs_t);
      prev_dqs = dqs_t;
      prev_oe = dq_oe;
      rd_c = ($urandom % 3) != 0;
      prev_rd = rd_c;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
