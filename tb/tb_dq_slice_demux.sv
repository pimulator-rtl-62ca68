// tb_dq_slice_demux: random check of the input side of the data bus
// (16 chips x 4 bits): the selected source's access passes through and
// chip i receives bits 4i+3..4i of the selected word.
module tb_dq_slice_demux;
  logic sel_m, c_en, c_we, m_en, m_we, a_en, a_we;
  logic [3:0] c_bank, m_bank, a_bank;
  logic [4:0] c_idx, m_idx, a_idx;
  logic [9:0] c_col, m_col, a_col;
  logic [63:0] dq_in_c, dq_in_m;
  logic [15:0][3:0] chip_wdata;
  int checks = 0, failures = 0;

  dq_slice_demux dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 200; i++) begin
      logic [63:0] w;
      {sel_m, c_en, c_we, m_en, m_we} = 5'($urandom);
      c_bank = 4'($urandom); m_bank = 4'($urandom); c_idx = 5'($urandom); m_idx = 5'($urandom);
      c_col = 10'($urandom); m_col = 10'($urandom);
      dq_in_c = {$urandom, $urandom}; dq_in_m = {$urandom, $urandom};
      #1;
      w = sel_m ? dq_in_m : dq_in_c;
      checks++;
      if (a_en != (sel_m ? m_en : c_en) || a_we != (sel_m ? m_we : c_we) ||
          a_bank != (sel_m ? m_bank : c_bank) || a_idx != (sel_m ? m_idx : c_idx) ||
          a_col != (sel_m ? m_col : c_col)) begin
        failures++; $display("FAIL: access of the wrong source");
      end
      for (int c = 0; c < 16; c++) begin
        checks++;
        if (chip_wdata[c] != w[4*c +: 4]) begin failures++; $display("FAIL: chip %0d slice", c); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
