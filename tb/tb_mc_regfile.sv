// tb_mc_regfile: random writes, invalidates and reads of the MC registers
// and condition codes, checked against arrays kept here. Read port #0 is
// combinational; read port #1 returns data the cycle after rd1_en and holds
// it. Controller set/clear of a CC register wins over a processor write.
module tb_mc_regfile;
  import msg_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, inv_en = 0, rd1_en = 0;
  logic [0:0] wr_bank = 0, inv_bank = 0, rd0_bank = 0, rd1_bank = 0;
  logic [3:0] wr_idx = 0, inv_idx = 0, rd0_idx = 0, rd1_idx = 0;
  word_t wr_data = '0, rd0_data, rd1_data;
  logic rd0_present;
  logic [1:0][11:0] present;
  logic cc_wr_en = 0, cc_wr_val = 0, ncc_clr_en = 0, ncc_set_en = 0, ncc_set_val = 0;
  logic [1:0] cc_wr_idx = 0, ncc_clr_idx = 0, ncc_set_idx = 0;
  logic [3:0] cc_val, cc_present;
  int checks = 0, failures = 0;

  word_t m_regs [2][12];
  bit    m_pres [2][12];
  bit    m_ccv [4], m_ccp [4];
  word_t m_rd1;

  mc_regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    foreach (m_regs[b, r]) begin m_regs[b][r] = '0; m_pres[b][r] = 1; end
    foreach (m_ccv[i]) begin m_ccv[i] = 0; m_ccp[i] = 1; end
    m_rd1 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      wr_en   = $urandom_range(0, 1);  wr_bank = 1'($urandom); wr_idx = 4'($urandom_range(0, 11));
      wr_data = {$urandom, $urandom};
      inv_en  = $urandom_range(0, 1);  inv_bank = 1'($urandom); inv_idx = 4'($urandom_range(0, 11));
      rd0_bank = 1'($urandom); rd0_idx = 4'($urandom_range(0, 11));
      rd1_en  = $urandom_range(0, 1);  rd1_bank = 1'($urandom); rd1_idx = 4'($urandom_range(0, 11));
      cc_wr_en = $urandom_range(0, 1); cc_wr_idx = 2'($urandom); cc_wr_val = 1'($urandom);
      ncc_clr_en = ($urandom_range(0, 3) == 0); ncc_clr_idx = 2'($urandom);
      ncc_set_en = ($urandom_range(0, 3) == 0); ncc_set_idx = 2'($urandom); ncc_set_val = 1'($urandom);
      #1;
      check(rd0_data == m_regs[rd0_bank][rd0_idx], "rd0 data");
      check(rd0_present == m_pres[rd0_bank][rd0_idx], "rd0 present");
      check(rd1_data == m_rd1, "rd1 data held");
      for (int b = 0; b < 2; b++)
        for (int r = 0; r < 12; r++)
          check(present[b][r] == m_pres[b][r], "presence bits");
      for (int i = 0; i < 4; i++)
        check(cc_val[i] == m_ccv[i] && cc_present[i] == m_ccp[i], "cc");
      // model update for the coming edge
      if (rd1_en) m_rd1 = m_regs[rd1_bank][rd1_idx];
      if (inv_en) m_pres[inv_bank][inv_idx] = 0;
      if (wr_en) begin m_regs[wr_bank][wr_idx] = wr_data; m_pres[wr_bank][wr_idx] = 1; end
      if (cc_wr_en) begin m_ccv[cc_wr_idx] = cc_wr_val; m_ccp[cc_wr_idx] = 1; end
      if (ncc_clr_en) m_ccp[ncc_clr_idx] = 0;
      if (ncc_set_en) begin m_ccv[ncc_set_idx] = ncc_set_val; m_ccp[ncc_set_idx] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
