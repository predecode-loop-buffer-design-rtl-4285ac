// Self-checking test of the Branch Information Table against an associative
// array model of a direct-mapped table: valid-zero reads for non-branches
// and misses, write and read-back, tag conflicts evicting, clearing all
// Frequent Flags while Pre-Frequent Flags stay, any_freq, and wr_ack.
module branch_info_table_tb;
  localparam int PC_W = 16, EXEC_W = 4, ENTRIES = 8, SET_W = 3;
  logic clk = 0, rst_n;
  logic rd_branch; logic [PC_W-1:0] rd_pc;
  logic rd_hit; logic [EXEC_W-1:0] rd_exec; logic rd_freq, rd_prefreq;
  logic wr_en; logic [PC_W-1:0] wr_pc; logic [EXEC_W-1:0] wr_exec; logic wr_freq, wr_prefreq;
  logic wr_ack, clr_freq, any_freq;
  int checks = 0, failures = 0;

  // model: per set, valid, full pc, exec, freq, prefreq
  logic              m_v [ENTRIES];
  logic [PC_W-1:0]   m_pc[ENTRIES];
  logic [EXEC_W-1:0] m_ex[ENTRIES];
  logic              m_f [ENTRIES];
  logic              m_pf[ENTRIES];

  branch_info_table #(.PC_W(PC_W), .EXEC_W(EXEC_W), .ENTRIES(ENTRIES)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; rd_branch = 0; rd_pc = 0; wr_en = 0; wr_pc = 0; wr_exec = 0;
    wr_freq = 0; wr_prefreq = 0; clr_freq = 0;
    foreach (m_v[i]) begin m_v[i] = 0; m_pc[i] = 0; m_ex[i] = 0; m_f[i] = 0; m_pf[i] = 0; end
    @(posedge clk); @(posedge clk); #1 rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      logic [PC_W-1:0] pc;
      int s;
      logic exp_hit, exp_any;
      // a small PC pool so that hits and conflicts both happen
      pc = PC_W'({$urandom_range(3), 3'($urandom_range(7))});
      s = int'(pc[SET_W-1:0]);
      rd_branch = ($urandom_range(5) != 0);
      rd_pc = pc;
      #1;
      exp_hit = rd_branch && m_v[s] && m_pc[s] == pc;
      chk(rd_hit == exp_hit, "hit");
      if (exp_hit) chk(rd_exec == m_ex[s] && rd_freq == m_f[s] && rd_prefreq == m_pf[s], "read data");
      else         chk(rd_exec == 0 && !rd_freq && !rd_prefreq, "valid zero");
      exp_any = 0;
      foreach (m_v[i]) exp_any |= m_v[i] & m_f[i];
      chk(any_freq == exp_any, "any_freq");
      // random write of the same branch and occasional clear
      wr_en = ($urandom_range(2) == 0);
      wr_pc = pc; wr_exec = EXEC_W'($urandom); wr_freq = 1'($urandom_range(1));
      wr_prefreq = 1'($urandom_range(1));
      clr_freq = ($urandom_range(15) == 0);
      @(posedge clk);
      if (clr_freq) foreach (m_f[i]) m_f[i] = 0;
      if (wr_en) begin
        m_v[s] = 1; m_pc[s] = pc; m_ex[s] = wr_exec; m_f[s] = wr_freq; m_pf[s] = wr_prefreq;
      end
      #1;
      chk(wr_ack == wr_en, "wr_ack follows write");
      wr_en = 0; clr_freq = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
