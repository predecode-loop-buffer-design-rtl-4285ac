// Self-checking test of the mode controller against a reference written from
// the transition table: random branch records and outcomes, loop-buffer
// misses, the BIT write-back, the saturating execute counter, the replace
// register counting and its overflow clearing the Frequent Flags.
module mode_controller_tb;
  import plb_pkg::*;
  localparam int EXEC_W = 4, THRESHOLD = 4, REPLACE_W = 3;
  logic clk = 0, rst_n;
  logic br_valid, taken; logic [EXEC_W-1:0] info_exec; logic info_freq, info_prefreq;
  logic plb_miss;
  logic wr_en; logic [EXEC_W-1:0] wr_exec; logic wr_freq, wr_prefreq, clr_freq;
  logic s_reg, f_reg; mode_e mode; logic [REPLACE_W-1:0] replace;
  int checks = 0, failures = 0;
  int n_fast = 0, n_store = 0, n_direct = 0, n_ovf = 0;

  mode_controller #(.EXEC_W(EXEC_W), .THRESHOLD(THRESHOLD), .REPLACE_W(REPLACE_W)) dut (.*);

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
    mode_e   m_mode;
    int      m_rep;
    rst_n = 0; br_valid = 0; taken = 0; info_exec = 0; info_freq = 0; info_prefreq = 0; plb_miss = 0;
    m_mode = MODE_DIRECT; m_rep = 0;
    @(posedge clk); @(posedge clk); #1 rst_n = 1;
    chk(mode == MODE_DIRECT && !s_reg && !f_reg && replace == 0, "reset");
    for (int k = 0; k < 5000; k++) begin
      int inc; mode_e nm; bit e_wr, e_clr; bit e_f, e_pf;
      br_valid = ($urandom_range(3) != 0);
      taken = ($urandom_range(3) != 0);
      info_exec = EXEC_W'($urandom_range(15));
      info_freq = ($urandom_range(2) == 0);
      info_prefreq = info_freq | ($urandom_range(3) == 0);
      plb_miss = ($urandom_range(15) == 0);
      #1;
      // reference
      inc = (info_exec == 15) ? 15 : info_exec + 1;
      nm = m_mode; e_wr = 0; e_clr = 0; e_f = info_freq; e_pf = info_prefreq;
      if (plb_miss) nm = MODE_DIRECT;
      else if (br_valid) begin
        if (taken && (info_freq || info_prefreq))            nm = MODE_FAST;
        else if (taken && inc >= THRESHOLD)                 begin nm = MODE_STORAGE; e_f = 1; e_pf = 1; end
        else                                                nm = MODE_DIRECT;
        if (taken) e_wr = 1;
      end
      if (!plb_miss && br_valid && taken) begin
        if (info_freq) begin if (m_rep > 0) m_rep--; end
        else if (m_rep == 7) begin m_rep = 0; e_clr = 1; end
        else m_rep++;
      end
      chk(wr_en == e_wr, "wr_en");
      if (e_wr) chk(wr_exec == EXEC_W'(inc) && wr_freq == e_f && wr_prefreq == e_pf, "write-back record");
      chk(clr_freq == e_clr, "clr_freq");
      @(posedge clk); #1;
      m_mode = nm;
      chk(mode == m_mode, "mode");
      chk(s_reg == (m_mode == MODE_STORAGE) && f_reg == (m_mode == MODE_FAST), "mode registers");
      chk(replace == REPLACE_W'(m_rep), "replace register");
      if (m_mode == MODE_FAST) n_fast++;
      if (m_mode == MODE_STORAGE) n_store++;
      if (m_mode == MODE_DIRECT) n_direct++;
      if (e_clr) n_ovf++;
    end
    chk(n_fast > 0 && n_store > 0 && n_direct > 0 && n_ovf > 0, "all modes and an overflow seen");
    $display("fast=%0d store=%0d direct=%0d overflows=%0d", n_fast, n_store, n_direct, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
