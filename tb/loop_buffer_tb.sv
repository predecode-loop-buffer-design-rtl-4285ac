// Self-checking test of the loop buffer storage against a model: writes of
// random control words at {PC, index}, hits return the stored word and
// p-bits, both halves of one PC are separate entries, a PC with another tag
// in the same set misses, and nothing hits after reset.
module loop_buffer_tb;
  localparam int PC_W = 16, CTRL_W = 128, ENTRIES = 32, PCS_W = 4;
  logic clk = 0, rst_n;
  logic wr_en; logic [PC_W-1:0] wr_pc; logic wr_index; logic [CTRL_W-1:0] wr_ctrl; logic [1:0] wr_pbits;
  logic rd_en; logic [PC_W-1:0] rd_pc; logic rd_index;
  logic rd_hit, rd_miss; logic [CTRL_W-1:0] rd_ctrl; logic [1:0] rd_pbits;
  int checks = 0, failures = 0;

  logic              m_v [ENTRIES];
  logic [PC_W-1:0]   m_pc[ENTRIES];
  logic [CTRL_W-1:0] m_c [ENTRIES];
  logic [1:0]        m_p [ENTRIES];

  loop_buffer #(.PC_W(PC_W), .CTRL_W(CTRL_W), .ENTRIES(ENTRIES)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  function automatic logic [CTRL_W-1:0] rnd_ctrl();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hits = 0, misses = 0;
    rst_n = 0; wr_en = 0; wr_pc = 0; wr_index = 0; wr_ctrl = 0; wr_pbits = 0;
    rd_en = 0; rd_pc = 0; rd_index = 0;
    foreach (m_v[i]) m_v[i] = 0;
    @(posedge clk); @(posedge clk); #1 rst_n = 1;
    rd_en = 1; rd_pc = 16'h0040; rd_index = 1; #1;
    chk(!rd_hit && rd_miss, "empty after reset");
    for (int k = 0; k < 4000; k++) begin
      logic [PC_W-1:0] pc; logic ix; int s;
      pc = PC_W'({$urandom_range(2), 4'($urandom_range(15))}) + 16'h0100;
      ix = 1'($urandom_range(1));
      s = int'({pc[PCS_W-1:0], ix});
      rd_en = ($urandom_range(7) != 0); rd_pc = pc; rd_index = ix;
      #1;
      if (rd_en && m_v[s] && m_pc[s] == pc) begin
        hits++;
        chk(rd_hit && !rd_miss && rd_ctrl == m_c[s] && rd_pbits == m_p[s], "hit data");
      end else begin
        if (rd_en) misses++;
        chk(!rd_hit && (rd_miss == rd_en), "miss");
      end
      wr_en = ($urandom_range(3) == 0);
      wr_pc = pc; wr_index = ix; wr_ctrl = rnd_ctrl(); wr_pbits = 2'($urandom_range(2));
      @(posedge clk);
      if (wr_en) begin m_v[s] = 1; m_pc[s] = pc; m_c[s] = wr_ctrl; m_p[s] = wr_pbits; end
      #1 wr_en = 0;
    end
    chk(hits > 100 && misses > 100, "both hits and misses exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
