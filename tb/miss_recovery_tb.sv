// Self-checking test of the Dispatch path select and miss recovery: in
// Direct/Storage Mode the decoder's word passes; in Fast Access Mode a hit
// passes the buffer's word and a miss gives a NOP, clear_f, and one cycle
// later the registered redirect with the missing PC; misses are counted.
module miss_recovery_tb;
  localparam int PC_W = 16, CTRL_W = 128;
  logic clk = 0, rst_n;
  logic tok_valid; logic [PC_W-1:0] tok_pc; logic f_reg, plb_hit;
  logic [CTRL_W-1:0] plb_ctrl, dec_ctrl, out_ctrl;
  logic miss, clear_f, out_from_plb, out_nop, redirect_q, nop_q;
  logic [PC_W-1:0] redirect_pc_q; logic [15:0] misses;
  int checks = 0, failures = 0;

  miss_recovery #(.PC_W(PC_W), .CTRL_W(CTRL_W), .CNT_W(16)) dut (.*);

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
    int n = 0;
    rst_n = 0; tok_valid = 0; tok_pc = 0; f_reg = 0; plb_hit = 0; plb_ctrl = 0; dec_ctrl = 0;
    @(posedge clk); @(posedge clk); #1 rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      bit e_miss;
      tok_valid = ($urandom_range(4) != 0);
      tok_pc = PC_W'($urandom);
      f_reg = 1'($urandom_range(1));
      plb_hit = f_reg & ($urandom_range(3) != 0);
      plb_ctrl = {$urandom, $urandom, $urandom, $urandom};
      dec_ctrl = {$urandom, $urandom, $urandom, $urandom};
      #1;
      e_miss = tok_valid && f_reg && !plb_hit;
      chk(miss == e_miss && clear_f == e_miss && out_nop == e_miss, "miss flags");
      if (e_miss) chk(out_ctrl == '0, "NOP inserted");
      else if (tok_valid && f_reg) chk(out_ctrl == plb_ctrl && out_from_plb, "fast access word");
      else chk(out_ctrl == dec_ctrl && !out_from_plb, "decoded word");
      @(posedge clk); #1;
      if (e_miss) n++;
      chk(redirect_q == e_miss && nop_q == e_miss, "registered redirect");
      if (e_miss) chk(redirect_pc_q == tok_pc, "redirect PC");
      chk(misses == 16'(n), "miss count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
