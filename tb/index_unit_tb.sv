// Self-checking test of the index register: the change bit is the OR of the
// p-bits, the next index follows the change/index truth table (change 0
// toggles, change 1 keeps), it only advances on accepted tokens, and reset
// and a taken branch set it to left (1).
module index_unit_tb;
  logic clk = 0, rst_n, adv, pbit1, pbit2, restart;
  logic index, change, index_next;
  logic ref_idx;
  int checks = 0, failures = 0;

  index_unit dut (.clk, .rst_n, .adv, .pbit1, .pbit2, .restart, .index, .change, .index_next);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; adv = 0; pbit1 = 0; pbit2 = 0; restart = 0;
    @(posedge clk); @(posedge clk); #1 rst_n = 1;
    ref_idx = 1'b1;
    chk(index == 1'b1, "reset to left");
    // the four rows of the change/index table
    for (int row = 0; row < 4; row++) begin
      logic c, i0, exp_next;
      c = row[1]; i0 = row[0];
      // bring index to i0
      if (index != i0) begin
        adv = 1; pbit1 = 0; pbit2 = 0; @(posedge clk); #1; adv = 0;
      end
      pbit1 = c; pbit2 = 0; #1;
      exp_next = (c == 0) ? ~i0 : i0;
      chk(change == c && index_next == exp_next, "table row");
      adv = 1; @(posedge clk); #1; adv = 0;
      chk(index == exp_next, "register takes next index");
    end
    // random stream
    ref_idx = index;
    for (int k = 0; k < 1000; k++) begin
      logic p1, p2, a, r;
      p1 = 1'($urandom_range(1)); p2 = p1 ? 1'b0 : 1'($urandom_range(1)); // 11 unused
      a = 1'($urandom_range(1)); r = ($urandom_range(9) == 0);
      pbit1 = p1; pbit2 = p2; adv = a; restart = r; #1;
      chk(change == (p1 | p2), "change = OR");
      @(posedge clk);
      if (r)      ref_idx = 1'b1;
      else if (a) ref_idx = ((p1 | p2) == 1'b0) ? ~ref_idx : ref_idx;
      #1;
      chk(index == ref_idx, "random stream");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
