// Self-checking test of the dual-rail completion detector (3 and 8 bits):
// done must rise only when every bit is valid and fall only when every bit
// has returned to empty, filling and draining the word in random bit order.
module completion_detector_tb;
  localparam int N3 = 3, N8 = 8;
  logic [N3-1:0] t3, f3;
  logic [N8-1:0] t8, f8;
  logic rst_n, done3, done8;
  int checks = 0, failures = 0;

  completion_detector #(.N(N3)) dut3 (.d_t(t3), .d_f(f3), .rst_n, .done(done3));
  completion_detector #(.N(N8)) dut8 (.d_t(t8), .d_f(f8), .rst_n, .done(done8));

  task automatic expect_done(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: done=%0b expected %0b", what, got, exp);
    end
  endtask

  // Fill a word one random bit at a time with random values, then drain it.
  task automatic cycle8();
    int order[N8];
    logic [N8-1:0] val;
    val = N8'($urandom);
    foreach (order[i]) order[i] = i;
    order.shuffle();
    for (int k = 0; k < N8; k++) begin
      t8[order[k]] = val[order[k]];
      f8[order[k]] = ~val[order[k]];
      #1;
      expect_done(done8, (k == N8 - 1), "fill8");
    end
    order.shuffle();
    for (int k = 0; k < N8; k++) begin
      t8[order[k]] = 1'b0;
      f8[order[k]] = 1'b0;
      #1;
      expect_done(done8, (k != N8 - 1), "drain8");
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; t3 = '0; f3 = '0; t8 = '0; f8 = '0;
    #1 rst_n = 1'b1; #1;
    expect_done(done3, 1'b0, "empty3");
    // 3-bit: walk bits valid one by one with all value patterns
    for (int v = 0; v < 8; v++) begin
      t3[0] = v[0]; f3[0] = ~v[0]; #1; expect_done(done3, 1'b0, "3 bit0");
      t3[2] = v[2]; f3[2] = ~v[2]; #1; expect_done(done3, 1'b0, "3 bit2");
      t3[1] = v[1]; f3[1] = ~v[1]; #1; expect_done(done3, 1'b1, "3 all");
      t3[1] = 0;    f3[1] = 0;     #1; expect_done(done3, 1'b1, "3 hold");
      t3[0] = 0;    f3[0] = 0;     #1; expect_done(done3, 1'b1, "3 hold2");
      t3[2] = 0;    f3[2] = 0;     #1; expect_done(done3, 1'b0, "3 empty");
    end
    for (int r = 0; r < 100; r++) cycle8();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
