// Self-checking test of the mutual exclusion element: a lone request passes
// at once; when the other request is already granted a request waits,
// outputs empty, until the first input returns to empty; both outputs are
// never valid together; a tie goes to input 1.
module mutex_tb;
  localparam int N = 4;
  logic [N-1:0] d1_t, d1_f, d2_t, d2_f, o1_t, o1_f, o2_t, o2_f;
  logic rst_n;
  int checks = 0, failures = 0;

  mutex #(.N(N)) dut (.d1_t, .d1_f, .d2_t, .d2_f, .rst_n,
                      .out1_t(o1_t), .out1_f(o1_f), .out2_t(o2_t), .out2_f(o2_f));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] w1, w2;
    rst_n = 0; d1_t = '0; d1_f = '0; d2_t = '0; d2_f = '0;
    #2 rst_n = 1; #1;
    for (int i = 0; i < 100; i++) begin
      w1 = N'($urandom); w2 = N'($urandom);
      // lone requests
      d1_t = w1; d1_f = ~w1; #1;
      chk(o1_t == w1 && o1_f == ~w1 && o2_t == 0 && o2_f == 0, "lone d1");
      d1_t = '0; d1_f = '0; #1;
      chk(o1_t == 0 && o1_f == 0, "d1 empty");
      d2_t = w2; d2_f = ~w2; #1;
      chk(o2_t == w2 && o2_f == ~w2 && o1_t == 0 && o1_f == 0, "lone d2");
      // d1 arrives while d2 is granted: must wait
      d1_t = w1; d1_f = ~w1; #1;
      chk(o1_t == 0 && o1_f == 0 && o2_t == w2, "d1 waits for d2");
      d2_t = '0; d2_f = '0; #1;
      chk(o1_t == w1 && o1_f == ~w1 && o2_t == 0 && o2_f == 0, "d1 granted after d2 empty");
      // d2 arrives while d1 granted
      d2_t = w2; d2_f = ~w2; #1;
      chk(o2_t == 0 && o2_f == 0, "d2 waits for d1");
      d1_t = '0; d1_f = '0; #1;
      chk(o2_t == w2 && o2_f == ~w2 && o1_t == 0, "d2 granted after d1 empty");
      d2_t = '0; d2_f = '0; #1;
      // tie
      d1_t = w1; d1_f = ~w1; d2_t = w2; d2_f = ~w2; #1;
      chk(o1_t == w1 && o1_f == ~w1 && o2_t == 0 && o2_f == 0, "tie to d1");
      d1_t = '0; d1_f = '0; #1;
      chk(o2_t == w2 && o2_f == ~w2, "then d2");
      d2_t = '0; d2_f = '0; #1;
      chk(o1_t == 0 && o1_f == 0 && o2_t == 0 && o2_f == 0, "idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
