// Self-checking test of an 8-bit dual-rail pipeline latch: a producer sends
// random words with the 4-phase protocol, a slow consumer acknowledges them;
// every word must arrive intact, the acknowledge must rise only once the
// whole word is held and fall only once it is empty, and a new word must not
// overwrite one the consumer has not acknowledged.
module dr_pipeline_latch_tb;
  localparam int N = 8;
  logic [N-1:0] in_t, in_f, out_t, out_f;
  logic ack_in, ack_out, rst_n;
  int checks = 0, failures = 0;

  dr_pipeline_latch #(.N(N)) dut (.in_t, .in_f, .ack_in, .rst_n, .out_t, .out_f, .ack_out);

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
    logic [N-1:0] w, w2;
    rst_n = 0; in_t = '0; in_f = '0; ack_in = 0;
    #2 rst_n = 1; #1;
    chk(ack_out == 0 && out_t == 0 && out_f == 0, "reset empty");
    for (int i = 0; i < 100; i++) begin
      w = N'($urandom);
      // drive bits one at a time: ack must wait for the last one
      for (int b = 0; b < N; b++) begin
        in_t[b] = w[b]; in_f[b] = ~w[b]; #1;
        chk(ack_out == (b == N - 1), "ack only on complete word");
      end
      chk(out_t == w && out_f == ~w, "data through");
      // consumer still busy: drop input, offer next word, latch must hold
      in_t = '0; in_f = '0; #1;
      chk(out_t == w && ack_out, "hold until consumer acks");
      ack_in = 1; #1;
      chk(out_t == '0 && out_f == '0 && !ack_out, "empty after consumer ack");
      w2 = N'($urandom);
      in_t = w2; in_f = ~w2; #1;
      chk(out_t == '0 && !ack_out, "next word waits for ack_in low");
      ack_in = 0; #1;
      chk(out_t == w2 && out_f == ~w2 && ack_out, "next word captured");
      in_t = '0; in_f = '0; ack_in = 1; #1;
      chk(!ack_out, "second empty");
      ack_in = 0; #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
