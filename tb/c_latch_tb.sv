// Self-checking test of one C_Latch bit in a 4-phase dual-rail handshake:
// capture of valid 0 and 1, blocking while the next stage still
// acknowledges, return to empty, and the acknowledge to the previous stage.
module c_latch_tb;
  logic in_t, in_f, ack_in, rst_n, out_t, out_f, ack_out;
  int checks = 0, failures = 0;

  c_latch dut (.in_t, .in_f, .ack_in, .rst_n, .out_t, .out_f, .ack_out);

  task automatic chk(input logic et, input logic ef, input string what);
    #1;
    checks++;
    if (out_t !== et || out_f !== ef || ack_out !== (et | ef)) begin
      failures++;
      $display("FAIL %s: out=%0b%0b ack=%0b expected %0b%0b", what, out_t, out_f, ack_out, et, ef);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic v;
    rst_n = 1'b0; in_t = 0; in_f = 0; ack_in = 0;
    chk(0, 0, "reset");
    rst_n = 1'b1;
    for (int i = 0; i < 50; i++) begin
      v = 1'($urandom_range(1));
      // next stage busy: a new token must wait
      ack_in = 1'b1;
      in_t = v; in_f = ~v;   chk(0, 0, "blocked by ack_in");
      ack_in = 1'b0;         chk(v, ~v, "capture");
      ack_in = 1'b1;         chk(v, ~v, "hold while input valid");
      in_t = 0; in_f = 0;    chk(0, 0, "return to empty");
      ack_in = 1'b0;         chk(0, 0, "stay empty");
    end
    // valid held while input already empty but next stage not yet acked
    in_t = 1; in_f = 0;      chk(1, 0, "capture 1");
    in_t = 0;                chk(1, 0, "hold until ack_in");
    ack_in = 1;              chk(0, 0, "release");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
