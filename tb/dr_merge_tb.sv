// Self-checking test of the dual-rail Merge (4 bits): a token on either
// input, never both, appears unchanged on the output; empty gives empty.
module dr_merge_tb;
  localparam int N = 4;
  logic [N-1:0] a_t, a_f, b_t, b_f, out_t, out_f;
  int checks = 0, failures = 0;

  dr_merge #(.N(N)) dut (.a_t, .a_f, .b_t, .b_f, .out_t, .out_f);

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
    logic [N-1:0] w;
    a_t = '0; a_f = '0; b_t = '0; b_f = '0; #1;
    chk(out_t == 0 && out_f == 0, "empty");
    for (int i = 0; i < 200; i++) begin
      w = N'($urandom);
      if (i % 2 == 0) begin a_t = w; a_f = ~w; end
      else            begin b_t = w; b_f = ~w; end
      #1;
      chk(out_t == w && out_f == ~w, "token through");
      a_t = '0; a_f = '0; b_t = '0; b_f = '0; #1;
      chk(out_t == 0 && out_f == 0, "empty again");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
