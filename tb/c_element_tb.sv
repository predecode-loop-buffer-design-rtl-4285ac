// Self-checking test of the Muller C-element: every input transition from
// every state, and the active-low reset, against a reference state machine.
module c_element_tb;
  logic a, b, rst_n, z;
  logic ref_z;
  int checks = 0, failures = 0;

  c_element dut (.a, .b, .rst_n, .z);

  task automatic apply(input logic na, input logic nb);
    a = na; b = nb;
    #1;
    if (na == nb) ref_z = na;
    checks++;
    if (z !== ref_z) begin
      failures++;
      $display("FAIL a=%0b b=%0b z=%0b expected %0b", na, nb, z, ref_z);
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
    a = 1'b1; b = 1'b1; rst_n = 1'b0; ref_z = 1'b0;
    #1;
    checks++;
    if (z !== 1'b0) begin failures++; $display("FAIL reset does not clear"); end
    rst_n = 1'b1;
    a = 1'b0; b = 1'b0; #1;
    // exhaustive walk over input pairs, repeated with random order
    for (int i = 0; i < 64; i++) apply(1'(i[0] ^ i[3]), 1'(i[1] ^ i[2]));
    for (int i = 0; i < 200; i++) apply(1'($urandom_range(1)), 1'($urandom_range(1)));
    // hold checks: set to 1, then disagree both ways
    apply(1, 1); apply(0, 1); apply(1, 0); apply(1, 1);
    apply(0, 0); apply(1, 0); apply(0, 1); apply(0, 0);
    // reset while holding 1
    apply(1, 1);
    rst_n = 1'b0; #1; ref_z = 1'b0;
    checks++;
    if (z !== 1'b0) begin failures++; $display("FAIL reset while holding 1"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
