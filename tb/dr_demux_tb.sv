// Self-checking test of the dual-rail DeMux (4 bits): the token goes to the
// path the select names, the other path stays empty, and outputs return to
// empty only after both data and select have returned to empty.
module dr_demux_tb;
  localparam int N = 4;
  logic [N-1:0] in_t, in_f, up_t, up_f, lo_t, lo_f;
  logic sel_t, sel_f, rst_n;
  int checks = 0, failures = 0;

  dr_demux #(.N(N)) dut (.in_t, .in_f, .sel_t, .sel_f, .rst_n, .up_t, .up_f, .lo_t, .lo_f);

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
    logic s;
    rst_n = 0; in_t = '0; in_f = '0; sel_t = 0; sel_f = 0;
    #2 rst_n = 1; #1;
    for (int i = 0; i < 200; i++) begin
      w = N'($urandom); s = 1'($urandom_range(1));
      in_t = w; in_f = ~w; #1;
      chk(up_t == 0 && up_f == 0 && lo_t == 0 && lo_f == 0, "no output before select");
      sel_t = s; sel_f = ~s; #1;
      if (s) chk(up_t == w && up_f == ~w && lo_t == 0 && lo_f == 0, "routed up");
      else   chk(lo_t == w && lo_f == ~w && up_t == 0 && up_f == 0, "routed down");
      in_t = '0; in_f = '0; #1;
      if (s) chk(up_t == w && up_f == ~w, "held until select empty (up)");
      else   chk(lo_t == w && lo_f == ~w, "held until select empty (down)");
      sel_t = 0; sel_f = 0; #1;
      chk(up_t == 0 && up_f == 0 && lo_t == 0 && lo_f == 0, "back to empty");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
