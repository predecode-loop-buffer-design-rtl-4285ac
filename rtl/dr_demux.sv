// Dual-rail DeMux: steers an N-bit dual-rail token to one of two paths.
//
// Every rail of the input is joined in a C-element with the select's true
// rail (upper path) and in another with its false rail (lower path). With
// select valid 1 the token appears on the upper outputs, with valid 0 on the
// lower outputs; the other path stays empty, so its function block does no
// work and is bypassed. Outputs return to empty only when both the data and
// the select have returned to empty (4-phase handshake). Asynchronous;
// active-low reset clears all C-elements.
module dr_demux #(
  parameter int unsigned N = 1
) (
  input  logic [N-1:0] in_t,
  input  logic [N-1:0] in_f,
  input  logic         sel_t,
  input  logic         sel_f,
  input  logic         rst_n,
  output logic [N-1:0] up_t,
  output logic [N-1:0] up_f,
  output logic [N-1:0] lo_t,
  output logic [N-1:0] lo_f
);
  for (genvar i = 0; i < int'(N); i++) begin : g_bit
    c_element u_ut (.a(in_t[i]), .b(sel_t), .rst_n(rst_n), .z(up_t[i]));
    c_element u_uf (.a(in_f[i]), .b(sel_t), .rst_n(rst_n), .z(up_f[i]));
    c_element u_lt (.a(in_t[i]), .b(sel_f), .rst_n(rst_n), .z(lo_t[i]));
    c_element u_lf (.a(in_f[i]), .b(sel_f), .rst_n(rst_n), .z(lo_f[i]));
  end
endmodule
