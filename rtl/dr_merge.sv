// Dual-rail Merge: joins two mutually exclusive token paths.
//
// Because at most one of the two paths carries a valid token at any time
// (they are fed by a DeMux, or one is bypassed), each output rail is simply
// the OR of the corresponding rails of the two inputs. The assertion checks
// that rule: the two inputs are never valid together. Purely combinational.
module dr_merge #(
  parameter int unsigned N = 1
) (
  input  logic [N-1:0] a_t,
  input  logic [N-1:0] a_f,
  input  logic [N-1:0] b_t,
  input  logic [N-1:0] b_f,
  output logic [N-1:0] out_t,
  output logic [N-1:0] out_f
);
  assign out_t = a_t | b_t;
  assign out_f = a_f | b_f;

  always_comb begin
    assert final (!(|(a_t | a_f) && |(b_t | b_f)))
      else $error("dr_merge: both inputs carry a token");
  end
endmodule
