// Completion detector for an N-bit dual-rail word (the "alternative"
// detector).
//
// Each bit's two rails are ORed to tell whether that bit carries a value.
// One AND of all these OR outputs says the whole word is valid; a NAND of
// their inverses (equivalently an OR of them) says at least one bit is still
// valid. A C-element joins the two, so done rises only when every bit is
// valid and falls only when every bit has returned to empty (the spacer).
// This uses one C-element per word instead of a tree of C-elements.
//
// Ports: d_t/d_f are the true and false rails (bit i is {d_t[i], d_f[i]});
// done is the acknowledge the receiving stage derives. Asynchronous: done
// changes one gate plus C-element delay after the last rail changes.
// rst_n (active low) clears the C-element.
module completion_detector #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] d_t,
  input  logic [N-1:0] d_f,
  input  logic         rst_n,
  output logic         done
);
  logic [N-1:0] bit_valid;
  logic         all_valid, any_valid;

  assign bit_valid = d_t | d_f;
  assign all_valid = &bit_valid;
  assign any_valid = ~(&(~bit_valid));

  c_element u_c (.a(all_valid), .b(any_valid), .rst_n(rst_n), .z(done));
endmodule
