// C_Latch: one dual-rail bit of an asynchronous pipeline latch.
//
// Each rail passes through a C-element whose other input is the inverted
// acknowledge from the next stage. A valid bit is therefore captured when
// the next stage has acknowledged the previous token (ack_in = 0), and the
// output returns to empty once the input is empty and ack_in = 1. The OR of
// the two output rails is the acknowledge sent back to the previous stage.
// Active-low reset empties the latch (this design's addition to the cell).
// Asynchronous, 4-phase return-to-zero handshake; no clock.
module c_latch (
  input  logic in_t,
  input  logic in_f,
  input  logic ack_in,
  input  logic rst_n,
  output logic out_t,
  output logic out_f,
  output logic ack_out
);
  logic en;
  assign en = ~ack_in;

  c_element u_ct (.a(in_t), .b(en), .rst_n(rst_n), .z(out_t));
  c_element u_cf (.a(in_f), .b(en), .rst_n(rst_n), .z(out_f));

  assign ack_out = out_t | out_f;
endmodule
