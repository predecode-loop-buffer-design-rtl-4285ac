// N-bit dual-rail pipeline latch between two asynchronous pipeline stages.
//
// N C_Latches share the inverted acknowledge of the next stage. The word's
// acknowledge to the previous stage comes from a completion detector on the
// latch outputs: it rises when the whole word has been captured valid and
// falls when the whole word has returned to empty. This follows the 4-phase
// dual-rail Muller pipeline; joining the per-bit acknowledges with one
// completion detector is this design's choice for a multi-bit latch.
// Asynchronous; active-low reset empties it.
module dr_pipeline_latch #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] in_t,
  input  logic [N-1:0] in_f,
  input  logic         ack_in,
  input  logic         rst_n,
  output logic [N-1:0] out_t,
  output logic [N-1:0] out_f,
  output logic         ack_out
);
  for (genvar i = 0; i < int'(N); i++) begin : g_bit
    c_latch u_bit (.in_t(in_t[i]), .in_f(in_f[i]), .ack_in(ack_in), .rst_n(rst_n),
                   .out_t(out_t[i]), .out_f(out_f[i]), .ack_out());
  end

  completion_detector #(.N(N)) u_cd (.d_t(out_t), .d_f(out_f), .rst_n(rst_n), .done(ack_out));
endmodule
