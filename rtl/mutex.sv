// Mutual exclusion element for two dual-rail requests.
//
// Used so that the Branch Information Table is never read (Decode) and
// written (EX1) at the same time. A request is present while any rail of
// its dual-rail input is high. The first request to arrive is granted and
// its token passes to its outputs (out.t = d.t AND grant, out.f = d.f AND
// grant); the other output stays empty until the granted input has returned
// to empty, and only then can the waiting token pass. Both outputs are
// never valid together.
//
// The cross-coupled NAND pair with its filter is written here as a
// level-sensitive grant latch (none / input 1 / input 2); if both requests rise in the same instant
// input 1 wins (in silicon the filter resolves the tie either way). The
// latch the tools report, and the loop they see through its own state, are
// this storage. Asynchronous; active-low reset
// drops both grants.
module mutex #(
  parameter int unsigned N = 1
) (
  input  logic [N-1:0] d1_t,
  input  logic [N-1:0] d1_f,
  input  logic [N-1:0] d2_t,
  input  logic [N-1:0] d2_f,
  input  logic         rst_n,
  output logic [N-1:0] out1_t,
  output logic [N-1:0] out1_f,
  output logic [N-1:0] out2_t,
  output logic [N-1:0] out2_f
);
  typedef enum logic [1:0] {GR_NONE = 2'd0, GR_ONE = 2'd1, GR_TWO = 2'd2} grant_e;

  logic   r1, r2;
  grant_e gr;
  logic   g1, g2;

  assign r1 = |(d1_t | d1_f);
  assign r2 = |(d2_t | d2_f);

  always_latch begin
    if (!rst_n) gr = GR_NONE;
    else begin
      unique case (gr)
        GR_NONE: if (r1) gr = GR_ONE; else if (r2) gr = GR_TWO;
        GR_ONE:  if (!r1) gr = r2 ? GR_TWO : GR_NONE;
        GR_TWO:  if (!r2) gr = r1 ? GR_ONE : GR_NONE;
        default: gr = GR_NONE;
      endcase
    end
  end

  assign g1 = (gr == GR_ONE);
  assign g2 = (gr == GR_TWO);

  assign out1_t = d1_t & {N{g1}};
  assign out1_f = d1_f & {N{g1}};
  assign out2_t = d2_t & {N{g2}};
  assign out2_f = d2_f & {N{g2}};

  always_comb begin
    assert (!(g1 && g2)) else $error("mutex: both grants high");
  end
endmodule
