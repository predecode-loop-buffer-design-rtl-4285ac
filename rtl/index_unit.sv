// Index register for compressed VLIW words.
//
// A VLIW word holds two instructions. When their p-bits say they may
// not issue together, the word is dispatched twice with the same PC, first
// the left half and then the right half, so a PC alone cannot name a loop
// buffer entry. The index register holds the direction (1 = left, 0 = right)
// of the word now being dispatched; it and the PC together address the loop
// buffer.
//
// change = p-bit1 | p-bit2 (OR gate). The next index follows the published
// truth table: change = 0 toggles the direction, change = 1 keeps it, i.e.
// index_next = ~(change ^ index). The prose names a plain XOR gate; the
// table's values, which need the inverted output, are what is built here.
// Reset and a taken branch (a new target word) set the direction to left;
// both are this design's choice. The register advances by one step for each
// accepted token (adv), at the rising clock edge.
module index_unit (
  input  logic clk,
  input  logic rst_n,
  input  logic adv,        // a token left Dispatch with these p-bits
  input  logic pbit1,
  input  logic pbit2,
  input  logic restart,    // taken branch: next word starts at its left half
  output logic index,      // direction of the word now in Dispatch
  output logic change,
  output logic index_next
);
  logic index_q;

  assign index      = index_q;
  assign change     = pbit1 | pbit2;
  assign index_next = ~(change ^ index_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       index_q <= 1'b1;
    else if (restart) index_q <= 1'b1;
    else if (adv)     index_q <= index_next;
  end

endmodule
