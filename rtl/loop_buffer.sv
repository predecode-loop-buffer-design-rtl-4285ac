// Predecode loop buffer storage.
//
// Instead of instruction words, the buffer keeps the decoded control signals
// of a loop's VLIW words, together with the two p-bits that Dispatch would
// otherwise derive, so that in Fast Access Mode the Prefetch, Dispatch and
// Decode work is skipped. It is written in Storage Mode once a word is fully
// decoded and read in the Dispatch stage in Fast Access Mode. A read that
// finds no matching entry is a miss, which starts miss recovery. Contents are
// never flushed.
//
// Organisation (this design's choice): direct mapped over {PC, index}; the
// set is {low PC bits, index} so both halves of a split word have their own
// entry; the remaining PC bits are the tag, with a valid bit per entry.
// Read is combinational (rd_hit, rd_miss, rd_ctrl, rd_pbits in the same
// cycle as rd_en/rd_pc/rd_index); a write lands at the rising clock edge.
module loop_buffer #(
  parameter int unsigned PC_W    = plb_pkg::PC_W,
  parameter int unsigned CTRL_W  = plb_pkg::CTRL_W,
  parameter int unsigned ENTRIES = plb_pkg::PLB_ENTRIES
) (
  input  logic              clk,
  input  logic              rst_n,
  // write port (end of Decode, Storage Mode)
  input  logic              wr_en,
  input  logic [PC_W-1:0]   wr_pc,
  input  logic              wr_index,
  input  logic [CTRL_W-1:0] wr_ctrl,
  input  logic [1:0]        wr_pbits,
  // read port (Dispatch, Fast Access Mode)
  input  logic              rd_en,
  input  logic [PC_W-1:0]   rd_pc,
  input  logic              rd_index,
  output logic              rd_hit,
  output logic              rd_miss,
  output logic [CTRL_W-1:0] rd_ctrl,
  output logic [1:0]        rd_pbits
);
  localparam int unsigned SET_W = $clog2(ENTRIES);   // includes the index bit
  localparam int unsigned PCS_W = SET_W - 1;          // PC bits in the set
  localparam int unsigned TAG_W = PC_W - PCS_W;

  logic [CTRL_W-1:0] ctrl_mem  [ENTRIES];
  logic [1:0]        pbits_mem [ENTRIES];
  logic [TAG_W-1:0]  tag_mem   [ENTRIES];
  logic [ENTRIES-1:0] valid_q;

  logic [SET_W-1:0] wr_set, rd_set;
  assign wr_set = {wr_pc[PCS_W-1:0], wr_index};
  assign rd_set = {rd_pc[PCS_W-1:0], rd_index};

  always_ff @(posedge clk) begin
    if (wr_en) begin
      ctrl_mem[wr_set]  <= wr_ctrl;
      pbits_mem[wr_set] <= wr_pbits;
      tag_mem[wr_set]   <= wr_pc[PC_W-1:PCS_W];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     valid_q <= '0;
    else if (wr_en) valid_q[wr_set] <= 1'b1;
  end

  always_comb begin
    rd_hit   = rd_en && valid_q[rd_set] && (tag_mem[rd_set] == rd_pc[PC_W-1:PCS_W]);
    rd_miss  = rd_en && !rd_hit;
    rd_ctrl  = ctrl_mem[rd_set];
    rd_pbits = pbits_mem[rd_set];
  end

endmodule
