// Branch Information Table (BIT).
//
// Holds, for recently taken branches, a Tag, an Execute Counter, a Frequent
// Flag and a Pre-Frequent Flag. The table is read when a branch is in the
// Instruction Decode stage and written when the branch resolves in EX1. A
// read by anything other than a branch, or a read that misses, returns an
// all-zero record ("valid zero"), which is how the design bypasses the table
// for non-branches. The mode controller can clear every Frequent Flag at once
// (start of a new program phase) while the Pre-Frequent Flags are kept.
//
// Organisation (this design's choice): direct mapped, set = low PC bits,
// tag = remaining PC bits, one valid bit per entry. Read is combinational;
// a write, or a clear, takes effect at the next rising clock edge, which
// models the ordering the asynchronous design enforces with a mutual
// exclusion element (write only after the read has returned to empty).
// When clear and write hit the same cycle, the written entry gets the
// written flags. wr_ack pulses for one cycle after each write request, like
// the wack handshake of the original table.
//
// Ports: rd_branch/rd_pc -> rd_hit/rd_exec/rd_freq/rd_prefreq (same cycle);
// wr_en/wr_pc/wr_exec/wr_freq/wr_prefreq (registered); clr_freq (registered);
// any_freq reports whether at least one valid entry has its Frequent Flag set.
module branch_info_table #(
  parameter int unsigned PC_W    = plb_pkg::PC_W,
  parameter int unsigned EXEC_W  = plb_pkg::EXEC_W,
  parameter int unsigned ENTRIES = plb_pkg::BIT_ENTRIES
) (
  input  logic              clk,
  input  logic              rst_n,
  // read port (Instruction Decode)
  input  logic              rd_branch,
  input  logic [PC_W-1:0]   rd_pc,
  output logic              rd_hit,
  output logic [EXEC_W-1:0] rd_exec,
  output logic              rd_freq,
  output logic              rd_prefreq,
  // write port (EX1)
  input  logic              wr_en,
  input  logic [PC_W-1:0]   wr_pc,
  input  logic [EXEC_W-1:0] wr_exec,
  input  logic              wr_freq,
  input  logic              wr_prefreq,
  output logic              wr_ack,
  // phase control
  input  logic              clr_freq,
  output logic              any_freq
);
  localparam int unsigned SET_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;
  localparam int unsigned TAG_W = PC_W - SET_W;

  typedef struct packed {
    logic              valid;
    logic [TAG_W-1:0]  tag;
    logic [EXEC_W-1:0] exec;
    logic              freq;
    logic              prefreq;
  } bit_entry_t;

  bit_entry_t table_q [ENTRIES];

  logic [SET_W-1:0] rd_set, wr_set;
  bit_entry_t       rd_e;

  assign rd_set = rd_pc[SET_W-1:0];
  assign wr_set = wr_pc[SET_W-1:0];
  assign rd_e   = table_q[rd_set];

  always_comb begin
    rd_hit     = rd_branch && rd_e.valid && (rd_e.tag == rd_pc[PC_W-1:SET_W]);
    rd_exec    = rd_hit ? rd_e.exec    : '0;
    rd_freq    = rd_hit ? rd_e.freq    : 1'b0;
    rd_prefreq = rd_hit ? rd_e.prefreq : 1'b0;
  end

  always_comb begin
    any_freq = 1'b0;
    for (int i = 0; i < int'(ENTRIES); i++)
      any_freq |= table_q[i].valid & table_q[i].freq;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(ENTRIES); i++) table_q[i] <= '0;
      wr_ack <= 1'b0;
    end else begin
      if (clr_freq)
        for (int i = 0; i < int'(ENTRIES); i++) table_q[i].freq <= 1'b0;
      if (wr_en)
        table_q[wr_set] <= '{valid: 1'b1, tag: wr_pc[PC_W-1:SET_W], exec: wr_exec,
                             freq: wr_freq, prefreq: wr_prefreq};
      wr_ack <= wr_en;
    end
  end

endmodule
