// Predecode loop buffer subsystem of a two-way VLIW processor.
//
// A loop buffer that stores decoded control signals rather than instruction
// words, and decides which loop to keep with per-branch execution counts, so
// a hot inner loop is not evicted by a rarely run one. It sits between the
// Dispatch/Decode stages and EX1 of the processor pipeline.
//
// Token model. The processor pipeline is a 4-phase dual-rail asynchronous
// pipeline; here the control and storage part is built as synchronous logic
// in which every rising clock edge with tok_valid = 1 is one VLIW token
// (one dispatched word) completing Dispatch, Decode and, for a branch, its
// resolution in EX1. Tokens arrive in program order after branch squashing;
// the environment (PC register, instruction memory, decoder, branch unit)
// is outside and supplies, per token: its PC, the decoder's control word,
// the two p-bits from Dispatch, whether it is a branch and whether it is
// taken.
//
// Per token:
//   * Fast Access (F-reg): the loop buffer is read with {PC, index}. On a hit
//     the stored control word and p-bits are used and Prefetch/Dispatch/
//     Decode are bypassed (out_from_plb). On a miss the token is replaced by
//     a NOP, redirect_pc asks the PC register to refetch it, and F-reg is
//     cleared; nothing else of the token takes effect and it must be sent
//     again from instruction memory.
//   * Storage (S-reg): the decoder's control word and p-bits are written to
//     the loop buffer at {PC, index}.
//   * A branch reads its record from the Branch Information Table (BIT) and
//     the mode controller picks the mode of the following tokens.
//   * The index register advances by the token's p-bits.
// The outputs out_* are combinational for the current token.
//
// Beside it stands the dual-rail access path of the BIT read port: a
// dual-rail pipeline latch receives the PC token, a mutual-exclusion element
// orders it against the EX1 write token, and a DeMux steered by the
// dual-rail "is branch" select sends it either out to the table lookup
// (dr_lookup_*) or to a path that turns it into a valid zero; a Merge joins
// the table's answer (dr_info_*) and the valid zero into R_Information. This
// follows the published block diagram; the table behind it is the clocked
// BIT above, so the lookup leg is brought out as ports.
module plb_top #(
  parameter int unsigned PC_W        = plb_pkg::PC_W,
  parameter int unsigned CTRL_W      = plb_pkg::CTRL_W,
  parameter int unsigned EXEC_W      = plb_pkg::EXEC_W,
  parameter int unsigned THRESHOLD   = plb_pkg::THRESHOLD,
  parameter int unsigned REPLACE_W   = plb_pkg::REPLACE_W,
  parameter int unsigned BIT_ENTRIES = plb_pkg::BIT_ENTRIES,
  parameter int unsigned PLB_ENTRIES = plb_pkg::PLB_ENTRIES,
  parameter int unsigned DR_W        = PC_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // token from Dispatch/Decode
  input  logic              tok_valid,
  input  logic [PC_W-1:0]   tok_pc,
  input  logic [CTRL_W-1:0] tok_ctrl,
  input  logic              tok_pbit1,
  input  logic              tok_pbit2,
  input  logic              tok_is_branch,
  input  logic              tok_taken,
  // token towards EX1
  output logic [CTRL_W-1:0] out_ctrl,
  output logic              out_from_plb,
  output logic              out_nop,
  output logic              out_stored,
  // miss recovery towards the PC register / stall unit
  output logic              miss,
  output logic              redirect_q,
  output logic [PC_W-1:0]   redirect_pc_q,
  output logic [15:0]       miss_count,
  // state
  output plb_pkg::mode_e    mode,
  output plb_pkg::phase_e   phase,
  output logic              index,
  output logic [REPLACE_W-1:0] replace,
  output logic              bit_hit,
  output logic              bit_wack,
  output logic              freq_cleared,
  // dual-rail BIT read access path
  input  logic [DR_W-1:0]   dr_pc_t,
  input  logic [DR_W-1:0]   dr_pc_f,
  output logic              dr_pc_ack,
  input  logic              dr_br_t,
  input  logic              dr_br_f,
  input  logic [DR_W-1:0]   dr_wr_t,
  input  logic [DR_W-1:0]   dr_wr_f,
  output logic [DR_W-1:0]   dr_wr_grant_t,
  output logic [DR_W-1:0]   dr_wr_grant_f,
  output logic [DR_W-1:0]   dr_lookup_t,
  output logic [DR_W-1:0]   dr_lookup_f,
  input  logic [DR_W-1:0]   dr_info_t,
  input  logic [DR_W-1:0]   dr_info_f,
  input  logic              dr_info_ack,
  output logic [DR_W-1:0]   dr_rinfo_t,
  output logic [DR_W-1:0]   dr_rinfo_f
);
  import plb_pkg::*;

  // ---------------------------------------------------------------- core
  logic              f_reg, s_reg;
  logic              idx, idx_next, idx_change;
  logic              plb_hit, plb_miss_raw;
  logic [CTRL_W-1:0] plb_ctrl;
  logic [1:0]        plb_pbits;
  logic              rec_miss, rec_clear_f;
  logic              live;            // token that is not squashed by a miss
  logic [1:0]        use_pbits;
  logic              rd_hit;
  logic [EXEC_W-1:0] rd_exec;
  logic              rd_freq, rd_prefreq;
  logic              mc_wr_en, mc_wr_freq, mc_wr_prefreq, mc_clr;
  logic [EXEC_W-1:0] mc_wr_exec;
  logic              any_freq;
  logic              br_valid;
  logic              nop_q;

  loop_buffer #(.PC_W(PC_W), .CTRL_W(CTRL_W), .ENTRIES(PLB_ENTRIES)) u_plb (
    .clk, .rst_n,
    .wr_en   (tok_valid && s_reg),
    .wr_pc   (tok_pc),
    .wr_index(idx),
    .wr_ctrl (tok_ctrl),
    .wr_pbits({tok_pbit1, tok_pbit2}),
    .rd_en   (tok_valid && f_reg),
    .rd_pc   (tok_pc),
    .rd_index(idx),
    .rd_hit  (plb_hit),
    .rd_miss (plb_miss_raw),
    .rd_ctrl (plb_ctrl),
    .rd_pbits(plb_pbits)
  );

  miss_recovery #(.PC_W(PC_W), .CTRL_W(CTRL_W), .CNT_W(16)) u_rec (
    .clk, .rst_n,
    .tok_valid, .tok_pc, .f_reg,
    .plb_hit, .plb_ctrl, .dec_ctrl(tok_ctrl),
    .miss(rec_miss), .clear_f(rec_clear_f),
    .out_ctrl, .out_from_plb, .out_nop,
    .redirect_q, .redirect_pc_q, .nop_q(nop_q), .misses(miss_count)
  );

  assign live      = tok_valid && !rec_miss;
  assign use_pbits = out_from_plb ? plb_pbits : {tok_pbit1, tok_pbit2};
  assign br_valid  = live && tok_is_branch;

  index_unit u_idx (
    .clk, .rst_n,
    .adv    (live),
    .pbit1  (use_pbits[1]),
    .pbit2  (use_pbits[0]),
    .restart(br_valid && tok_taken),
    .index  (idx),
    .change (idx_change),
    .index_next(idx_next)
  );

  branch_info_table #(.PC_W(PC_W), .EXEC_W(EXEC_W), .ENTRIES(BIT_ENTRIES)) u_bit (
    .clk, .rst_n,
    .rd_branch (br_valid),
    .rd_pc     (tok_pc),
    .rd_hit,
    .rd_exec, .rd_freq, .rd_prefreq,
    .wr_en     (mc_wr_en),
    .wr_pc     (tok_pc),
    .wr_exec   (mc_wr_exec),
    .wr_freq   (mc_wr_freq),
    .wr_prefreq(mc_wr_prefreq),
    .wr_ack    (bit_wack),
    .clr_freq  (mc_clr),
    .any_freq
  );

  mode_controller #(.EXEC_W(EXEC_W), .THRESHOLD(THRESHOLD), .REPLACE_W(REPLACE_W)) u_mc (
    .clk, .rst_n,
    .br_valid,
    .taken       (tok_taken),
    .info_exec   (rd_exec),
    .info_freq   (rd_freq),
    .info_prefreq(rd_prefreq),
    .plb_miss    (rec_clear_f),
    .wr_en       (mc_wr_en),
    .wr_exec     (mc_wr_exec),
    .wr_freq     (mc_wr_freq),
    .wr_prefreq  (mc_wr_prefreq),
    .clr_freq    (mc_clr),
    .s_reg, .f_reg,
    .mode,
    .replace
  );

  assign miss         = rec_miss;
  assign out_stored   = tok_valid && s_reg;
  assign index        = idx;
  assign bit_hit      = rd_hit;
  assign freq_cleared = mc_clr;
  assign phase        = any_freq ? PHASE_MONITORING : PHASE_WRITING;

  // A miss can only happen in Fast Access Mode, where nothing is stored.
  always_comb begin
    assert (!rst_n || !(plb_miss_raw && s_reg)) else $error("plb_top: miss while storing");
  end

  // ------------------------------------------- dual-rail BIT read access
  logic [DR_W-1:0] lat_t, lat_f;       // PC token after the pipeline latch
  logic [DR_W-1:0] rd_gr_t, rd_gr_f;   // PC token granted by the mutex
  logic [DR_W-1:0] zero_in_t, zero_in_f;
  logic [DR_W-1:0] vz_t, vz_f;         // valid-zero leg
  logic            zero_valid;

  dr_pipeline_latch #(.N(DR_W)) u_lat (
    .in_t(dr_pc_t), .in_f(dr_pc_f), .ack_in(dr_info_ack), .rst_n,
    .out_t(lat_t), .out_f(lat_f), .ack_out(dr_pc_ack)
  );

  mutex #(.N(DR_W)) u_mx (
    .d1_t(lat_t), .d1_f(lat_f), .d2_t(dr_wr_t), .d2_f(dr_wr_f), .rst_n,
    .out1_t(rd_gr_t), .out1_f(rd_gr_f), .out2_t(dr_wr_grant_t), .out2_f(dr_wr_grant_f)
  );

  dr_demux #(.N(DR_W)) u_dm (
    .in_t(rd_gr_t), .in_f(rd_gr_f), .sel_t(dr_br_t), .sel_f(dr_br_f), .rst_n,
    .up_t(dr_lookup_t), .up_f(dr_lookup_f), .lo_t(zero_in_t), .lo_f(zero_in_f)
  );

  // Not a branch: once the whole PC token has arrived, answer with the
  // dual-rail encoding of zero on every bit (all false rails high).
  completion_detector #(.N(DR_W)) u_zcd (
    .d_t(zero_in_t), .d_f(zero_in_f), .rst_n, .done(zero_valid)
  );
  assign vz_t = '0;
  assign vz_f = {DR_W{zero_valid}};

  dr_merge #(.N(DR_W)) u_mg (
    .a_t(dr_info_t), .a_f(dr_info_f), .b_t(vz_t), .b_f(vz_f),
    .out_t(dr_rinfo_t), .out_f(dr_rinfo_f)
  );

  logic unused;
  assign unused = idx_next ^ idx_change ^ nop_q;

endmodule
