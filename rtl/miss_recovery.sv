// Dispatch-side path select and miss recovery.
//
// In Fast Access Mode (F-reg set) the control word of the token now in
// Dispatch comes from the loop buffer; otherwise it comes from the normal
// Prefetch/Dispatch/Decode path. This is the Merge of the fast-access and
// direct-access paths. When the loop buffer misses in Fast Access Mode the
// unit recovers: it asks the mode controller to clear F-reg so the next
// token is handled in Direct Mode, hands the PC of the missing word to the
// PC register so it is fetched again from instruction memory, and has the
// stall unit replace the token by a NOP (all-zero control word, an encoding
// this design chooses). Only Dispatch needs recovering because in a 4-phase
// dual-rail pipeline the neighbouring stages hold empty tokens.
//
// The outputs are combinational in the token's cycle; redirect_q/nop_q keep
// a registered copy for one cycle, which is when the PC register and the
// next pipeline stage take them. misses counts recoveries (saturating).
module miss_recovery #(
  parameter int unsigned PC_W   = plb_pkg::PC_W,
  parameter int unsigned CTRL_W = plb_pkg::CTRL_W,
  parameter int unsigned CNT_W  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tok_valid,
  input  logic [PC_W-1:0]   tok_pc,
  input  logic              f_reg,
  input  logic              plb_hit,
  input  logic [CTRL_W-1:0] plb_ctrl,
  input  logic [CTRL_W-1:0] dec_ctrl,
  output logic              miss,
  output logic              clear_f,
  output logic [CTRL_W-1:0] out_ctrl,
  output logic              out_from_plb,
  output logic              out_nop,
  output logic              redirect_q,
  output logic [PC_W-1:0]   redirect_pc_q,
  output logic              nop_q,
  output logic [CNT_W-1:0]  misses
);
  always_comb begin
    miss         = tok_valid && f_reg && !plb_hit;
    clear_f      = miss;
    out_from_plb = tok_valid && f_reg && plb_hit;
    out_nop      = miss;
    if (miss)              out_ctrl = '0;
    else if (out_from_plb) out_ctrl = plb_ctrl;
    else                   out_ctrl = dec_ctrl;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      redirect_q    <= 1'b0;
      redirect_pc_q <= '0;
      nop_q         <= 1'b0;
      misses        <= '0;
    end else begin
      redirect_q <= miss;
      nop_q      <= miss;
      if (miss) begin
        redirect_pc_q <= tok_pc;
        if (misses != '1) misses <= misses + 1'b1;
      end
    end
  end

endmodule
