// Mode controller of the predecode loop buffer.
//
// When a branch resolves in EX1, the controller takes the record the Branch
// Information Table (BIT) returned for it in Decode and the taken/not-taken
// outcome, and chooses the fetch mode of the instructions that follow:
//
//   Fast Access (F-reg = 1): (Frequent | Pre-Frequent) and taken
//   Storage     (S-reg = 1): no flag set, taken, Execute Counter >= threshold;
//                            the branch's Frequent and Pre-Frequent Flags are set
//   Direct      (both 0)   : a loop-buffer miss; no flag set and counter below
//                            threshold; a flagged branch not taken
//
// A taken branch increments its saturating Execute Counter and is written
// back to the BIT (allocating an entry if it was absent). The comparison
// with the threshold uses the incremented count, so with THRESHOLD = 4 the
// fourth taken execution starts storing. A not-taken branch that falls in
// none of the listed cases (no flag, counter already at threshold) goes to
// Direct Mode. These two points are this design's reading of the rules.
//
// The replace register counts taken hot branches (Frequent Flag set) down,
// saturating at zero, and taken non-hot branches up. When an increment
// overflows it, the loop buffer contents are judged stale: every Frequent
// Flag in the BIT is cleared (writing phase) and the register wraps to zero;
// the Pre-Frequent Flags and the buffer contents are kept, so a branch whose
// loop is still stored returns straight to Fast Access.
//
// Timing: br_valid/plb_miss are sampled at the rising clock edge; S-reg,
// F-reg and the replace register change there. BIT write-back outputs are
// combinational and are registered by the BIT. A miss has priority.
module mode_controller #(
  parameter int unsigned EXEC_W    = plb_pkg::EXEC_W,
  parameter int unsigned THRESHOLD = plb_pkg::THRESHOLD,
  parameter int unsigned REPLACE_W = plb_pkg::REPLACE_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // branch resolved in EX1, with its BIT record read in Decode
  input  logic              br_valid,
  input  logic              taken,
  input  logic [EXEC_W-1:0] info_exec,
  input  logic              info_freq,
  input  logic              info_prefreq,
  // loop buffer miss in Dispatch
  input  logic              plb_miss,
  // BIT write-back
  output logic              wr_en,
  output logic [EXEC_W-1:0] wr_exec,
  output logic              wr_freq,
  output logic              wr_prefreq,
  output logic              clr_freq,
  // mode registers
  output logic              s_reg,
  output logic              f_reg,
  output plb_pkg::mode_e    mode,
  output logic [REPLACE_W-1:0] replace
);
  import plb_pkg::*;

  localparam logic [EXEC_W-1:0] EXEC_MAX = '1;

  logic              s_q, f_q;
  logic [REPLACE_W-1:0] rep_q;
  logic [EXEC_W-1:0] exec_inc;
  logic              flagged;
  mode_e             next_mode;
  logic              rep_inc, rep_dec, rep_ovf;

  assign flagged  = info_freq | info_prefreq;
  assign exec_inc = (info_exec == EXEC_MAX) ? info_exec : info_exec + 1'b1;

  always_comb begin
    next_mode  = MODE_DIRECT;
    wr_en      = 1'b0;
    wr_exec    = info_exec;
    wr_freq    = info_freq;
    wr_prefreq = info_prefreq;
    if (br_valid && !plb_miss) begin
      if (taken) begin
        wr_en   = 1'b1;
        wr_exec = exec_inc;
        if (flagged) begin
          next_mode = MODE_FAST;
        end else if (32'(exec_inc) >= THRESHOLD) begin
          next_mode  = MODE_STORAGE;
          wr_freq    = 1'b1;
          wr_prefreq = 1'b1;
        end
      end
    end
  end

  assign rep_dec  = br_valid && !plb_miss && taken &&  info_freq;
  assign rep_inc  = br_valid && !plb_miss && taken && !info_freq;
  assign rep_ovf  = rep_inc && (rep_q == '1);
  assign clr_freq = rep_ovf;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q   <= 1'b0;
      f_q   <= 1'b0;
      rep_q <= '0;
    end else begin
      if (plb_miss) begin
        s_q <= 1'b0;
        f_q <= 1'b0;
      end else if (br_valid) begin
        s_q <= (next_mode == MODE_STORAGE);
        f_q <= (next_mode == MODE_FAST);
      end
      if (rep_inc)                    rep_q <= rep_q + 1'b1;   // wraps on overflow
      else if (rep_dec && rep_q != 0) rep_q <= rep_q - 1'b1;
    end
  end

  assign s_reg   = s_q;
  assign f_reg   = f_q;
  assign mode    = f_q ? MODE_FAST : (s_q ? MODE_STORAGE : MODE_DIRECT);
  assign replace = rep_q;

endmodule
