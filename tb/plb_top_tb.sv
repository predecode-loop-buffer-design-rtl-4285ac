// End-to-end test of the predecode loop buffer subsystem at its default
// sizes. The testbench plays the rest of the processor: PC register,
// instruction memory with compressed words (a "split" word issues as a left
// and a right half with the same PC), decoder, and branch unit. It runs a
// program in five phases:
//   A  one loop of 8 iterations: iterations 1-4 run from memory, the 4th
//      taken branch starts Storage Mode, iteration 5 is stored, and from
//      iteration 6 on every token must come from the loop buffer;
//   B  nested loops (outer, a 2-trip inner loop and a 20-trip inner loop);
//   D  five short loops that never get hot, so the replace register
//      overflows and every Frequent Flag is cleared (writing phase);
//   E  the nested loops again: the 20-trip loop's Pre-Frequent Flag sends it
//      straight back to Fast Access and its stored words still hit;
//   C  a 20-word loop, longer than the buffer's 16 PC sets, so Fast Access
//      misses; each miss must give a NOP and a redirect to the missing PC,
//      and the word is then re-sent from memory.
// While a token runs in Fast Access the testbench feeds garbage on the
// decoder inputs, so a correct control word can only come from the buffer.
// Every delivered word must equal the decoder's word for its {PC, half}.
// Afterwards the dual-rail BIT access path is driven with 4-phase tokens.
// Each mechanism is counted and a failure is counted for one that never
// happened.
module plb_top_tb;
  import plb_pkg::*;
  localparam int PC_W = 16, CTRL_W = 128, DR_W = 16;

  logic clk = 0, rst_n;
  logic tok_valid; logic [PC_W-1:0] tok_pc; logic [CTRL_W-1:0] tok_ctrl;
  logic tok_pbit1, tok_pbit2, tok_is_branch, tok_taken;
  logic [CTRL_W-1:0] out_ctrl; logic out_from_plb, out_nop, out_stored;
  logic miss, redirect_q; logic [PC_W-1:0] redirect_pc_q; logic [15:0] miss_count;
  mode_e mode; phase_e phase; logic index; logic [2:0] replace;
  logic bit_hit, bit_wack, freq_cleared;
  logic [DR_W-1:0] dr_pc_t, dr_pc_f, dr_wr_t, dr_wr_f, dr_wr_grant_t, dr_wr_grant_f;
  logic [DR_W-1:0] dr_lookup_t, dr_lookup_f, dr_info_t, dr_info_f, dr_rinfo_t, dr_rinfo_f;
  logic dr_pc_ack, dr_br_t, dr_br_f, dr_info_ack;

  plb_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  // ---------------------------------------------------------- program
  typedef enum logic [1:0] {W_FULL, W_SPLIT, W_BRANCH} wkind_e;
  wkind_e           kind  [int];
  logic [PC_W-1:0]  target[int];
  int               trips [int];   // iterations of the loop closed by this branch
  int               iter  [int];

  function automatic logic [CTRL_W-1:0] decode(input logic [PC_W-1:0] pc, input logic half);
    logic [31:0] x;
    x = (32'(pc) * 32'h9E37_79B1) ^ {31'd0, half};
    return {x, ~x, x ^ 32'h5A5A_5A5A, pc, 15'd0, half};
  endfunction

  // counters of mechanisms
  int n_tok = 0, n_fast = 0, n_store = 0, n_miss = 0, n_bit_hit = 0, n_clear = 0;
  int n_split_fast = 0, n_hot_exit = 0, n_pf_return = 0, n_wack = 0;
  int n_storage_mode = 0, n_writing_after_monitor = 0;

  // send one token; returns 1 when it was squashed by a miss
  task automatic send(input logic [PC_W-1:0] pc, input logic half, input wkind_e k,
                      input bit tk, output bit squashed, output bit fast);
    bit was_fast;
    was_fast = (mode == MODE_FAST);
    tok_valid = 1; tok_pc = pc;
    tok_is_branch = (k == W_BRANCH); tok_taken = tk;
    if (was_fast) begin
      tok_ctrl = {$urandom, $urandom, $urandom, $urandom};
      tok_pbit1 = 1'($urandom_range(1)); tok_pbit2 = 1'($urandom_range(1));
    end else begin
      tok_ctrl = decode(pc, half);
      tok_pbit1 = (k != W_SPLIT); tok_pbit2 = 1'b0;
    end
    #1;
    chk(index == half, "index register matches half being dispatched");
    squashed = miss; fast = out_from_plb;
    if (miss) begin
      n_miss++;
      chk(was_fast && out_nop && out_ctrl == '0, "miss gives NOP in Fast Access");
    end else begin
      chk(out_ctrl == decode(pc, half), "delivered control word");
    end
    if (out_from_plb) begin n_fast++; if (k == W_SPLIT) n_split_fast++; end
    if (out_stored) n_store++;
    if (bit_hit) n_bit_hit++;
    if (freq_cleared) n_clear++;
    if (k == W_BRANCH && !tk && bit_hit && was_fast) n_hot_exit++;
    @(posedge clk); #1;
    tok_valid = 0;
    if (squashed) chk(redirect_q && redirect_pc_q == pc && mode == MODE_DIRECT,
                      "redirect to missing PC, Direct Mode");
    if (bit_wack) n_wack++;
    if (mode == MODE_STORAGE) n_storage_mode++;
    n_tok++;
  endtask

  // run from pc until the word at stop_pc has been executed and falls through
  task automatic run(input logic [PC_W-1:0] start, input logic [PC_W-1:0] stop_pc);
    logic [PC_W-1:0] pc; logic half; bit sq, fst, tk; bit done;
    pc = start; half = 1'b1; done = 0;
    while (!done) begin
      wkind_e k; k = kind[int'(pc)];
      tk = 0;
      if (k == W_BRANCH) tk = (iter[int'(pc)] + 1 < trips[int'(pc)]);
      send(pc, half, k, tk, sq, fst);
      if (sq) continue;                     // re-send the same word from memory
      if (k == W_SPLIT && half) begin half = 1'b0; continue; end
      half = 1'b1;
      if (k == W_BRANCH) begin
        if (tk) begin iter[int'(pc)]++; pc = target[int'(pc)]; continue; end
        iter[int'(pc)] = 0;
      end
      if (pc == stop_pc) done = 1;
      pc = pc + 1'b1;
    end
  endtask

  task automatic word(input int a, input wkind_e k, input int tgt = 0, input int n = 0);
    kind[a] = k; target[a] = PC_W'(tgt); trips[a] = n; iter[a] = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // -------------------------------------------- dual-rail access path
  task automatic dr_send_pc(input logic [DR_W-1:0] v);
    dr_pc_t = v; dr_pc_f = ~v; #2;
  endtask
  task automatic dr_empty_pc();
    dr_pc_t = '0; dr_pc_f = '0; #2;
  endtask

  int n_dr_lookup = 0, n_dr_zero = 0, n_dr_wait = 0;

  task automatic dr_path();
    logic [DR_W-1:0] pcv, info;
    for (int i = 0; i < 20; i++) begin
      bit is_br;
      pcv = DR_W'($urandom); info = DR_W'($urandom); is_br = (i % 2 == 0);
      dr_br_t = is_br; dr_br_f = !is_br;
      dr_send_pc(pcv);
      chk(dr_pc_ack, "latch acknowledges PC token");
      if (is_br) begin
        chk(dr_lookup_t == pcv && dr_lookup_f == ~pcv, "branch PC goes to lookup");
        dr_info_t = info; dr_info_f = ~info; #2;
        chk(dr_rinfo_t == info && dr_rinfo_f == ~info, "R_Information from table");
        n_dr_lookup++;
      end else begin
        chk(dr_lookup_t == '0 && dr_lookup_f == '0, "non-branch bypasses lookup");
        chk(dr_rinfo_t == '0 && dr_rinfo_f == '1, "non-branch gets valid zero");
        n_dr_zero++;
      end
      // a write token arriving during the read must wait
      dr_wr_t = pcv; dr_wr_f = ~pcv; #2;
      chk(dr_wr_grant_t == '0 && dr_wr_grant_f == '0, "write waits for read");
      n_dr_wait++;
      // consumer acknowledges, producer returns to empty
      dr_info_ack = 1; dr_empty_pc(); dr_info_t = '0; dr_info_f = '0;
      dr_br_t = 0; dr_br_f = 0; #2;
      chk(!dr_pc_ack && dr_rinfo_t == '0 && dr_rinfo_f == '0, "read returns to empty");
      chk(dr_wr_grant_t == pcv && dr_wr_grant_f == ~pcv, "write granted after read");
      dr_wr_t = '0; dr_wr_f = '0; dr_info_ack = 0; #2;
    end
  endtask

  initial begin
    rst_n = 0; tok_valid = 0; tok_pc = 0; tok_ctrl = 0; tok_pbit1 = 0; tok_pbit2 = 0;
    tok_is_branch = 0; tok_taken = 0;
    dr_pc_t = '0; dr_pc_f = '0; dr_br_t = 0; dr_br_f = 0; dr_wr_t = '0; dr_wr_f = '0;
    dr_info_t = '0; dr_info_f = '0; dr_info_ack = 0;

    // A: single loop 0x10..0x13, 8 iterations, 5 tokens per iteration
    word('h10, W_FULL); word('h11, W_SPLIT); word('h12, W_FULL); word('h13, W_BRANCH, 'h10, 8);
    // B/E: nested loops (outer 0x40..0x49)
    word('h40, W_FULL);
    word('h41, W_SPLIT); word('h42, W_FULL); word('h43, W_BRANCH, 'h41, 2);
    word('h44, W_FULL);
    word('h45, W_FULL); word('h46, W_SPLIT); word('h47, W_FULL); word('h48, W_BRANCH, 'h45, 20);
    word('h49, W_BRANCH, 'h40, 6);
    // D: five short loops that never get hot
    for (int l = 0; l < 5; l++) begin
      word('hA0 + 2 * l, W_FULL); word('hA1 + 2 * l, W_BRANCH, 'hA0 + 2 * l, 3);
    end
    // C: 20-word loop
    for (int a = 'h80; a < 'h93; a++) word(a, (a % 3 == 0) ? W_SPLIT : W_FULL);
    word('h93, W_BRANCH, 'h80, 8);

    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;

    // ---- A: check which iteration first comes from the buffer
    begin
      logic [PC_W-1:0] seq[5] = '{16'h10, 16'h11, 16'h11, 16'h12, 16'h13};
      logic            hv [5] = '{1'b1, 1'b1, 1'b0, 1'b1, 1'b1};
      wkind_e          kv [5] = '{W_FULL, W_SPLIT, W_SPLIT, W_FULL, W_BRANCH};
      for (int it = 1; it <= 8; it++) begin
        int f0, s0, f, s; bit sq, fst;
        f0 = n_fast; s0 = n_store;
        for (int t = 0; t < 5; t++) send(seq[t], hv[t], kv[t], (t == 4) && (it < 8), sq, fst);
        f = n_fast - f0; s = n_store - s0;
        chk(f == ((it >= 6) ? 5 : 0), $sformatf("A: iteration %0d fast-access token count %0d", it, f));
        chk(s == ((it == 5) ? 5 : 0), $sformatf("A: iteration %0d stored token count %0d", it, s));
      end
      chk(mode == MODE_DIRECT, "A: hot branch not taken returns to Direct Mode");
    end

    // ---- B
    run('h40, 'h49);
    chk(phase == PHASE_MONITORING, "B: monitoring phase with hot branches");

    // ---- D
    begin
      int c0; c0 = n_clear;
      for (int l = 0; l < 5; l++) run(PC_W'('hA0 + 2 * l), PC_W'('hA1 + 2 * l));
      chk(n_clear > c0, "D: replace register overflow cleared Frequent Flags");
      chk(phase == PHASE_WRITING, "D: writing phase after the clear");
      if (phase == PHASE_WRITING) n_writing_after_monitor++;
    end

    // ---- E: Pre-Frequent return of the 20-trip loop
    begin
      int f0, m0; f0 = n_fast; m0 = n_miss;
      iter['h49] = 4;                        // two more outer iterations
      run('h40, 'h49);
      if (n_fast > f0) n_pf_return++;
      chk(n_fast > f0 + 30, "E: stored loop re-used through Pre-Frequent Flag");
    end

    // ---- C: buffer too small for the loop, misses
    run('h80, 'h93);
    chk(miss_count == 16'(n_miss), "C: miss counter");

    // ---- dual-rail BIT access path
    dr_path();

    $display("tokens=%0d fast=%0d stored=%0d misses=%0d bit_hits=%0d clears=%0d split_fast=%0d hot_exit=%0d pf_return=%0d wack=%0d dr_lookup=%0d dr_zero=%0d dr_wait=%0d",
             n_tok, n_fast, n_store, n_miss, n_bit_hit, n_clear, n_split_fast, n_hot_exit,
             n_pf_return, n_wack, n_dr_lookup, n_dr_zero, n_dr_wait);
    chk(n_fast > 0,        "mechanism: fast access");
    chk(n_store > 0,       "mechanism: storage");
    chk(n_storage_mode > 0,"mechanism: storage mode");
    chk(n_miss > 0,        "mechanism: miss recovery");
    chk(n_bit_hit > 0,     "mechanism: BIT hit");
    chk(n_clear > 0,       "mechanism: replace overflow");
    chk(n_split_fast > 0,  "mechanism: split word halves from buffer");
    chk(n_hot_exit > 0,    "mechanism: hot branch not taken");
    chk(n_pf_return > 0,   "mechanism: Pre-Frequent return");
    chk(n_writing_after_monitor > 0, "mechanism: writing phase");
    chk(n_wack > 0,        "mechanism: BIT write acknowledge");
    chk(n_dr_lookup > 0 && n_dr_zero > 0 && n_dr_wait > 0, "mechanism: dual-rail path");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
