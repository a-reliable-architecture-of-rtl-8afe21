// tb_tcam_search_engine: end-to-end test of the search engine at its
// default size (4 entries, 4-bit input segment, 8-bit state segment).
//
// 1. The four-entry longest-match example: state patterns 1010xxxx,
//    101001xx, 1011011x, 10100xxx (input segment all don't care), current
//    state 10100101. Entries 0, 1 and 3 match; the longest length must be
//    11111100, entry 1 must win, and its next state must become the current
//    state.
// 2. Random state-machine runs: entries are rewritten at random positions
//    (no ordering by length) with random ternary input patterns, prefix
//    state patterns and next states, and searches are chained through the
//    current-state feedback. A reference model in this file computes the
//    input matches (and so which state rows must be searched), the phase 1
//    matches, the longest length, the winner and the next state; done must
//    come exactly five cycles after start.
// Each mechanism of the design is counted and must occur at least once:
// state rows skipped by the sequential input-state scheme, searches where
// several entries matched and the in-memory decision picked one, misses
// (state held), equal-length ties (multi), next-state feedback, and
// out-of-order entry rewrites.
module tb_tcam_search_engine;
  import tcam_pkg::*;

  localparam int E = 4, IW = 4, SW = 8, LAT = 5;

  logic               clk = 1'b0, rst_n;
  logic               wr_en, wr_valid, state_load, start;
  logic [1:0]         wr_idx;
  tern_t [IW-1:0]     wr_in;
  tern_t [SW-1:0]     wr_state;
  logic [SW-1:0]      wr_next, state_in;
  logic [IW-1:0]      in_sym;
  phase_t             phase;
  logic               busy, done, hit, multi;
  logic [1:0]         match_addr;
  logic [SW-1:0]      next_state, cur_state, longest_len;
  logic [E-1:0]       st_search_en;

  int checks = 0, failures = 0;
  int n_sis_skip = 0, n_multi_p1 = 0, n_miss = 0, n_tie = 0, n_feedback = 0, n_rewrite = 0;

  // reference copy of the table
  logic [IW-1:0] iv [E], im [E];
  logic [SW-1:0] sv [E], sm [E], nxt [E];
  logic [E-1:0]  vld;

  tcam_search_engine dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [SW-1:0] got, input logic [SW-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%b exp=%b", what, got, exp);
    end
  endtask

  function automatic tern_t to_tern(input logic v, input logic m);
    return !m ? TERN_X : (v ? TERN_1 : TERN_0);
  endfunction

  task automatic write_entry(input int r, input logic [IW-1:0] v_in, input logic [IW-1:0] m_in,
                             input logic [SW-1:0] v_st, input logic [SW-1:0] m_st,
                             input logic [SW-1:0] nx, input logic valid);
    @(negedge clk);
    wr_en = 1; wr_idx = 2'(r); wr_valid = valid; wr_next = nx;
    for (int c = 0; c < IW; c++) wr_in[c] = to_tern(v_in[c], m_in[c]);
    for (int c = 0; c < SW; c++) wr_state[c] = to_tern(v_st[c], m_st[c]);
    iv[r] = v_in & m_in; im[r] = m_in; sv[r] = v_st & m_st; sm[r] = m_st;
    nxt[r] = nx; vld[r] = valid;
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic load_state(input logic [SW-1:0] s);
    @(negedge clk);
    state_load = 1; state_in = s;
    @(negedge clk);
    state_load = 0;
  endtask

  // one search with full reference checking
  task automatic search(input logic [IW-1:0] sym);
    logic [E-1:0]  in_m, p1, win;
    logic [SW-1:0] or_mask, prev_state, exp_next;
    logic [1:0]    exp_addr;
    int            n_p1, n_win, cyc;
    prev_state = cur_state;
    in_m = '0; p1 = '0; or_mask = '0; win = '0; n_p1 = 0; n_win = 0; exp_addr = '0;
    for (int r = 0; r < E; r++) begin
      in_m[r] = vld[r] && (((sym ^ iv[r]) & im[r]) == '0);
      p1[r]   = in_m[r] && (((prev_state ^ sv[r]) & sm[r]) == '0);
      if (p1[r]) begin or_mask |= sm[r]; n_p1++; end
    end
    for (int r = 0; r < E; r++) begin
      win[r] = p1[r] && (sm[r] == or_mask);
      if (win[r]) begin n_win++; exp_addr |= 2'(r); end
    end
    exp_next = nxt[exp_addr];

    @(negedge clk);
    start = 1; in_sym = sym;
    @(negedge clk);
    start = 0; in_sym = IW'($urandom);
    cyc = 1;
    while (!done && cyc < 20) begin
      if (phase == PH_P1) begin
        check("state rows searched (SIS)", SW'(st_search_en), SW'(in_m));
        for (int r = 0; r < E; r++) if (vld[r] && !in_m[r]) n_sis_skip++;
      end
      @(negedge clk);
      cyc++;
    end
    check("latency", SW'(cyc), SW'(LAT));
    check("hit", SW'(hit), SW'(n_win > 0));
    check("multi", SW'(multi), SW'(n_win > 1));
    if (n_p1 > 0) check("longest length", longest_len, or_mask);
    if (n_win > 0) begin
      check("match addr", SW'(match_addr), SW'(exp_addr));
      check("next state", next_state, exp_next);
    end
    @(negedge clk);
    check("current state", cur_state, (n_win > 0) ? exp_next : prev_state);
    if (n_p1 > 1 && n_win == 1) n_multi_p1++;
    if (n_win == 0) n_miss++;
    if (n_win > 1) n_tie++;
    if (n_win > 0 && exp_next != prev_state) n_feedback++;
  endtask

  logic [SW-1:0] states [4] = '{8'hA5, 8'h3C, 8'h0F, 8'hE1};

  initial begin
    rst_n = 0; wr_en = 0; wr_valid = 0; wr_idx = 0; wr_in = '0; wr_state = '0;
    wr_next = 0; state_load = 0; state_in = 0; start = 0; in_sym = 0; vld = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check("reset state", cur_state, '0);
    check("reset busy", SW'(busy), '0);

    // 1. longest-match example
    write_entry(0, '0, '0, 8'b1010_0000, 8'b1111_0000, 8'h11, 1);
    write_entry(1, '0, '0, 8'b1010_0100, 8'b1111_1100, 8'h22, 1);
    write_entry(2, '0, '0, 8'b1011_0110, 8'b1111_1110, 8'h33, 1);
    write_entry(3, '0, '0, 8'b1010_0000, 8'b1111_1000, 8'h44, 1);
    load_state(8'b1010_0101);
    search(4'h7);
    check("example longest length", longest_len, 8'b1111_1100);
    check("example winner", SW'(match_addr), 1);
    check("example next state", cur_state, 8'h22);

    // 2. random chained runs
    for (int t = 0; t < 3000; t++) begin
      if (t % 50 == 0) begin
        for (int r = 0; r < E; r++) begin
          int len;
          len = $urandom_range(0, SW);
          write_entry(r, IW'($urandom), IW'($urandom) & IW'($urandom),
                      states[$urandom_range(0, 3)], ~(SW'({SW{1'b1}}) >> len),
                      states[$urandom_range(0, 3)], $urandom_range(0, 7) != 0);
        end
        load_state(states[$urandom_range(0, 3)]);
      end else if (t % 7 == 0) begin
        // shuffle-free update: overwrite one arbitrary entry in place
        int r, len;
        r = $urandom_range(0, E - 1);
        len = $urandom_range(0, SW);
        write_entry(r, IW'($urandom), IW'($urandom) & IW'($urandom),
                    states[$urandom_range(0, 3)], ~(SW'({SW{1'b1}}) >> len),
                    states[$urandom_range(0, 3)], 1'b1);
        n_rewrite++;
      end
      search(IW'($urandom));
    end

    $display("mechanisms: sis_skip=%0d pdm_multi_resolved=%0d miss=%0d tie=%0d feedback=%0d rewrite=%0d",
             n_sis_skip, n_multi_p1, n_miss, n_tie, n_feedback, n_rewrite);
    if (n_sis_skip == 0)  begin failures++; $display("FAIL no SIS skip seen"); end
    if (n_multi_p1 == 0)  begin failures++; $display("FAIL no multi-match resolution seen"); end
    if (n_miss == 0)      begin failures++; $display("FAIL no miss seen"); end
    if (n_tie == 0)       begin failures++; $display("FAIL no tie seen"); end
    if (n_feedback == 0)  begin failures++; $display("FAIL no state feedback seen"); end
    if (n_rewrite == 0)   begin failures++; $display("FAIL no rewrite seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
