// tb_sis_hex_workload: the sequential input-state scheme on a table keyed
// by hex digit.
//
// The engine is built with 16 entries. Entry i has the fully specified
// hex digit i in its input segment, a random prefix pattern in its state
// segment and a random next state. Random hex digits are then searched with
// the state fed back. For every search exactly one row may have its state
// segment searched, the row of that digit, so 15 of 16 state-row searches
// (93.75 %) must be skipped. The engine's results are also checked against a
// reference model, and the skipped fraction over the run is checked to be
// exactly 15/16.
module tb_sis_hex_workload;
  import tcam_pkg::*;

  localparam int E = 16, IW = 4, SW = 8, N = 2000;

  logic               clk = 1'b0, rst_n;
  logic               wr_en, wr_valid, state_load, start;
  logic [3:0]         wr_idx, match_addr;
  tern_t [IW-1:0]     wr_in;
  tern_t [SW-1:0]     wr_state;
  logic [SW-1:0]      wr_next, state_in, next_state, cur_state, longest_len;
  logic [IW-1:0]      in_sym;
  phase_t             phase;
  logic               busy, done, hit, multi;
  logic [E-1:0]       st_search_en;

  int checks = 0, failures = 0, searched = 0, possible = 0, hits = 0;
  logic [SW-1:0] sv [E], sm [E], nxt [E];

  tcam_search_engine #(.ENTRIES(E), .INPUT_W(IW), .STATE_W(SW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0h exp=%0h", what, got, exp);
    end
  endtask

  initial begin
    rst_n = 0; wr_en = 0; wr_valid = 0; wr_idx = 0; wr_in = '0; wr_state = '0;
    wr_next = 0; state_load = 0; state_in = 0; start = 0; in_sym = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < E; i++) begin
      int len;
      len = $urandom_range(0, 3);              // short prefixes so many rows match
      @(negedge clk);
      wr_en = 1; wr_idx = 4'(i); wr_valid = 1; wr_next = SW'($urandom);
      for (int c = 0; c < IW; c++) wr_in[c] = ((i >> c) & 1) != 0 ? TERN_1 : TERN_0;
      sm[i] = ~(SW'({SW{1'b1}}) >> len);
      sv[i] = SW'($urandom) & sm[i];
      nxt[i] = wr_next;
      for (int c = 0; c < SW; c++) wr_state[c] = !sm[i][c] ? TERN_X : (sv[i][c] ? TERN_1 : TERN_0);
    end
    @(negedge clk); wr_en = 0;

    for (int t = 0; t < N; t++) begin
      logic [IW-1:0] d;
      logic          exp_hit;
      logic [SW-1:0] prev;
      d = IW'($urandom);
      prev = cur_state;
      exp_hit = ((prev ^ sv[d]) & sm[d]) == '0;
      @(negedge clk); start = 1; in_sym = d;
      @(negedge clk); start = 0;
      while (!done) begin
        if (phase == PH_P1) begin
          check("one-hot SIS enable", st_search_en, E'(1) << d);
          for (int r = 0; r < E; r++) searched += int'(st_search_en[r]);
          possible += E;
        end
        @(negedge clk);
      end
      check("hit", hit, exp_hit);
      if (exp_hit) begin
        hits++;
        check("addr", match_addr, d);
        check("next", next_state, nxt[d]);
      end
      @(negedge clk);
      check("state", cur_state, exp_hit ? nxt[d] : prev);
    end
    $display("state-row searches: %0d of %0d possible, %0.2f %% skipped; %0d hits",
             searched, possible, 100.0 * real'(possible - searched) / real'(possible), hits);
    check("skipped fraction 15/16", (possible - searched) * 16, possible * 15);
    if (hits == 0) begin failures++; $display("FAIL no hit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
