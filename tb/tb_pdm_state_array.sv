// tb_pdm_state_array: drives the state-segment array through the three
// phases by hand (the testbench plays the role of the registers).
//
// First the four-entry example of the design: patterns 1010xxxx, 101001xx,
// 1011011x and 10100xxx searched with 10100101 must match entries 0, 1 and
// 3; the CMD lines must then read the longest length 11111100 (as CMD
// levels, 00000011); phase 3 must leave only entry 1's MML high. Then
// random prefix patterns, keys and row enables are compared with a
// reference computed in the testbench.
module tb_pdm_state_array;
  import tcam_pkg::*;

  localparam int E = 4, W = 8;

  logic                 clk = 1'b0;
  logic                 wr_en;
  logic [1:0]           wr_idx;
  tern_t [W-1:0]        wr_data;
  dline_t [W-1:0]       dl;
  logic [E-1:0]         row_en, p1r, ml, mml;
  logic [W-1:0]         p2r, cmd;
  int                   checks = 0, failures = 0;

  logic [W-1:0] pv [E];   // stored pattern values
  logic [W-1:0] pm [E];   // stored care masks

  pdm_state_array #(.ENTRIES(E), .STATE_W(W)) dut (
    .clk(clk), .wr_en(wr_en), .wr_idx(wr_idx), .wr_data(wr_data), .dl(dl),
    .row_en(row_en), .p1r(p1r), .p2r(p2r), .ml(ml), .cmd(cmd), .mml(mml));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%b exp=%b", what, got, exp);
    end
  endtask

  task automatic write_row(input int r, input logic [W-1:0] v, input logic [W-1:0] m);
    @(negedge clk);
    wr_en = 1; wr_idx = 2'(r);
    for (int c = 0; c < W; c++) wr_data[c] = !m[c] ? TERN_X : (v[c] ? TERN_1 : TERN_0);
    pv[r] = v & m; pm[r] = m;
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic run(input logic [W-1:0] key, input logic [E-1:0] en);
    logic [E-1:0] exp_ml, exp_mml;
    logic [W-1:0] or_mask;
    exp_ml = '0; or_mask = '0; exp_mml = '0;
    for (int r = 0; r < E; r++) begin
      exp_ml[r] = en[r] && ((key & pm[r]) == pv[r]);
      if (exp_ml[r]) or_mask |= pm[r];
    end
    for (int r = 0; r < E; r++) exp_mml[r] = exp_ml[r] && (pm[r] == or_mask);
    // phase 1
    for (int c = 0; c < W; c++) dl[c] = key_to_dline(key[c]);
    row_en = en; p1r = '0; p2r = '1;
    #1; check("ml", W'(ml), W'(exp_ml));
    p1r = ml;
    // phase 2
    row_en = '0;
    for (int c = 0; c < W; c++) dl[c] = DL_PROBE;
    #1; check("cmd", cmd, ~or_mask);
    p2r = cmd;
    // phase 3
    #1; check("mml", W'(mml), W'(exp_mml));
  endtask

  initial begin
    wr_en = 0; wr_idx = 0; wr_data = '0; row_en = '0; p1r = '0; p2r = '1;
    for (int c = 0; c < W; c++) dl[c] = DL_MASK;
    write_row(0, 8'b1010_0000, 8'b1111_0000);
    write_row(1, 8'b1010_0100, 8'b1111_1100);
    write_row(2, 8'b1011_0110, 8'b1111_1110);
    write_row(3, 8'b1010_0000, 8'b1111_1000);
    run(8'b1010_0101, 4'b1111);
    check("example longest length", ~p2r, 8'b1111_1100);
    check("example match", W'(mml), W'(4'b0010));
    // same patterns, rows disabled by the state search driver
    run(8'b1010_0101, 4'b1101);
    // random prefix patterns
    for (int t = 0; t < 300; t++) begin
      if (t % 10 == 0) begin
        logic [E*4-1:0] lens;
        lens = '0;
        for (int r = 0; r < E; r++) begin
          int len;
          do begin
            len = $urandom_range(0, W);
          end while (r > 0 && t % 20 == 0 && len == lens[(r-1)*4 +: 4]);
          lens[r*4 +: 4] = 4'(len);
          write_row(r, W'($urandom), ~(W'({W{1'b1}}) >> len));
        end
      end
      run(W'($urandom), E'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
