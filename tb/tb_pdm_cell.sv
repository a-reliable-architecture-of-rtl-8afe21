// tb_pdm_cell: checks one 4T2R+PDM cell through all three phases. For each
// stored value it checks the phase 1 search result, the phase 2 CMD
// discharge for both P1R values, and the phase 3 MML discharge for both P2R
// values, against the expected values of the design's phase tables.
module tb_pdm_cell;
  import tcam_pkg::*;

  logic   clk = 1'b0;
  logic   wl, p1r, p2r;
  tern_t  wdata;
  dline_t dl;
  logic   nx, cmd_pull, mml_pull;
  int     checks = 0, failures = 0;

  pdm_cell dut (.clk(clk), .wl(wl), .wdata(wdata), .dl(dl), .p1r(p1r),
                .p2r(p2r), .nx(nx), .cmd_pull(cmd_pull), .mml_pull(mml_pull));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%b exp=%b", what, got, exp);
    end
  endtask

  tern_t vals [3] = '{TERN_0, TERN_1, TERN_X};

  initial begin
    wl = 0; wdata = TERN_X; dl = DL_MASK; p1r = 0; p2r = 1;
    for (int v = 0; v < 3; v++) begin
      logic care;
      care = (v != 2);
      @(negedge clk); wl = 1; wdata = vals[v];
      @(negedge clk); wl = 0;
      // phase 1: search 1 and search 0
      dl = DL_SEARCH1; p1r = 0; p2r = 1; #1;
      check("p1 search1 nx", nx, v == 0);
      dl = DL_SEARCH0; #1;
      check("p1 search0 nx", nx, v == 1);
      check("p1 no cmd", cmd_pull, 1'b0);
      // phase 2
      dl = DL_PROBE; p1r = 1; #1;
      check("p2 match cmd", cmd_pull, care);
      p1r = 0; #1;
      check("p2 mismatch cmd", cmd_pull, 1'b0);
      // phase 3
      p1r = 1; p2r = 0; #1;
      check("p3 p2r care mml", mml_pull, !care);
      p2r = 1; #1;
      check("p3 p2r dc mml", mml_pull, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
