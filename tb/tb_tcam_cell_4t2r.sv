// tb_tcam_cell_4t2r: checks the 4T2R cell against its search table.
//
// For each stored value (0, 1, X) and each data-line pair (search 1,
// search 0, masked, DL = DLB = 1) the expected result is taken from a table
// written out here by hand: mismatch (nx high) for search 1 on a stored 0,
// search 0 on a stored 1, and DL = DLB = 1 on a stored 0 or 1; match
// otherwise. It also checks that the value is kept while wl is low.
module tb_tcam_cell_4t2r;
  import tcam_pkg::*;

  logic   clk = 1'b0;
  logic   wl;
  tern_t  wdata;
  dline_t dl;
  logic   nx;
  int     checks = 0, failures = 0;

  tcam_cell_4t2r dut (.clk(clk), .wl(wl), .wdata(wdata), .dl(dl), .nx(nx));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected mismatch: index [stored value 0/1/X][dl pair S1,S0,MASK,PROBE]
  localparam bit EXP [3][4] = '{'{1, 0, 0, 1},   // stored 0
                                '{0, 1, 0, 1},   // stored 1
                                '{0, 0, 0, 0}};  // stored X
  tern_t  vals [3] = '{TERN_0, TERN_1, TERN_X};
  dline_t dls  [4] = '{DL_SEARCH1, DL_SEARCH0, DL_MASK, DL_PROBE};

  initial begin
    wl = 1'b0; wdata = TERN_X; dl = DL_MASK;
    for (int v = 0; v < 3; v++) begin
      @(negedge clk); wl = 1'b1; wdata = vals[v];
      @(negedge clk); wl = 1'b0; wdata = vals[(v + 1) % 3];
      repeat (2) @(negedge clk);   // value must be held with wl low
      for (int d = 0; d < 4; d++) begin
        dl = dls[d];
        #1;
        checks++;
        if (nx !== EXP[v][d]) begin
          failures++;
          $display("FAIL stored=%0d dl=%b nx=%b exp=%b", v, dl, nx, EXP[v][d]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
