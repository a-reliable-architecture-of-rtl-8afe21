// pdm_cell: one "4T2R plus PDM" cell of the state segment.
//
// Combines the three parts of the cell: the 4T2R ternary cell that stores
// pattern data and compares it with the search key (phase 1), the pattern
// length evaluation pair that discharges the column line CMD (phase 2), and
// the pattern length comparison circuit that discharges the row's mask match
// line MML (phase 3). The same NX node serves all three, so the stored
// pattern also carries its own length: its care bits are its mask.
//
// Interface: clk, wl, wdata (write); dl (column data lines); p1r (row phase
// 1 result); p2r (column phase 2 result). Outputs, all combinational and
// active high: nx (discharges the row ML), cmd_pull (discharges the column
// CMD), mml_pull (discharges the row MML). The caller combines them on the
// shared lines and decides in which phase each line is sensed.
module pdm_cell
  import tcam_pkg::*;
(
  input  logic   clk,
  input  logic   wl,
  input  tern_t  wdata,
  input  dline_t dl,
  input  logic   p1r,
  input  logic   p2r,
  output logic   nx,
  output logic   cmd_pull,
  output logic   mml_pull
);

  tcam_cell_4t2r u_cell (
    .clk  (clk),
    .wl   (wl),
    .wdata(wdata),
    .dl   (dl),
    .nx   (nx)
  );

  pdm_eval u_eval (
    .nx      (nx),
    .p1r     (p1r),
    .cmd_pull(cmd_pull)
  );

  pdm_cmp u_cmp (
    .nx      (nx),
    .p2r     (p2r),
    .mml_pull(mml_pull)
  );

endmodule
