// pdm_state_array: the state segment, an ENTRIES x STATE_W array of
// 4T2R+PDM cells.
//
// Each row has a match line ML and a mask match line MML; each column has a
// pair of data lines and a column mask data line CMD. The lines are modelled
// as wired-NOR nodes: precharged high, low if any attached cell pulls.
//   ml[r]   = row_en[r] & no cell of row r pulls ML      (phase 1)
//   cmd[c]  = no cell of column c pulls CMD               (phase 2)
//   mml[r]  = p1r[r] & no cell of row r pulls MML         (phase 3)
// row_en is the precharge enable of the sequential input-state scheme: a row
// the state search driver does not enable is not precharged and reads as a
// mismatch. MML is precharged only on rows that matched in phase 1, as the
// design prescribes. Which data lines are applied (key, or DL = DLB = 1) and
// when each line is sampled is decided by the caller; ml, cmd and mml are
// combinational.
//
// Writes: when wr_en is high, row wr_idx is written with wr_data at the
// rising clock edge. Any row may be written in any order; no sorting by
// pattern length is needed.
module pdm_state_array
  import tcam_pkg::*;
#(
  parameter int ENTRIES = 4,
  parameter int STATE_W = 8,
  localparam int AW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic                  clk,
  input  logic                  wr_en,
  input  logic [AW-1:0]         wr_idx,
  input  tern_t [STATE_W-1:0]   wr_data,
  input  dline_t [STATE_W-1:0]  dl,
  input  logic [ENTRIES-1:0]    row_en,
  input  logic [ENTRIES-1:0]    p1r,
  input  logic [STATE_W-1:0]    p2r,
  output logic [ENTRIES-1:0]    ml,
  output logic [STATE_W-1:0]    cmd,
  output logic [ENTRIES-1:0]    mml
);

  logic [ENTRIES-1:0][STATE_W-1:0] nx, cmd_pull, mml_pull;

  for (genvar r = 0; r < ENTRIES; r++) begin : g_row
    for (genvar c = 0; c < STATE_W; c++) begin : g_col
      pdm_cell u_cell (
        .clk     (clk),
        .wl      (wr_en && (wr_idx == AW'(r))),
        .wdata   (wr_data[c]),
        .dl      (dl[c]),
        .p1r     (p1r[r]),
        .p2r     (p2r[c]),
        .nx      (nx[r][c]),
        .cmd_pull(cmd_pull[r][c]),
        .mml_pull(mml_pull[r][c])
      );
    end
  end

  always_comb begin
    for (int r = 0; r < ENTRIES; r++) begin
      ml[r]  = row_en[r] & ~|nx[r];
      mml[r] = p1r[r] & ~|mml_pull[r];
    end
    for (int c = 0; c < STATE_W; c++) begin
      cmd[c] = 1'b1;
      for (int r = 0; r < ENTRIES; r++) cmd[c] = cmd[c] & ~cmd_pull[r][c];
    end
  end

endmodule
