// pdm_eval: pattern length evaluation circuit of one 4T2R+PDM cell
// (phase 2 of the PDM search).
//
// Two transistors in series between the column mask data line CMD and
// ground: NM is gated by the cell's NX node and NFS by the row's phase 1
// result P1R. With DL = DLB = 1, NX is high for a care cell (0 or 1) and low
// for a don't-care cell. CMD, precharged high, is therefore pulled down
// exactly when the cell is a care bit of an entry that matched in phase 1:
//     cmd_pull = nx & p1r
// All cells of a column share CMD (wired), so after evaluation CMD is low
// wherever any matching entry has a care bit: CMD is the complement of the
// column-wise OR of the matching entries' masks, i.e. the longest pattern
// length with 0 meaning "care".
//
// Interface: nx (from the cell), p1r (row phase-1 match, high = match),
// cmd_pull (high = this cell discharges CMD). Purely combinational.
module pdm_eval (
  input  logic nx,
  input  logic p1r,
  output logic cmd_pull
);

  always_comb cmd_pull = nx & p1r;

endmodule
