// tcam_cell_4t2r: logic model of the RCSD-4T2R non-volatile ternary cell.
//
// The cell holds one ternary value as the states of two resistive devices,
// RT and RB (encoding in tcam_pkg). During a search the dynamic source line
// pulse reaches node NX through NC and RT when DL is high, or through NCB
// and RB when DLB is high; only a low-resistance device lets NX rise above
// the threshold of the match-line driver NML. So
//     nx = (DL & RT is LRS) | (DLB & RB is LRS)
// and a high nx turns NML on and discharges the row's match line (a
// mismatch). This reproduces the search table of the design: search 1
// mismatches a stored 0, search 0 mismatches a stored 1, masked inputs
// match everything, and DL = DLB = 1 mismatches every care bit, which is
// how the later PDM phases read out the pattern length.
//
// Writing is this design's own choice, since the write circuit (WL, VWC,
// NWC) is not detailed: the value on wdata is stored at the rising clock
// edge while wl is high. The stored value has no reset, as in a
// non-volatile cell; whether an entry is in use is tracked per row
// elsewhere.
//
// Interface: clk, wl, wdata (write); dl (data-line pair); nx (combinational
// output, high = this cell pulls its match line down).
module tcam_cell_4t2r
  import tcam_pkg::*;
(
  input  logic   clk,
  input  logic   wl,
  input  tern_t  wdata,
  input  dline_t dl,
  output logic   nx
);

  tern_t cell_q;

  always_ff @(posedge clk) begin
    if (wl) cell_q <= wdata;
  end

  // cell_q[1] is RT in LRS, cell_q[0] is RB in LRS.
  always_comb nx = (dl.dl & cell_q[1]) | (dl.dlb & cell_q[0]);

endmodule
