// pdm_cmp: pattern length comparison circuit of one 4T2R+PDM cell
// (phase 3 of the PDM search).
//
// With DL = DLB = 1 on the data lines, NX tells whether the cell is a care
// bit. The registered phase 2 result P2R of this column is the CMD level,
// low where the longest pattern length has a care bit. The second-search
// transistor PSS conducts when P2R is low; the mask-search controller PMC
// conducts when NX is low and the mask-search transistor NMC when NX is
// high. Node MX is therefore:
//   P2R care (0), cell care      : PSS on, NMC on, PMC off -> MX low
//   P2R care (0), cell don't care: PSS on, PMC on, NMC off -> MX high
//   P2R don't care (1)           : PSS off                 -> MX low
// MX gates NMML, which discharges the mask match line MML of the row:
//     mx = ~p2r & ~nx,   mml_pull = mx
// A row keeps MML high only if it has a care bit wherever the longest
// length has one, i.e. its own length equals the longest length. That MX
// rests low when PSS is off is this model's reading; the case of a care
// cell under a don't-care P2R bit cannot occur in a matched entry.
//
// Interface: nx (from the cell), p2r (column phase-2 result, CMD level),
// mml_pull (high = this cell discharges MML). Purely combinational.
module pdm_cmp (
  input  logic nx,
  input  logic p2r,
  output logic mml_pull
);

  logic mx;

  always_comb begin
    mx       = ~p2r & ~nx;
    mml_pull = mx;
  end

endmodule
