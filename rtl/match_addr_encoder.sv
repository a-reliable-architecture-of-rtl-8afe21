// match_addr_encoder: match address encoder (MAE) of the search engine.
//
// After phase 3 at most one mask match line is high when the stored
// patterns have distinct lengths among the matching entries, because the
// longest-match decision has already been made inside the array. The
// encoder therefore needs no priority logic: it ORs together the indices of
// the high lines. hit says that some line is high; multi flags more than one
// (two matching entries of equal length), in which case addr is not
// meaningful. multi is this design's own addition.
//
// Interface: mml (one per entry) -> addr, hit, multi. Combinational.
module match_addr_encoder #(
  parameter int ENTRIES = 4,
  localparam int AW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic [ENTRIES-1:0] mml,
  output logic [AW-1:0]      addr,
  output logic               hit,
  output logic               multi
);

  always_comb begin
    addr  = '0;
    hit   = 1'b0;
    multi = 1'b0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (mml[i]) begin
        addr  = addr | AW'(i);
        multi = multi | hit;
        hit   = 1'b1;
      end
    end
  end

endmodule
