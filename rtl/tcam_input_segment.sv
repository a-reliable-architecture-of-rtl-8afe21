// tcam_input_segment: the input segment, ENTRIES rows of INPUT_W plain
// 4T2R ternary cells.
//
// It holds the input-symbol half of every transition entry. A search
// applies the input symbol to the data lines of all rows at once; ml[r] is
// high when every cell of row r matches and the row is in use. This segment
// has no PDM circuits: the longest-match decision is made in the state
// segment only.
//
// Each row also has a valid bit, cleared by reset and set or cleared when
// the row is written. It is this design's own addition: the cells are
// non-volatile and have no reset, so an unused row must not report a match.
//
// Interface: clk, rst_n (async, active low); wr_en, wr_idx, wr_data,
// wr_valid (row write, at the rising edge); dl (data lines per column);
// ml (combinational, one per row).
module tcam_input_segment
  import tcam_pkg::*;
#(
  parameter int ENTRIES = 4,
  parameter int INPUT_W = 4,
  localparam int AW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr_en,
  input  logic [AW-1:0]         wr_idx,
  input  tern_t [INPUT_W-1:0]   wr_data,
  input  logic                  wr_valid,
  input  dline_t [INPUT_W-1:0]  dl,
  output logic [ENTRIES-1:0]    ml
);

  logic [ENTRIES-1:0][INPUT_W-1:0] nx;
  logic [ENTRIES-1:0]              valid_q;

  for (genvar r = 0; r < ENTRIES; r++) begin : g_row
    for (genvar c = 0; c < INPUT_W; c++) begin : g_col
      tcam_cell_4t2r u_cell (
        .clk  (clk),
        .wl   (wr_en && (wr_idx == AW'(r))),
        .wdata(wr_data[c]),
        .dl   (dl[c]),
        .nx   (nx[r][c])
      );
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
    end else if (wr_en) begin
      valid_q[wr_idx] <= wr_valid;
    end
  end

  always_comb begin
    for (int r = 0; r < ENTRIES; r++) ml[r] = valid_q[r] & ~|nx[r];
  end

endmodule
