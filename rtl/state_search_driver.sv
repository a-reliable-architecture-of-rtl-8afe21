// state_search_driver: the state search driver (SSD) of the sequential
// input-state (SIS) search scheme.
//
// Entries are searched in two steps: first the short input segment, then
// the long state segment. The SSD stores each row's input-segment match
// line in a register (loaded when ml_load is high) and enables the
// precharge, and so the search, of that row's state segment only when the
// pre-charge control is low and the stored ML is high:
//     pc_ctrl  ML | search state segment?
//       low   high | yes
//       high  low  | no
//       high  high | no
//       low   low  | no
// Rows whose input segment mismatched therefore spend no state-search
// energy, and the final result is unchanged because such rows could not
// have matched anyway.
//
// Interface: clk, rst_n (async, active low, clears the register); ml_load,
// ml_in (input-segment match lines); pc_ctrl (pre-charge control, active
// low enables); search_en (combinational, one per row).
module state_search_driver #(
  parameter int ENTRIES = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ml_load,
  input  logic [ENTRIES-1:0] ml_in,
  input  logic               pc_ctrl,
  output logic [ENTRIES-1:0] search_en
);

  logic [ENTRIES-1:0] ml_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       ml_q <= '0;
    else if (ml_load) ml_q <= ml_in;
  end

  always_comb search_en = {ENTRIES{~pc_ctrl}} & ml_q;

endmodule
