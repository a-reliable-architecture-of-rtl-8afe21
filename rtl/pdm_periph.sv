// pdm_periph: peripheral registers of the 4T2R+PDM array.
//
// P1R holds, per row, the phase 1 result (state-segment match line, high =
// match); it drives the NFS transistors of that row in phase 2 and selects
// which rows get their MML precharged in phase 3. P2R holds, per column,
// the CMD level sensed at the end of phase 2 (low = the longest pattern
// length has a care bit here); it drives the PSS transistors in phase 3.
// The design gates each register's clock with its phase; here a load
// enable does the same job.
//
// Reset (async, active low) clears P1R (no row matched) and sets P2R to all
// ones (the precharged CMD level, no care bits); both choices are this
// design's own.
//
// Interface: clk, rst_n; p1_load, ml -> p1r; p2_load, cmd -> p2r. Outputs
// change at the rising edge after the load.
module pdm_periph #(
  parameter int ENTRIES = 4,
  parameter int STATE_W = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               p1_load,
  input  logic [ENTRIES-1:0] ml,
  input  logic               p2_load,
  input  logic [STATE_W-1:0] cmd,
  output logic [ENTRIES-1:0] p1r,
  output logic [STATE_W-1:0] p2r
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1r <= '0;
      p2r <= '1;
    end else begin
      if (p1_load) p1r <= ml;
      if (p2_load) p2r <= cmd;
    end
  end

endmodule
