// tcam_search_engine: TCAM-based state-machine search engine with
// priority decision in memory (PDM) and sequential input-state (SIS)
// search.
//
// Every entry is one transition of a pattern-matching state machine: an
// input-segment pattern (INPUT_W ternary bits), a state-segment pattern
// (STATE_W ternary bits) and, in the next-state memory, the state to go to.
// A search takes the input symbol and the current state and finds, among
// the entries matching both, the one whose state pattern has the most care
// bits (the longest pattern), without a priority encoder and without
// keeping the entries sorted: entries may be written in any order.
//
// Datapath, in search order:
//   tcam_input_segment  -> input match lines
//   state_search_driver -> enables the state-segment search only of rows
//                          whose input segment matched (SIS)
//   pdm_state_array     -> phase 1 match lines, phase 2 CMD column lines
//                          (longest length), phase 3 MML row lines
//   pdm_periph          -> P1R / P2R registers between the phases
//   match_addr_encoder  -> address of the single MML match
//   next_state_memory   -> next state, fed back into the current state
// pdm_search_ctrl sequences the phases (IN, P1, P2, P3, UPD).
//
// The longest-match rule relies on the state patterns being prefixes
// (care bits from the most significant end, then don't-cares), as in
// longest-prefix matching: then the bitwise OR of the matching entries'
// masks is itself the mask of one of them.
//
// Timing: start is taken in IDLE together with in_sym; done is high for one
// cycle five cycles later, with hit, multi, match_addr and next_state valid;
// cur_state takes next_state at the end of that cycle when hit is high (on
// a miss it keeps its value). st_search_en shows, during P1, which rows'
// state segments are being searched.
//
// Writes (wr_en) and state loads (state_load) are for idle cycles only; an
// assertion checks this. wr_valid = 0 removes an entry. Reset (async,
// active low) clears the entry valid bits and the current state; the
// non-volatile cell contents and next-state memory are not reset.
module tcam_search_engine
  import tcam_pkg::*;
#(
  parameter int ENTRIES = 4,
  parameter int INPUT_W = 4,
  parameter int STATE_W = 8,
  localparam int AW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // entry write
  input  logic                 wr_en,
  input  logic [AW-1:0]        wr_idx,
  input  tern_t [INPUT_W-1:0]  wr_in,
  input  tern_t [STATE_W-1:0]  wr_state,
  input  logic [STATE_W-1:0]   wr_next,
  input  logic                 wr_valid,
  // current state load
  input  logic                 state_load,
  input  logic [STATE_W-1:0]   state_in,
  // search
  input  logic                 start,
  input  logic [INPUT_W-1:0]   in_sym,
  output phase_t               phase,
  output logic                 busy,
  output logic                 done,
  output logic                 hit,
  output logic                 multi,
  output logic [AW-1:0]        match_addr,
  output logic [STATE_W-1:0]   next_state,
  output logic [STATE_W-1:0]   cur_state,
  output logic [STATE_W-1:0]   longest_len,
  output logic [ENTRIES-1:0]   st_search_en
);

  drive_t st_drive;
  logic   in_search, pc_ctrl, ssd_load, p1_load, p2_load, mem_re, upd;

  logic [INPUT_W-1:0]         sym_q;
  dline_t [INPUT_W-1:0]       in_dl;
  dline_t [STATE_W-1:0]       st_dl;
  logic [ENTRIES-1:0]         in_ml, st_ml, mml, p1r;
  logic [STATE_W-1:0]         cmd, p2r;
  logic [AW-1:0]              mae_addr;
  logic                       mae_hit, mae_multi;

  pdm_search_ctrl u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start),
    .phase   (phase),
    .in_search(in_search),
    .st_drive(st_drive),
    .pc_ctrl (pc_ctrl),
    .ssd_load(ssd_load),
    .p1_load (p1_load),
    .p2_load (p2_load),
    .mem_re  (mem_re),
    .upd     (upd),
    .done    (done),
    .busy    (busy)
  );

  // Input symbol and current state registers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sym_q     <= '0;
      cur_state <= '0;
    end else begin
      if (start && !busy) sym_q <= in_sym;
      if (state_load)     cur_state <= state_in;
      else if (upd && hit) cur_state <= next_state;
    end
  end

  // Data-line drivers of the two segments.
  always_comb begin
    for (int c = 0; c < INPUT_W; c++) begin
      in_dl[c] = in_search ? key_to_dline(sym_q[c]) : DL_MASK;
    end
    for (int c = 0; c < STATE_W; c++) begin
      unique case (st_drive)
        DRV_KEY:   st_dl[c] = key_to_dline(cur_state[c]);
        DRV_PROBE: st_dl[c] = DL_PROBE;
        default:   st_dl[c] = DL_MASK;
      endcase
    end
  end

  tcam_input_segment #(.ENTRIES(ENTRIES), .INPUT_W(INPUT_W)) u_in_seg (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (wr_en),
    .wr_idx  (wr_idx),
    .wr_data (wr_in),
    .wr_valid(wr_valid),
    .dl      (in_dl),
    .ml      (in_ml)
  );

  state_search_driver #(.ENTRIES(ENTRIES)) u_ssd (
    .clk      (clk),
    .rst_n    (rst_n),
    .ml_load  (ssd_load),
    .ml_in    (in_ml),
    .pc_ctrl  (pc_ctrl),
    .search_en(st_search_en)
  );

  pdm_state_array #(.ENTRIES(ENTRIES), .STATE_W(STATE_W)) u_st_arr (
    .clk    (clk),
    .wr_en  (wr_en),
    .wr_idx (wr_idx),
    .wr_data(wr_state),
    .dl     (st_dl),
    .row_en (st_search_en),
    .p1r    (p1r),
    .p2r    (p2r),
    .ml     (st_ml),
    .cmd    (cmd),
    .mml    (mml)
  );

  pdm_periph #(.ENTRIES(ENTRIES), .STATE_W(STATE_W)) u_periph (
    .clk    (clk),
    .rst_n  (rst_n),
    .p1_load(p1_load),
    .ml     (st_ml),
    .p2_load(p2_load),
    .cmd    (cmd),
    .p1r    (p1r),
    .p2r    (p2r)
  );

  match_addr_encoder #(.ENTRIES(ENTRIES)) u_mae (
    .mml  (mml),
    .addr (mae_addr),
    .hit  (mae_hit),
    .multi(mae_multi)
  );

  next_state_memory #(.ENTRIES(ENTRIES), .STATE_W(STATE_W)) u_mem (
    .clk  (clk),
    .we   (wr_en),
    .waddr(wr_idx),
    .wdata(wr_next),
    .re   (mem_re),
    .raddr(mae_addr),
    .rdata(next_state)
  );

  // Encoder result, registered alongside the memory read.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hit        <= 1'b0;
      multi      <= 1'b0;
      match_addr <= '0;
    end else if (mem_re) begin
      hit        <= mae_hit;
      multi      <= mae_multi;
      match_addr <= mae_addr;
    end
  end

  always_comb longest_len = ~p2r;

  // Entries and the current state may only change between searches.
  a_write_idle: assert property (@(posedge clk) (wr_en || state_load) |-> !busy);

endmodule
