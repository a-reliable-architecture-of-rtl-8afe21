// tcam_pkg: types shared by the 4T2R/PDM TCAM search engine.
//
// A ternary cell is stored as the resistance pair of its two RRAM devices,
// {rt_lrs, rb_lrs}, where a 1 means that device is in the low-resistance
// state (LRS) and a 0 means high resistance (HRS). The three legal values
// follow the cell table of the design: 0 = (LRS,HRS), 1 = (HRS,LRS) and
// X (don't care) = (HRS,HRS). (LRS,LRS) is never written; if it were, the
// cell would mismatch every unmasked search.
//
// A pair of data lines {dl, dlb} drives each column: search 1 = (1,0),
// search 0 = (0,1), masked = (0,0) and the length probe = (1,1), which makes
// every care cell discharge and is used by phases 2 and 3 of the
// priority-decision-in-memory (PDM) search.
package tcam_pkg;

  typedef enum logic [1:0] {
    TERN_X = 2'b00,   // (HRS,HRS): don't care
    TERN_1 = 2'b01,   // (HRS,LRS): stores 1
    TERN_0 = 2'b10    // (LRS,HRS): stores 0
  } tern_t;

  typedef struct packed {
    logic dl;
    logic dlb;
  } dline_t;

  localparam dline_t DL_SEARCH1 = '{dl: 1'b1, dlb: 1'b0};
  localparam dline_t DL_SEARCH0 = '{dl: 1'b0, dlb: 1'b1};
  localparam dline_t DL_MASK    = '{dl: 1'b0, dlb: 1'b0};
  localparam dline_t DL_PROBE   = '{dl: 1'b1, dlb: 1'b1};

  // Phases of one search. IN is the input-segment search of the sequential
  // input-state scheme, P1..P3 the three PDM phases, UPD the next-state update.
  typedef enum logic [2:0] {
    PH_IDLE = 3'd0,
    PH_IN   = 3'd1,
    PH_P1   = 3'd2,
    PH_P2   = 3'd3,
    PH_P3   = 3'd4,
    PH_UPD  = 3'd5
  } phase_t;

  // Data-line drive a segment receives in a given cycle.
  typedef enum logic [1:0] {
    DRV_MASK  = 2'd0,  // all columns masked (no search energy)
    DRV_KEY   = 2'd1,  // search key on the columns
    DRV_PROBE = 2'd2   // DL = DLB = 1 on every column
  } drive_t;

  // Data lines for one search-key bit.
  function automatic dline_t key_to_dline(input logic b);
    return b ? DL_SEARCH1 : DL_SEARCH0;
  endfunction

  // Care flag of a stored ternary value (1 for 0 or 1, 0 for X).
  function automatic logic tern_care(input tern_t t);
    return t != TERN_X;
  endfunction

endpackage
