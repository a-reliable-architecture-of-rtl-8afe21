// pdm_search_ctrl: sequencer of one search of the TCAM search engine.
//
// A search runs through five phases, one clock cycle each, after start is
// seen in IDLE:
//   IN  input segment searched with the input symbol; the state search
//       driver registers the input match lines.        (sequential input-state)
//   P1  pre-charge control low: only rows whose input segment matched are
//       searched in the state segment with the current state; P1R registered.
//   P2  DL = DLB = 1 on the state segment; the CMD lines of the matched rows
//       give the longest pattern length; P2R registered.
//   P3  DL = DLB = 1 again with P2R applied; the MML of the longest match
//       stays high; the match address encoder drives the next-state memory
//       read.
//   UPD next state and hit are valid (done = 1); the current state is
//       replaced at the end of the cycle when there was a hit.
// The input segment is masked outside IN and the state segment outside
// P1..P3, so idle columns draw no search current. The split into these
// cycles and the one-cycle length of each are this design's own timing.
//
// Interface: clk, rst_n (async, active low); start (accepted only when
// busy is low). Outputs are decoded from the phase register: phase,
// in_search (key on the input segment, else masked), st_drive, pc_ctrl, ssd_load, p1_load, p2_load, mem_re, upd,
// done, busy.
module pdm_search_ctrl
  import tcam_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  output phase_t phase,
  output logic   in_search,
  output drive_t st_drive,
  output logic   pc_ctrl,
  output logic   ssd_load,
  output logic   p1_load,
  output logic   p2_load,
  output logic   mem_re,
  output logic   upd,
  output logic   done,
  output logic   busy
);

  phase_t phase_q, phase_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase_q <= PH_IDLE;
    else        phase_q <= phase_d;
  end

  always_comb begin
    unique case (phase_q)
      PH_IDLE: phase_d = start ? PH_IN : PH_IDLE;
      PH_IN:   phase_d = PH_P1;
      PH_P1:   phase_d = PH_P2;
      PH_P2:   phase_d = PH_P3;
      PH_P3:   phase_d = PH_UPD;
      PH_UPD:  phase_d = PH_IDLE;
      default: phase_d = PH_IDLE;
    endcase
  end

  always_comb begin
    phase    = phase_q;
    in_search = (phase_q == PH_IN);
    unique case (phase_q)
      PH_P1:        st_drive = DRV_KEY;
      PH_P2, PH_P3: st_drive = DRV_PROBE;
      default:      st_drive = DRV_MASK;
    endcase
    pc_ctrl  = (phase_q != PH_P1);
    ssd_load = (phase_q == PH_IN);
    p1_load  = (phase_q == PH_P1);
    p2_load  = (phase_q == PH_P2);
    mem_re   = (phase_q == PH_P3);
    upd      = (phase_q == PH_UPD);
    done     = (phase_q == PH_UPD);
    busy     = (phase_q != PH_IDLE);
  end

endmodule
