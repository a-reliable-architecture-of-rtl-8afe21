// tb_pdm_search_ctrl: starts searches with random gaps and checks, cycle by
// cycle, the phase order IN, P1, P2, P3, UPD, the control outputs of each
// phase, that done comes exactly five cycles after start is taken, and that
// start is ignored while busy.
module tb_pdm_search_ctrl;
  import tcam_pkg::*;

  logic   clk = 1'b0, rst_n, start;
  phase_t phase;
  drive_t st_drive;
  logic   in_search;
  logic   pc_ctrl, ssd_load, p1_load, p2_load, mem_re, upd, done, busy;
  int     checks = 0, failures = 0, searches = 0;

  pdm_search_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  // expected controls per step k = 1..5 after start:
  // {in_search, st_drive, pc_ctrl, ssd_load, p1_load, p2_load, mem_re, upd, done}
  function automatic logic [9:0] exp_ctrl(input int k);
    case (k)
      1: return {1'b1, DRV_MASK,  1'b1, 1'b1, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0};
      2: return {1'b0, DRV_KEY,   1'b0, 1'b0, 1'b1, 1'b0, 1'b0, 1'b0, 1'b0};
      3: return {1'b0, DRV_PROBE, 1'b1, 1'b0, 1'b0, 1'b1, 1'b0, 1'b0, 1'b0};
      4: return {1'b0, DRV_PROBE, 1'b1, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 1'b0};
      5: return {1'b0, DRV_MASK,  1'b1, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b1};
      default: return {1'b0, DRV_MASK, 1'b1, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0};
    endcase
  endfunction

  phase_t ph_seq [6] = '{PH_IDLE, PH_IN, PH_P1, PH_P2, PH_P3, PH_UPD};

  initial begin
    rst_n = 0; start = 0;
    @(negedge clk); rst_n = 1;
    for (int s = 0; s < 50; s++) begin
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        check("idle ctrl", 16'({in_search, st_drive, pc_ctrl, ssd_load, p1_load, p2_load, mem_re, upd, done}), 16'(exp_ctrl(0)));
        check("idle busy", 16'(busy), 0);
      end
      start = 1;
      @(negedge clk);
      searches++;
      for (int k = 1; k <= 5; k++) begin
        start = 1'($urandom_range(0, 1));  // must be ignored while busy
        check("phase", 16'(phase), 16'(ph_seq[k]));
        check("ctrl", 16'({in_search, st_drive, pc_ctrl, ssd_load, p1_load, p2_load, mem_re, upd, done}), 16'(exp_ctrl(k)));
        check("busy", 16'(busy), 1);
        @(negedge clk);
      end
      start = 0;
      check("back to idle", 16'(phase), 16'(PH_IDLE));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
