// tb_pdm_eval: checks the pattern length evaluation pair. CMD must be
// discharged only when the cell is a care bit (nx high under DL = DLB = 1)
// and the row matched in phase 1.
module tb_pdm_eval;
  logic nx, p1r, cmd_pull;
  int   checks = 0, failures = 0;

  pdm_eval dut (.nx(nx), .p1r(p1r), .cmd_pull(cmd_pull));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {nx, p1r} = 2'(i);
      #1;
      checks++;
      // table: care & match -> CMD 0 (pulled); every other case CMD stays 1
      if (cmd_pull !== (i == 3)) begin
        failures++;
        $display("FAIL nx=%b p1r=%b cmd_pull=%b", nx, p1r, cmd_pull);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
