// tb_pdm_cmp: checks the pattern length comparison circuit. With P2R = 0
// (longest length has a care bit) a care cell keeps MML, a don't-care cell
// discharges it; with P2R = 1 nothing discharges MML.
module tb_pdm_cmp;
  logic nx, p2r, mml_pull;
  int   checks = 0, failures = 0;

  pdm_cmp dut (.nx(nx), .p2r(p2r), .mml_pull(mml_pull));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {nx, p2r} = 2'(i);
      #1;
      checks++;
      if (mml_pull !== (nx == 1'b0 && p2r == 1'b0)) begin
        failures++;
        $display("FAIL nx=%b p2r=%b mml_pull=%b", nx, p2r, mml_pull);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
