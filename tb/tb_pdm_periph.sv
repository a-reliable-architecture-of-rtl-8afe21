// tb_pdm_periph: checks the P1R/P2R registers: reset values (P1R all 0,
// P2R all 1), loading only with the load enables, and holding otherwise.
module tb_pdm_periph;
  localparam int E = 4, W = 8;

  logic         clk = 1'b0, rst_n, p1_load, p2_load;
  logic [E-1:0] ml, p1r, e1;
  logic [W-1:0] cmd, p2r, e2;
  int           checks = 0, failures = 0;

  pdm_periph #(.ENTRIES(E), .STATE_W(W)) dut (
    .clk(clk), .rst_n(rst_n), .p1_load(p1_load), .ml(ml), .p2_load(p2_load),
    .cmd(cmd), .p1r(p1r), .p2r(p2r));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%b exp=%b", what, got, exp);
    end
  endtask

  initial begin
    rst_n = 0; p1_load = 0; p2_load = 0; ml = '1; cmd = '0;
    @(negedge clk); rst_n = 1;
    check("p1r reset", W'(p1r), '0);
    check("p2r reset", p2r, '1);
    e1 = '0; e2 = '1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      ml = E'($urandom); cmd = W'($urandom);
      p1_load = 1'($urandom_range(0, 1)); p2_load = 1'($urandom_range(0, 1));
      if (p1_load) e1 = ml;
      if (p2_load) e2 = cmd;
      @(negedge clk);
      p1_load = 0; p2_load = 0;
      check("p1r", W'(p1r), W'(e1));
      check("p2r", p2r, e2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
