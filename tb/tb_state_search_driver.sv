// tb_state_search_driver: checks the four rows of the state-search table
// (search only with pre-charge control low and ML high) for random match
// vectors, that the ML register loads only when ml_load is high, and that
// reset clears it.
module tb_state_search_driver;
  localparam int E = 4;

  logic         clk = 1'b0, rst_n, ml_load, pc_ctrl;
  logic [E-1:0] ml_in, search_en, held;
  int           checks = 0, failures = 0;

  state_search_driver #(.ENTRIES(E)) dut (
    .clk(clk), .rst_n(rst_n), .ml_load(ml_load), .ml_in(ml_in),
    .pc_ctrl(pc_ctrl), .search_en(search_en));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [E-1:0] got, input logic [E-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%b exp=%b", what, got, exp);
    end
  endtask

  initial begin
    rst_n = 0; ml_load = 0; pc_ctrl = 0; ml_in = '1;
    @(negedge clk); rst_n = 1;
    #1; check("reset", search_en, '0);
    held = '0;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      ml_in = E'($urandom); ml_load = 1'($urandom_range(0, 1));
      pc_ctrl = 1'b1;
      if (ml_load) held = ml_in;
      @(negedge clk);
      ml_load = 0; ml_in = E'($urandom);
      pc_ctrl = 1'b1; #1; check("pc high", search_en, '0);
      pc_ctrl = 1'b0; #1;
      for (int r = 0; r < E; r++) begin
        // row table: (pc low, ML high) -> yes; any other -> no
        checks++;
        if (search_en[r] !== (held[r] == 1'b1)) begin
          failures++;
          $display("FAIL row %0d ml=%b en=%b", r, held[r], search_en[r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
