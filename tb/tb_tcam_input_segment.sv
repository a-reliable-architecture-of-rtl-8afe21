// tb_tcam_input_segment: writes random ternary rows (some invalid) into the
// input segment and compares its match lines for random symbols, and for
// masked data lines, with a reference computed in the testbench. Also
// checks that reset leaves every row unused.
module tb_tcam_input_segment;
  import tcam_pkg::*;

  localparam int E = 4, W = 4;

  logic           clk = 1'b0, rst_n;
  logic           wr_en, wr_valid;
  logic [1:0]     wr_idx;
  tern_t [W-1:0]  wr_data;
  dline_t [W-1:0] dl;
  logic [E-1:0]   ml;
  int             checks = 0, failures = 0;

  logic [W-1:0] pv [E], pm [E];
  logic [E-1:0] vld;

  tcam_input_segment #(.ENTRIES(E), .INPUT_W(W)) dut (
    .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_idx(wr_idx),
    .wr_data(wr_data), .wr_valid(wr_valid), .dl(dl), .ml(ml));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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
    rst_n = 0; wr_en = 0; wr_valid = 0; wr_idx = 0; wr_data = '0;
    for (int c = 0; c < W; c++) dl[c] = DL_MASK;
    vld = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1; check("after reset", ml, '0);
    for (int t = 0; t < 400; t++) begin
      logic [W-1:0] key;
      logic [E-1:0] exp;
      if (t % 8 == 0) begin
        for (int r = 0; r < E; r++) begin
          @(negedge clk);
          wr_en = 1; wr_idx = 2'(r); wr_valid = ($urandom_range(0, 5) != 0) ? 1'b1 : 1'b0;
          pv[r] = W'($urandom); pm[r] = W'($urandom);
          for (int c = 0; c < W; c++) wr_data[c] = !pm[r][c] ? TERN_X : (pv[r][c] ? TERN_1 : TERN_0);
          vld[r] = wr_valid;
          @(negedge clk); wr_en = 0;
        end
        for (int c = 0; c < W; c++) dl[c] = DL_MASK;
        #1; check("masked", ml, vld);
      end
      key = W'($urandom);
      for (int c = 0; c < W; c++) dl[c] = key_to_dline(key[c]);
      for (int r = 0; r < E; r++) exp[r] = vld[r] && (((key ^ pv[r]) & pm[r]) == '0);
      #1; check("search", ml, exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
