// tb_next_state_memory: fills every word, then does random reads and
// writes, comparing the registered read data (one cycle after re) with a
// model array; checks that rdata holds while re is low.
module tb_next_state_memory;
  localparam int E = 4, W = 8;

  logic         clk = 1'b0, we, re;
  logic [1:0]   waddr, raddr;
  logic [W-1:0] wdata, rdata, last;
  logic [W-1:0] model [E];
  int           checks = 0, failures = 0;

  next_state_memory #(.ENTRIES(E), .STATE_W(W)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .re(re), .raddr(raddr),
    .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < E; i++) begin
      @(negedge clk); we = 1; waddr = 2'(i); wdata = W'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      we = 1'($urandom_range(0, 1)); waddr = 2'($urandom); wdata = W'($urandom);
      re = 1; raddr = 2'($urandom);
      last = model[raddr];
      if (we) model[waddr] = wdata;
      @(negedge clk);
      we = 0; re = 0;
      checks++;
      if (rdata !== last) begin
        failures++;
        $display("FAIL read addr=%0d got=%h exp=%h", raddr, rdata, last);
      end
      raddr = 2'($urandom);
      @(negedge clk);
      checks++;
      if (rdata !== last) begin
        failures++;
        $display("FAIL hold got=%h exp=%h", rdata, last);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
