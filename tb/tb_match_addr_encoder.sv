// tb_match_addr_encoder: every one-hot input must give its own index with
// hit = 1 and multi = 0; no input gives hit = 0; every input with two or
// more lines high must give hit = 1 and multi = 1. Exhaustive for 8 entries.
module tb_match_addr_encoder;
  localparam int E = 8;

  logic [E-1:0] mml;
  logic [2:0]   addr;
  logic         hit, multi;
  int           checks = 0, failures = 0;

  match_addr_encoder #(.ENTRIES(E)) dut (.mml(mml), .addr(addr), .hit(hit), .multi(multi));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << E); v++) begin
      int ones, idx;
      mml = E'(v);
      ones = 0; idx = 0;
      for (int i = 0; i < E; i++) if ((v & (1 << i)) != 0) begin ones++; idx = i; end
      #1;
      checks++;
      if (hit !== (ones > 0) || multi !== (ones > 1) || (ones == 1 && addr !== 3'(idx))) begin
        failures++;
        $display("FAIL mml=%b addr=%0d hit=%b multi=%b", mml, addr, hit, multi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
