// tb_prng: checks the random source against an independent model of the
// LFSR (x^16+x^14+x^13+x^11+1 from the seed) and that its low byte takes
// many different values over 2000 clocks.
module tb_prng;
  logic clk = 0, rst_n = 0; logic [7:0] rnd;
  int checks = 0, failures = 0;
  prng dut (.clk, .rst_n, .rnd);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] m; bit seen[256]; int distinct;
    m = 16'hACE1; distinct = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      checks++;
      if (rnd != m[7:0]) begin failures++; if (failures < 5) $display("FAIL t=%0d %02h vs %02h", t, rnd, m[7:0]); end
      if (!seen[rnd]) begin seen[rnd] = 1; distinct++; end
      @(negedge clk);
      m = {m[14:0], m[15] ^ m[13] ^ m[12] ^ m[10]};
    end
    checks++; if (distinct < 200) begin failures++; $display("FAIL only %0d values", distinct); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
