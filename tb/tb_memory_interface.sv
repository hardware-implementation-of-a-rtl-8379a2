// tb_memory_interface: stores samples, rewinds and fetches them back in
// order over several epochs, checks count, at_end and the one-clock fetch
// latency, and that stores beyond a full RAM (depth 8 here) are ignored.
module tb_memory_interface;
  import nn_pkg::*;
  localparam int D = 8;
  logic clk = 0, rst_n = 0, store = 0, rewind = 0, fetch = 0, sample_valid, at_end, full;
  sample_t sample_in = '0, sample_out; logic [3:0] count;
  int checks = 0, failures = 0;
  memory_interface #(.DEPTH(D)) dut (.clk, .rst_n, .store, .sample_in, .rewind, .fetch,
    .sample_out, .sample_valid, .count, .at_end, .full);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic play(input sample_t m[$]);
    @(negedge clk); rewind = 1; @(negedge clk); rewind = 0;
    for (int i = 0; i < m.size(); i++) begin
      check(!at_end, "not at end");
      fetch = 1; @(negedge clk); fetch = 0;
      check(sample_valid && sample_out == m[i], $sformatf("sample %0d", i));
    end
    check(at_end, "at end after last sample");
    fetch = 1; @(negedge clk); fetch = 0;
    check(!sample_valid, "no fetch past the end");
  endtask

  initial begin
    sample_t m[$];
    repeat (2) @(negedge clk); rst_n = 1;
    check(count == 0 && at_end, "empty after reset");
    for (int i = 0; i < 5; i++) begin
      sample_t s; s = sample_t'($urandom); m.push_back(s);
      @(negedge clk); store = 1; sample_in = s; @(negedge clk); store = 0;
    end
    check(count == 5, "count 5");
    play(m); play(m);
    for (int i = 0; i < 6; i++) begin
      sample_t s; s = sample_t'($urandom); if (m.size() < D) m.push_back(s);
      @(negedge clk); store = 1; sample_in = s; @(negedge clk); store = 0;
    end
    check(full && count == 4'(D), "full at depth");
    play(m);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
