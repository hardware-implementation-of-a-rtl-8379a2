// tb_hebbian_neuron: checks the multiply-accumulate neuron on random signed
// weights and inputs in 0..255 (and +/-1 inputs): the accumulator equals the
// dot product, y is its sign, and done rises on the 4th clock edge after the edge that takes start (three
// products through a one-stage multiplier pipeline).
module tb_hebbian_neuron;
  import nn_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  nin_t in [3]; weight_t w [3]; logic signed [19:0] acc; weight_t y;
  int checks = 0, failures = 0;
  hebbian_neuron dut (.clk, .rst_n, .start, .inputs(in), .weights(w), .busy, .done, .acc, .y);
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

  initial begin
    int npos = 0, nneg = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int exp_sum, lat;
      for (int k = 0; k < 3; k++) begin
        w[k] = weight_t'($urandom);
        in[k] = (t % 2) ? nin_t'(($urandom % 2) ? 1 : -1) : nin_t'($urandom % 256);
      end
      in[2] = 1;
      exp_sum = 0; for (int k = 0; k < 3; k++) exp_sum += int'(in[k]) * int'(w[k]);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      lat = 1; while (!done) begin @(negedge clk); lat++; end
      check(lat == 5, $sformatf("latency %0d", lat));
      check(int'(acc) == exp_sum, $sformatf("acc %0d vs %0d", acc, exp_sum));
      check(int'(y) == ((exp_sum >= 0) ? 1 : -1), "sign output");
      if (exp_sum >= 0) npos++; else nneg++;
    end
    check(npos > 10 && nneg > 10, "both signs seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
