// tb_neural_network: loads random weights into the three neurons over the
// bus, runs forward commands on random points and compares the output with
// the reference model; checks done rises on the 9th clock edge after the
// edge that takes the forward command (hidden layer 4, hand-over 1, output
// layer 4), and that each neuron's weights read back.
module tb_neural_network;
  import nn_pkg::*;
  import nn_model_pkg::*;
  logic clk = 0, rst_n = 0, busy, done;
  nn_bus_t bus; logic [7:0] x = 0, y = 0, rdata; weight_t out;
  int checks = 0, failures = 0;
  neural_network dut (.clk, .rst_n, .bus, .x, .y, .rdata, .busy, .done, .out);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cyc(input nn_cmd_e c, input int a, input int s, input logic [7:0] d);
    @(negedge clk); bus = '{cmd: c, addr: 2'(a), sel: 2'(s), data: d};
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wmat_t w; int npos = 0, nneg = 0;
    bus = '{cmd: CMD_IDLE, addr: 0, sel: 0, data: 0};
    repeat (2) @(negedge clk); rst_n = 1;
    for (int set = 0; set < 20; set++) begin
      for (int n = 0; n < 3; n++) for (int k = 0; k < 3; k++) begin
        w[n][k] = byte'($urandom); cyc(CMD_WRITE, n, k, 8'(w[n][k]));
      end
      for (int n = 0; n < 3; n++) for (int k = 0; k < 3; k++) begin
        cyc(CMD_READ, n, k, 0); #1; check(rdata == 8'(w[n][k]), "weight read back");
      end
      for (int p = 0; p < 10; p++) begin
        int e, lat;
        cyc(CMD_IDLE, 0, 0, 0);
        x = 8'($urandom); y = 8'($urandom);
        e = net_eval(w, int'(x), int'(y));
        cyc(CMD_FWD, 3, 0, 0);
        cyc(CMD_IDLE, 0, 0, 0);
        lat = 1; while (!done) begin @(negedge clk); lat++; end
        check(lat == 10, $sformatf("latency %0d", lat));
        check(int'(out) == e, $sformatf("out %0d vs model %0d", out, e));
        if (e > 0) npos++; else nneg++;
      end
    end
    check(npos > 5 && nneg > 5, "both classes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
