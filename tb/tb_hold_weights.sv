// tb_hold_weights: checks a complete neuron (identifier 2): weights are
// written and read back over the bus, writes to other identifiers are
// ignored, and a forward run gives the dot product of the inputs with the
// weights written, with its sign on y.
module tb_hold_weights;
  import nn_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, hit, busy, done;
  nn_bus_t bus; nin_t in [3]; logic [7:0] rdata; logic signed [19:0] acc; weight_t y;
  int checks = 0, failures = 0;
  hold_weights #(.ID(2)) dut (.clk, .rst_n, .bus, .start, .inputs(in), .rdata, .hit, .busy, .done, .acc, .y);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cyc(input nn_cmd_e c, input int a, input int s, input logic [7:0] d);
    @(negedge clk); bus = '{cmd: c, addr: 2'(a), sel: 2'(s), data: d};
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bus = '{cmd: CMD_IDLE, addr: 0, sel: 0, data: 0};
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      byte signed m[3]; int s;
      for (int k = 0; k < 3; k++) begin m[k] = byte'($urandom); cyc(CMD_WRITE, 2, k, 8'(m[k])); end
      cyc(CMD_WRITE, $urandom % 2, $urandom % 3, 8'($urandom));   // other neuron
      for (int k = 0; k < 3; k++) begin
        cyc(CMD_READ, 2, k, 8'h00); #1;
        check(hit && rdata == 8'(m[k]), $sformatf("read back w%0d", k));
      end
      cyc(CMD_IDLE, 0, 0, 0);
      in[0] = nin_t'($urandom % 256); in[1] = nin_t'($urandom % 256); in[2] = 1;
      s = int'(in[0]) * m[0] + int'(in[1]) * m[1] + m[2];
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      check(int'(acc) == s && int'(y) == ((s >= 0) ? 1 : -1), $sformatf("forward %0d vs %0d", acc, s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
