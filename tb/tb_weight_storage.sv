// tb_weight_storage: checks address matching, write enables and read
// multiplexing of a neuron's weight store with identifier 1, against a model
// of its three weights, for random bus cycles addressed to all neurons.
module tb_weight_storage;
  import nn_pkg::*;
  logic clk = 0, rst_n = 0;
  nn_bus_t bus; logic [7:0] rdata; logic hit; weight_t w [3];
  int checks = 0, failures = 0;
  weight_storage #(.ID(1)) dut (.clk, .rst_n, .bus, .rdata, .hit, .weights(w));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    byte signed m[3]; int nw = 0, nr = 0;
    m = '{0, 0, 0};
    bus = '{cmd: CMD_IDLE, addr: 0, sel: 0, data: 0};
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      bus.cmd = nn_cmd_e'($urandom % 4); bus.addr = 2'($urandom); bus.sel = 2'($urandom % 3); bus.data = 8'($urandom);
      #1;
      check(hit == (bus.addr == 2'd1), "hit");
      if (bus.addr == 1 && bus.cmd == CMD_READ) begin
        check(rdata == 8'(m[bus.sel]), $sformatf("read w%0d %02h vs %02h", bus.sel, rdata, m[bus.sel])); nr++;
      end else check(rdata == 0, "no read, rdata 0");
      @(posedge clk); #1;
      if (bus.addr == 1 && bus.cmd == CMD_WRITE) begin m[bus.sel] = byte'(bus.data); nw++; end
      for (int k = 0; k < 3; k++) check(w[k] == m[k], $sformatf("weight %0d", k));
    end
    check(nw > 20 && nr > 20, "reads and writes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
