// tb_data_bus_controller: drives the bus controller attached to the real
// network. Writes every weight (some from the random source), reads them
// back, evaluates random points against the reference model, and checks
// the done latency of each operation, counted from the edge that takes start
// (read/write: the next edge; evaluate: the 11th edge) and that the bus idles
// between operations.
module tb_data_bus_controller;
  import nn_pkg::*;
  import nn_model_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done, net_busy, net_done;
  bus_op_e op = OP_READ; logic [1:0] addr = 0, sel = 0;
  logic [7:0] wdata = 0, x = 0, y = 0, rnd = 0, result, net_x, net_y, net_rdata;
  nn_bus_t bus; weight_t net_out;
  int checks = 0, failures = 0;

  data_bus_controller dut (.clk, .rst_n, .start, .op, .addr, .sel, .wdata, .x, .y, .rnd, .busy, .done,
    .result, .bus, .net_x, .net_y, .net_rdata, .net_done, .net_out);
  neural_network u_net (.clk, .rst_n, .bus, .x(net_x), .y(net_y), .rdata(net_rdata), .busy(net_busy), .done(net_done), .out(net_out));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input bus_op_e o, input int a, input int s, input logic [7:0] d, output int lat);
    @(negedge clk); op = o; addr = 2'(a); sel = 2'(s); wdata = d; start = 1;
    @(negedge clk); start = 0; op = OP_READ; wdata = 8'h00;
    lat = 1; while (!done) begin @(negedge clk); lat++; end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // the bus carries a command only while an operation is in flight
  always @(posedge clk) if (rst_n && !busy && bus.cmd != CMD_IDLE) begin
    failures++; $display("FAIL: bus not idle between operations");
  end

  initial begin
    wmat_t w; int lat;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int set = 0; set < 10; set++) begin
      for (int n = 0; n < 3; n++) for (int k = 0; k < 3; k++) begin
        if ((n + k + set) % 2) begin
          w[n][k] = byte'($urandom); run(OP_WRITE, n, k, 8'(w[n][k]), lat);
        end else begin
          rnd = 8'($urandom); w[n][k] = byte'(rnd); run(OP_WRITE_RND, n, k, 8'h00, lat);
          check(result == rnd, "random write returns the value");
        end
        check(lat == 2, $sformatf("write latency %0d", lat));
      end
      for (int n = 0; n < 3; n++) for (int k = 0; k < 3; k++) begin
        run(OP_READ, n, k, 0, lat);
        check(lat == 2 && result == 8'(w[n][k]), $sformatf("read n%0d k%0d", n, k));
      end
      for (int p = 0; p < 5; p++) begin
        x = 8'($urandom); y = 8'($urandom);
        run(OP_EVAL, 0, 0, 0, lat);
        check(lat == 12, $sformatf("eval latency %0d", lat));
        check(int'(weight_t'(result)) == net_eval(w, int'(x), int'(y)), "eval result");
        check(net_x == x && net_y == y, "inputs held");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
