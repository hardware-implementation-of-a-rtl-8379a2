// tb_nn_trainer_top_full: the trainer at its default parameters (9600 baud at
// 25.175 MHz, 2622 clocks per bit), driven through its serial pins. The host
// loads all nine weights, reads them back, evaluates two points, trains on
// two samples from serial data, runs one epoch from RAM and evaluates again,
// checking every reply against the reference network model.
`timescale 1ns/1ps
module tb_nn_trainer_top_full;
  import nn_model_pkg::*;
  localparam int CPB = 2622;
  logic clk = 0, rst_n = 0, serial_in = 1, serial_out, rx_full;
  int checks = 0, failures = 0;
  logic [15:0] replies[$];

  nn_trainer_top dut (.clk, .rst_n, .serial_in, .serial_out, .rx_full);

  // 25.175 MHz: period 39.72 ns
  always #19.86 clk = ~clk;

  `include "host_tasks.svh"

  initial begin
    repeat (12000000) @(posedge clk);
    failures++; $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wmat_t w, g; int o, x, y;
    repeat (5) @(posedge clk); rst_n = 1; repeat (5) @(posedge clk);
    for (int n = 0; n < 3; n++) for (int k = 0; k < 3; k++) begin
      w[n][k] = byte'($urandom); send_cmd(8'h04, 8'(n), 8'(k), 8'(w[n][k]));
    end
    read_weights(g);
    check(g == w, "weights read back");
    for (int p = 0; p < 2; p++) begin
      x = $urandom % 256; y = $urandom % 256;
      evaluate(x, y, o);
      check(o == net_eval(w, x, y), "evaluate");
    end
    for (int s = 0; s < 2; s++) begin
      int t, y_pre;
      x = $urandom % 256; y = $urandom % 256;
      y_pre = net_eval(w, x, y);
      t = (s == 0) ? -y_pre : y_pre;
      send_cmd(8'h01, 8'(x), 8'(y), (t > 0) ? 8'h01 : 8'hFF);
      read_weights(g);
      check(net_eval(g, x, y) == t || y_pre != t, "training never worsens the sample");
      if (s == 1) check(g == w, "a correct sample leaves the weights alone");
      w = g;
    end
    send_cmd(8'h02, 8'h00, 8'h01, 8'h00);
    read_weights(g);
    x = $urandom % 256; y = $urandom % 256;
    evaluate(x, y, o);
    check(o == net_eval(g, x, y), "evaluate after RAM epoch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
