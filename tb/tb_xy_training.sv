// tb_xy_training: the x-y area recognition workload. A training set of 16
// points, labelled +1 when x > y and -1 otherwise, is sent once with
// train-from-serial commands and then trained from RAM until the totals of
// 1000, 2000, 5000 and 10000 epochs are reached (the iteration counts of the
// software comparison). After each stage the weights are read back and the
// whole training set is evaluated on the hardware; every reply must agree
// with the reference model for the returned weights. The training-set error
// after each stage is printed. Runs at 16 clocks per bit.
module tb_xy_training;
  import nn_model_pkg::*;
  localparam int CPB = 16;
  localparam int NS  = 16;
  logic clk = 0, rst_n = 0, serial_in = 1, serial_out, rx_full;
  int checks = 0, failures = 0;
  logic [15:0] replies[$];

  nn_trainer_top #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .serial_in, .serial_out, .rx_full);

  always #5 clk = ~clk;

  `include "host_tasks.svh"

  initial begin
    repeat (400000000) @(posedge clk);
    failures++; $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int xs[NS], ys[NS], ts[NS], done_ep, stage[4];
    wmat_t w;
    stage = '{1000, 2000, 5000, 10000};
    repeat (5) @(posedge clk); rst_n = 1; repeat (5) @(posedge clk);
    for (int i = 0; i < NS; i++) begin
      xs[i] = $urandom % 256; ys[i] = $urandom % 256;
      if (xs[i] == ys[i]) xs[i] = (xs[i] + 7) % 256;
      ts[i] = (xs[i] > ys[i]) ? 1 : -1;
      send_cmd(8'h01, 8'(xs[i]), 8'(ys[i]), (ts[i] > 0) ? 8'h01 : 8'hFF);
    end
    done_ep = 1;   // the serial pass is the first epoch
    foreach (stage[s]) begin
      int n, wrong;
      n = stage[s] - done_ep;
      send_cmd(8'h02, 8'(n >> 8), 8'(n), 8'h00);
      done_ep = stage[s];
      read_weights(w, n * NS * 19 * 40);   // waits behind the training
      wrong = 0;
      for (int i = 0; i < NS; i++) begin
        int o;
        evaluate(xs[i], ys[i], o);
        check(o == net_eval(w, xs[i], ys[i]), "hardware output equals model");
        if (o != ts[i]) wrong++;
      end
      $display("after %0d epochs: %0d of %0d training points misclassified", done_ep, wrong, NS);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
