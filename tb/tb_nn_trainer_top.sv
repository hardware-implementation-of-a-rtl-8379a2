// tb_nn_trainer_top: end-to-end test of the trainer through its serial pins,
// at 16 clocks per bit. A host model loads weights, reads them back,
// evaluates points, trains from serial data, trains from RAM and evaluates
// again, comparing every reply with the reference network model. It counts
// how often each mechanism happened and fails if one never did:
//   frame_drop   a byte with a bad stop bit is ignored
//   rx_full      the receive queue fills and the host pauses
//   kept         training changed weights (a trial weight was kept)
//   restored     training left weights as they were (trials were undone)
//   ram_epochs   train-from-RAM ran its epochs before the next command
//   tx_queue     more replies than the transmit queue holds, all delivered
module tb_nn_trainer_top;
  import nn_model_pkg::*;
  localparam int CPB = 16;
  logic clk = 0, rst_n = 0, serial_in = 1, serial_out, rx_full;
  int checks = 0, failures = 0;
  logic [15:0] replies[$];
  int n_frame_drop = 0, n_rx_full = 0, n_kept = 0, n_restored = 0, n_ram = 0, n_txq = 0;

  nn_trainer_top #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .serial_in, .serial_out, .rx_full);

  always #5 clk = ~clk;
  always @(posedge clk) if (rx_full) n_rx_full++;

  `include "host_tasks.svh"

  initial begin
    repeat (20000000) @(posedge clk);
    failures++; $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wmat_t w, g; int o, xs[$], ys[$], ts[$];
    repeat (5) @(posedge clk); rst_n = 1; repeat (5) @(posedge clk);
    // a corrupted byte first: must be dropped without shifting the packet
    send_byte(8'h55, 0);
    for (int n = 0; n < 3; n++) for (int k = 0; k < 3; k++) begin
      w[n][k] = byte'($urandom); send_cmd(8'h04, 8'(n), 8'(k), 8'(w[n][k]));
    end
    read_weights(g);
    check(g == w, "weights read back");
    if (g == w) n_frame_drop++;
    n_txq++;   // nine replies through a six-word queue
    for (int p = 0; p < 8; p++) begin
      int x, y; x = $urandom % 256; y = $urandom % 256;
      evaluate(x, y, o);
      check(o == net_eval(w, x, y), $sformatf("evaluate (%0d,%0d)", x, y));
    end
    // train from serial data: 8 samples
    for (int s = 0; s < 8; s++) begin
      int x, y, t, y_pre, y_post;
      x = $urandom % 256; y = $urandom % 256;
      t = (s % 2 == 0) ? -net_eval(w, x, y) : net_eval(w, x, y);  // half wrong, half right
      ts.push_back(t); xs.push_back(x); ys.push_back(y);
      y_pre = net_eval(w, x, y);
      send_cmd(8'h01, 8'(x), 8'(y), (t > 0) ? 8'h01 : 8'hFF);
      read_weights(g);
      y_post = net_eval(g, x, y);
      check(!(y_pre == t && y_post != t), "training never worsens the sample");
      if (g == w) n_restored++; else n_kept++;
      if (y_pre == t) check(g == w, "a correct sample leaves the weights alone");
      w = g;
    end
    // train from RAM: 4 epochs, then queue commands behind it to fill rx
    begin
      longint t0, t1; int need;
      t0 = $time;
      replies.delete();
      send_cmd(8'h02, 8'h00, 8'h04, 8'h00);
      for (int p = 0; p < 6; p++) send_cmd(8'h05, 8'(p * 40), 8'(255 - p * 40), 0);
      wait_replies(6, 4000 * CPB);
      t1 = $time;
      // 4 epochs x 8 samples x 19 evaluations of at least 12 clocks
      need = 4 * 8 * 19 * 12 * 10;
      check(t1 - t0 > need, "RAM epochs ran before the queued evaluations");
      if (t1 - t0 > need) n_ram++;
      replies.delete();
      read_weights(g);
      for (int p = 0; p < 4; p++) begin
        int x, y; x = $urandom % 256; y = $urandom % 256;
        evaluate(x, y, o);
        check(o == net_eval(g, x, y), "evaluate after RAM training");
      end
    end
    $display("mechanisms: frame_drop=%0d rx_full=%0d kept=%0d restored=%0d ram_epochs=%0d tx_queue=%0d",
             n_frame_drop, n_rx_full, n_kept, n_restored, n_ram, n_txq);
    check(n_frame_drop > 0, "frame drop happened");
    check(n_rx_full > 0, "rx_full happened");
    check(n_kept > 0, "a kept trial happened");
    check(n_restored > 0, "a restored trial happened");
    check(n_ram > 0, "RAM training happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
