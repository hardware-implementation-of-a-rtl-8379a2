// tb_control_unit: runs the control unit with the real datapath (bus
// controller, network, memory interface, error calculator, random source);
// the testbench stands in for the two FIFOs and stalls the transmit side at
// random. It checks, against the reference model:
//  - load-weight then return-weights gives back every weight in order;
//  - evaluate replies {F0, output} equal to the model;
//  - train-from-serial stores the sample, runs 1 + 3*6 evaluations, and
//    never leaves the network further from that sample's target, and leaves
//    every weight alone when the sample is already classified correctly;
//  - train-from-RAM runs epochs x samples x 19 evaluations;
//  - both outcomes of a trial (kept, restored) occur.
module tb_control_unit;
  import nn_pkg::*;
  import nn_model_pkg::*;
  logic clk = 0, rst_n = 0;
  logic rx_empty, rx_pop, tx_full = 0, tx_push; logic [31:0] rx_word; logic [15:0] tx_word;
  logic bus_start, bus_done, bus_busy; bus_op_e bus_op; logic [1:0] bus_addr, bus_sel;
  logic [7:0] bus_wdata, bus_result, in_x, in_y, rnd;
  logic mem_store, mem_rewind, mem_fetch, mem_valid, mem_at_end, mem_full; sample_t mem_sample, mem_rd;
  logic [8:0] mem_count; weight_t err_target, err_y; logic err_load, err_compare, err_improved; logic [8:0] best_err;
  logic cu_busy; nn_bus_t nbus; logic [7:0] net_x, net_y, net_rdata; logic net_busy, net_done; weight_t net_out;
  int checks = 0, failures = 0;
  int n_eval = 0, n_kept = 0, n_restored = 0, n_stall = 0;
  logic [31:0] rxq[$]; logic [15:0] txq[$];

  control_unit dut (.clk, .rst_n, .rx_empty, .rx_word, .rx_pop, .tx_full, .tx_push, .tx_word,
    .bus_start, .bus_op, .bus_addr, .bus_sel, .bus_wdata, .in_x, .in_y, .bus_done, .bus_result,
    .mem_store, .mem_sample, .mem_rewind, .mem_fetch, .mem_rd_sample(mem_rd), .mem_valid, .mem_at_end, .mem_count,
    .err_target, .err_y, .err_load, .err_compare, .err_improved, .busy(cu_busy));
  memory_interface u_mem (.clk, .rst_n, .store(mem_store), .sample_in(mem_sample), .rewind(mem_rewind), .fetch(mem_fetch),
    .sample_out(mem_rd), .sample_valid(mem_valid), .count(mem_count), .at_end(mem_at_end), .full(mem_full));
  prng u_prng (.clk, .rst_n, .rnd);
  error_calc u_err (.clk, .rst_n, .target(err_target), .y(err_y), .load(err_load), .compare(err_compare), .improved(err_improved), .best_err);
  data_bus_controller u_dbc (.clk, .rst_n, .start(bus_start), .op(bus_op), .addr(bus_addr), .sel(bus_sel), .wdata(bus_wdata),
    .x(in_x), .y(in_y), .rnd, .busy(bus_busy), .done(bus_done), .result(bus_result), .bus(nbus), .net_x, .net_y, .net_rdata, .net_done, .net_out);
  neural_network u_net (.clk, .rst_n, .bus(nbus), .x(net_x), .y(net_y), .rdata(net_rdata), .busy(net_busy), .done(net_done), .out(net_out));

  always #5 clk = ~clk;
  // FIFO flags are refreshed whenever the model queue changes
  initial begin rx_empty = 1'b1; rx_word = '0; end
  task automatic upd_rx();
    rx_empty = (rxq.size() == 0);
    rx_word  = rx_empty ? 32'h0 : rxq[0];
  endtask

  always @(posedge clk) begin
    if (rx_pop) begin
      void'(rxq.pop_front());
      rx_empty <= (rxq.size() == 0);
      rx_word  <= (rxq.size() == 0) ? 32'h0 : rxq[0];
    end
    if (tx_push) txq.push_back(tx_word);
    if (bus_start && bus_op == OP_EVAL) n_eval++;
    // a trial ends one clock after err_compare with err_improved set or not
    if (err_compare) n_restored++;
    if (err_improved) begin n_kept++; n_restored--; end
    if (tx_full && cu_busy) n_stall++;
  end
  always @(negedge clk) tx_full = ($urandom % 4) == 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cmd(input logic [7:0] c, input logic [7:0] b1, input logic [7:0] b2, input logic [7:0] b3);
    rxq.push_back({c, b1, b2, b3}); upd_rx();
    @(negedge clk); @(negedge clk);
    while (cu_busy || rxq.size() != 0) @(negedge clk);
  endtask

  task automatic get_weights(output wmat_t w);
    cmd(8'h03, 0, 0, 0);
    check(txq.size() == 9, $sformatf("nine weight words, got %0d", txq.size()));
    for (int n = 0; n < 3; n++) for (int k = 0; k < 3; k++) begin
      logic [15:0] v; v = (txq.size() != 0) ? txq.pop_front() : 16'hFFFF;
      check(v[15:8] == {4'(n), 4'(k)}, "weight word tag");
      w[n][k] = byte'(v[7:0]);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wmat_t w, g; int x, y, t;
    repeat (3) @(negedge clk); rst_n = 1;
    // load and return
    for (int n = 0; n < 3; n++) for (int k = 0; k < 3; k++) begin
      w[n][k] = byte'($urandom); cmd(8'h04, 8'(n), 8'(k), 8'(w[n][k]));
    end
    get_weights(g);
    check(g == w, "returned weights equal loaded weights");
    // evaluate
    for (int p = 0; p < 10; p++) begin
      logic [15:0] v;
      x = $urandom % 256; y = $urandom % 256;
      cmd(8'h05, 8'(x), 8'(y), 0);
      check(txq.size() == 1, "one evaluate reply");
      v = (txq.size() != 0) ? txq.pop_front() : 16'h0;
      check(v[15:8] == 8'hF0 && int'(byte'(v[7:0])) == net_eval(w, x, y), "evaluate reply");
    end
    // train from serial data
    for (int s = 0; s < 12; s++) begin
      int e0, e1, ev0;
      x = $urandom % 256; y = $urandom % 256; t = ($urandom % 2 != 0) ? 1 : -1;
      e0 = (net_eval(w, x, y) == t) ? 0 : 2;
      ev0 = n_eval;
      cmd(8'h01, 8'(x), 8'(y), (t > 0) ? 8'h01 : 8'hFF);
      check(n_eval - ev0 == 19, $sformatf("evaluations per sample %0d", n_eval - ev0));
      check(int'(mem_count) == s + 1, "sample stored");
      begin
        wmat_t w0; w0 = w;
        get_weights(w);
        if (e0 == 0) check(w == w0, "a correct sample leaves every weight as it was");
      end
      e1 = (net_eval(w, x, y) == t) ? 0 : 2;
      check(e1 <= e0, "training never worsens the sample");
    end
    // train from RAM: 3 epochs over 12 samples
    begin
      int ev0; ev0 = n_eval;
      cmd(8'h02, 8'h00, 8'h03, 8'h00);
      check(n_eval - ev0 == 3 * 12 * 19, $sformatf("evaluations for 3 epochs %0d", n_eval - ev0));
      get_weights(w);
      for (int p = 0; p < 5; p++) begin
        logic [15:0] v;
        x = $urandom % 256; y = $urandom % 256;
        cmd(8'h05, 8'(x), 8'(y), 0);
        v = (txq.size() != 0) ? txq.pop_front() : 16'h0;
        check(int'(byte'(v[7:0])) == net_eval(w, x, y), "evaluate after RAM training");
      end
    end
    // zero epochs and unknown command do nothing
    begin int ev0; ev0 = n_eval; cmd(8'h02, 0, 0, 0); cmd(8'h77, 1, 2, 3);
      check(n_eval == ev0 && txq.size() == 0, "no-op commands"); end
    check(n_kept > 0 && n_restored > 0 && n_stall > 0, $sformatf("kept %0d restored %0d stalls %0d", n_kept, n_restored, n_stall));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
