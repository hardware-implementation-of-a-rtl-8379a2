// tb_error_calc: loads a reference error and compares trial outputs against
// it, for +/-1 outputs and for general 8-bit values; improved must be set
// exactly when |target - y| is strictly below the best so far, and the best
// must follow.
module tb_error_calc;
  import nn_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, compare = 0, improved; logic [8:0] best_err;
  weight_t target = 1, y = 1;
  int checks = 0, failures = 0, n_imp = 0, n_keep = 0;
  error_calc dut (.clk, .rst_n, .target, .y, .load, .compare, .improved, .best_err);
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

  function automatic int aerr(int t, int v); return (t > v) ? t - v : v - t; endfunction

  initial begin
    int best;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 100; r++) begin
      bit pm1; pm1 = (r < 50);
      target = pm1 ? (($urandom % 2) ? 1 : -1) : weight_t'($urandom);
      y = pm1 ? (($urandom % 2) ? 1 : -1) : weight_t'($urandom);
      best = aerr(target, y);
      @(negedge clk); load = 1; @(negedge clk); load = 0;
      check(int'(best_err) == best, "load");
      for (int t = 0; t < 6; t++) begin
        int e;
        y = pm1 ? (($urandom % 2) ? 1 : -1) : weight_t'($urandom);
        e = aerr(target, y);
        compare = 1; @(negedge clk); compare = 0;
        check(improved == (e < best), $sformatf("improved t=%0d y=%0d e=%0d best=%0d", target, y, e, best));
        if (e < best) begin best = e; n_imp++; end else n_keep++;
        check(int'(best_err) == best, "best follows");
      end
    end
    check(n_imp > 10 && n_keep > 10, "both outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
