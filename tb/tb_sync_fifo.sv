// tb_sync_fifo: checks both FIFO configurations (32-bit x 4 receive queue,
// 16-bit x 6 transmit queue) against a queue model under random push and
// pop, including pushes while full and pops while empty.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int n_full = 0, n_empty_pop = 0;

  logic        pa, qa, ea, fa; logic [31:0] da, oa; logic [2:0] ca;
  logic        pb, qb, eb, fb; logic [15:0] db, ob; logic [2:0] cb;

  sync_fifo #(.WIDTH(32), .DEPTH(4)) rxq (.clk, .rst_n, .push(pa), .din(da), .pop(qa), .dout(oa), .empty(ea), .full(fa), .count(ca));
  sync_fifo #(.WIDTH(16), .DEPTH(6)) txq (.clk, .rst_n, .push(pb), .din(db), .pop(qb), .dout(ob), .empty(eb), .full(fb), .count(cb));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] ma[$]; logic [15:0] mb[$];
    pa = 0; qa = 0; da = 0; pb = 0; qb = 0; db = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      check(ea == (ma.size() == 0) && fa == (ma.size() == 4) && ca == 3'(ma.size()), "rx flags");
      check(eb == (mb.size() == 0) && fb == (mb.size() == 6) && cb == 3'(mb.size()), "tx flags");
      if (ma.size() > 0) check(oa == ma[0], "rx front");
      if (mb.size() > 0) check(ob == mb[0], "tx front");
      if (fa) n_full++;
      // bias phases to reach both full and empty
      pa = ($urandom % 100) < ((t / 300) % 2 ? 70 : 30); qa = ($urandom % 100) < ((t / 300) % 2 ? 30 : 70);
      pb = ($urandom % 100) < ((t / 250) % 2 ? 70 : 30); qb = ($urandom % 100) < ((t / 250) % 2 ? 30 : 70);
      da = $urandom; db = 16'($urandom);
      if (qa && ma.size() == 0) n_empty_pop++;
      @(posedge clk); #1;
      begin
        bit popa, pusha, popb, pushb;
        popa = qa && ma.size() > 0; pusha = pa && ma.size() < 4;
        popb = qb && mb.size() > 0; pushb = pb && mb.size() < 6;
        if (popa) void'(ma.pop_front()); if (pusha) ma.push_back(da);
        if (popb) void'(mb.pop_front()); if (pushb) mb.push_back(db);
      end
    end
    check(n_full > 0 && n_empty_pop > 0, "full and empty both reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
