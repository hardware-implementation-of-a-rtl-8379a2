// host_tasks.svh: a serial-port host for the trainer testbenches.
//
// Included inside a testbench module that declares: clk, serial_in,
// serial_out, rx_full, the integer CPB (clocks per bit), checks, failures,
// and a queue `logic [15:0] replies[$]`. The host sends 8N1 bytes, waits
// while rx_full is high before each byte (the flow control of the link),
// and collects reply bytes into 16-bit words, high byte first.

task automatic send_byte(input logic [7:0] b, input bit good_stop = 1);
  while (rx_full) @(posedge clk);
  serial_in = 0; repeat (CPB) @(posedge clk);
  for (int i = 0; i < 8; i++) begin serial_in = b[i]; repeat (CPB) @(posedge clk); end
  serial_in = good_stop; repeat (CPB) @(posedge clk);
  serial_in = 1; repeat (CPB) @(posedge clk);
endtask

task automatic send_cmd(input logic [7:0] c, input logic [7:0] b1, input logic [7:0] b2, input logic [7:0] b3);
  send_byte(c); send_byte(b1); send_byte(b2); send_byte(b3);
endtask

task automatic check(input bit ok, input string what);
  checks++;
  if (!ok) begin failures++; $display("FAIL: %s", what); end
endtask

// wait for n reply words, at most `limit` clocks
task automatic wait_replies(input int n, input int limit);
  int c; c = 0;
  while (replies.size() < n && c < limit) begin @(posedge clk); c++; end
  check(replies.size() >= n, $sformatf("%0d replies expected, %0d arrived", n, replies.size()));
endtask

task automatic read_weights(output nn_model_pkg::wmat_t w, input int limit = 0);
  replies.delete();
  send_cmd(8'h03, 0, 0, 0);
  wait_replies(9, 400 * CPB + limit);
  for (int n = 0; n < 3; n++) for (int k = 0; k < 3; k++) begin
    logic [15:0] v; v = (replies.size() != 0) ? replies.pop_front() : 16'hFFFF;
    check(v[15:8] == {4'(n), 4'(k)}, "weight reply tag");
    w[n][k] = byte'(v[7:0]);
  end
endtask

task automatic evaluate(input int x, input int y, output int out);
  logic [15:0] v;
  replies.delete();
  send_cmd(8'h05, 8'(x), 8'(y), 0);
  wait_replies(1, 100 * CPB);
  v = (replies.size() != 0) ? replies.pop_front() : 16'h0;
  check(v[15:8] == 8'hF0, "evaluate reply tag");
  out = int'(byte'(v[7:0]));
endtask

// reply receiver
initial begin
  logic [7:0] hi; bit have_hi; have_hi = 0;
  forever begin
    logic [7:0] b;
    @(negedge serial_out);
    repeat (CPB / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = serial_out; end
    repeat (CPB) @(posedge clk);
    if (have_hi) begin replies.push_back({hi, b}); have_hi = 0; end
    else begin hi = b; have_hi = 1; end
  end
end
