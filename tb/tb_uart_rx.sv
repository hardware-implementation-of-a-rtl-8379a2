// tb_uart_rx: checks the RS-232 receiver with 8 clocks per bit.
// Sends random bytes with good framing (must arrive intact), frames with a
// bad stop bit (must be dropped with frame_err) and a short start glitch
// (must be ignored), and checks the byte arrives within one frame time.
module tb_uart_rx;
  localparam int CPB = 8;
  logic clk = 0, rst_n = 0, rxd = 1;
  logic [7:0] data;
  logic valid, frame_err;
  int checks = 0, failures = 0;
  int n_valid = 0, n_err = 0;
  logic [7:0] last;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .rxd, .data, .valid, .frame_err);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (valid) begin n_valid++; last = data; end
    if (frame_err) n_err++;
  end

  task automatic send(input logic [7:0] b, input logic stop);
    rxd = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(posedge clk); end
    rxd = stop; repeat (CPB) @(posedge clk);
    rxd = 1; repeat (CPB) @(posedge clk);
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (4) @(posedge clk); rst_n = 1; repeat (4) @(posedge clk);
    for (int t = 0; t < 40; t++) begin
      logic [7:0] b; int v0, e0;
      b = 8'($urandom); v0 = n_valid; e0 = n_err;
      send(b, 1'b1);
      check(n_valid == v0 + 1 && last == b && n_err == e0, $sformatf("good frame %02h got %02h", b, last));
    end
    for (int t = 0; t < 5; t++) begin
      int v0, e0; v0 = n_valid; e0 = n_err;
      send(8'($urandom), 1'b0);
      rxd = 1; repeat (3*CPB) @(posedge clk);
      check(n_valid == v0 && n_err == e0 + 1, "bad stop bit dropped");
    end
    begin
      int v0, e0; v0 = n_valid; e0 = n_err;
      rxd = 0; repeat (2) @(posedge clk); rxd = 1; repeat (12*CPB) @(posedge clk);
      check(n_valid == v0 && n_err == e0, "start glitch ignored");
    end
    // latency: valid within 10 bit times of the start edge
    begin
      int c; logic [7:0] b; b = 8'h5A; c = 0;
      fork
        send(b, 1'b1);
        begin while (!valid) begin @(posedge clk); c++; end end
      join
      check(c <= 10*CPB + 4 && c >= 9*CPB, $sformatf("latency %0d clocks", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
