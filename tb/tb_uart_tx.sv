// tb_uart_tx: checks the RS-232 transmitter with 8 clocks per bit.
// Decodes txd by sampling mid-bit and compares with the bytes sent, checks
// the frame length (10 bit times of busy), the idle-high line and that no
// frame starts while the transmit enable is low.
module tb_uart_tx;
  localparam int CPB = 8;
  logic clk = 0, rst_n = 0, en = 1, start = 0, busy, txd;
  logic [7:0] data = 0;
  int checks = 0, failures = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .en, .data, .start, .busy, .txd);

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
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    check(txd == 1 && !busy, "idle line high");
    for (int t = 0; t < 30; t++) begin
      logic [7:0] b, got; int bc;
      b = 8'($urandom);
      @(negedge clk); data = b; start = 1;
      @(negedge clk); start = 0; data = ~b;
      // the start bit began at the last posedge; sample mid-bit
      repeat (CPB/2 - 1) @(negedge clk);
      check(txd == 0, "start bit");
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(negedge clk); got[i] = txd; end
      repeat (CPB) @(negedge clk);
      check(txd == 1, "stop bit");
      check(got == b, $sformatf("byte %02h got %02h", b, got));
      bc = 0; while (busy) begin @(negedge clk); bc++; end
      check(bc == CPB/2 + 1 || bc == CPB/2, $sformatf("frame length tail %0d", bc));
    end
    // enable low: nothing starts
    @(negedge clk); en = 0; data = 8'h00; start = 1;
    @(negedge clk); start = 0;
    repeat (3*CPB) begin @(negedge clk); if (txd != 1 || busy) break; end
    check(txd == 1 && !busy, "no frame while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
