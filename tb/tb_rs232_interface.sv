// tb_rs232_interface: checks the serial interface with 8 clocks per bit.
// A host model sends 4-byte packets; the testbench checks the packed 32-bit
// words (first byte in bits 31:24), that rx_full rises after four unread
// words and that a word completed while full waits and then arrives. It pushes
// 16-bit words into the transmit queue and decodes serial_out (high byte
// first), including six words queued back to back.
module tb_rs232_interface;
  localparam int CPB = 8;
  logic clk = 0, rst_n = 0, serial_in = 1, serial_out, rx_full;
  logic rx_empty, rx_pop = 0, tx_full, tx_push = 0, frame_err;
  logic [31:0] rx_word; logic [15:0] tx_word = 0;
  int checks = 0, failures = 0;
  logic [7:0] rx_bytes[$];

  rs232_interface #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .serial_in, .serial_out, .rx_full,
    .rx_empty, .rx_pop, .rx_word, .tx_full, .tx_push, .tx_word, .frame_err);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_byte(input logic [7:0] b);
    serial_in = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin serial_in = b[i]; repeat (CPB) @(posedge clk); end
    serial_in = 1; repeat (2*CPB) @(posedge clk);
  endtask

  task automatic send_word(input logic [31:0] w);
    for (int i = 3; i >= 0; i--) send_byte(w[8*i+:8]);
  endtask

  task automatic pop_word(output logic [31:0] w);
    @(negedge clk); w = rx_word; rx_pop = 1; @(negedge clk); rx_pop = 0;
  endtask

  // serial_out decoder
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge serial_out);
      repeat (CPB/2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = serial_out; end
      repeat (CPB) @(posedge clk);
      rx_bytes.push_back(b);
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] sent[$]; logic [31:0] w; logic [15:0] txw[$];
    repeat (3) @(posedge clk); rst_n = 1; repeat (3) @(posedge clk);
    // one packet
    w = $urandom; send_word(w);
    check(!rx_empty && rx_word == w, $sformatf("packet %08h got %08h", w, rx_word));
    pop_word(w); check(rx_empty, "empty after pop");
    // fill the queue: four words -> rx_full, fifth waits
    for (int i = 0; i < 5; i++) begin
      w = $urandom; sent.push_back(w); send_word(w);
      if (i == 3) check(rx_full, "rx_full after four words");
    end
    check(rx_full, "still full with a fifth word pending");
    for (int i = 0; i < 5; i++) begin
      logic [31:0] g; repeat (2) @(posedge clk);
      check(!rx_empty, "word available");
      pop_word(g);
      check(g == sent[i], $sformatf("queued word %0d: %08h vs %08h", i, g, sent[i]));
    end
    repeat (2) @(posedge clk);
    check(rx_empty && !rx_full, "drained");
    // transmit six words back to back
    for (int i = 0; i < 6; i++) begin
      logic [15:0] v; v = 16'($urandom); txw.push_back(v);
      @(negedge clk); tx_word = v; tx_push = 1;
    end
    @(negedge clk); tx_push = 0;
    repeat (6 * 2 * 12 * CPB) @(posedge clk);
    check(rx_bytes.size() == 12, $sformatf("12 bytes out, got %0d", rx_bytes.size()));
    for (int i = 0; i < 6 && rx_bytes.size() >= 2; i++) begin
      logic [15:0] g; g[15:8] = rx_bytes.pop_front(); g[7:0] = rx_bytes.pop_front();
      check(g == txw[i], $sformatf("tx word %0d %04h vs %04h", i, g, txw[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
