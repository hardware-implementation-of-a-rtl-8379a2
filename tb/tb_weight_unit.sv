// tb_weight_unit: checks one weight storage unit: loads only while enable is
// high, drives q only while q_enable is high (zero otherwise), and always
// shows the stored value on w.
module tb_weight_unit;
  logic clk = 0, rst_n = 0, enable = 0, q_enable = 0;
  logic [7:0] d = 0, q; logic signed [7:0] w;
  int checks = 0, failures = 0;
  weight_unit dut (.clk, .rst_n, .enable, .q_enable, .d, .q, .w);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] m; m = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      enable = ($urandom % 3) == 0; q_enable = $urandom % 2; d = 8'($urandom);
      #1;
      checks++; if (q != (q_enable ? m : 8'h00)) begin failures++; $display("FAIL q"); end
      @(posedge clk); #1;
      if (enable) m = d;
      checks++; if (8'(w) != m) begin failures++; $display("FAIL w %02h vs %02h", w, m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
