// tb_training_ram: writes random samples to random addresses of the sample
// RAM, keeping a model, and checks registered reads one clock after re.
module tb_training_ram;
  logic clk = 0, we = 0, re = 0; logic [7:0] waddr = 0, raddr = 0;
  logic [23:0] wdata = 0, rdata;
  int checks = 0, failures = 0;
  training_ram dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [23:0] m [256];
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); we = 1; waddr = 8'(a); wdata = 24'($urandom); m[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      we = $urandom % 2; waddr = 8'($urandom); wdata = 24'($urandom);
      re = 1; raddr = 8'($urandom);
      @(negedge clk);
      checks++;
      if (rdata != m[raddr]) begin failures++; $display("FAIL addr %0d", raddr); end
      if (we) m[waddr] = wdata;
      we = 0; re = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
