// prng: pseudo-random source of trial weights.
//
// A 16-bit Fibonacci LFSR (feedback polynomial x^16 + x^14 + x^13 + x^11 + 1,
// maximal length 65535) steps on every clock; its low byte is the random
// 8-bit signed weight. Because it runs freely and the trainer samples it at
// moments set by host traffic, the sequence of weights drawn is not fixed by
// reset alone. The original design only says a random generator supplies the
// weights; the LFSR, its polynomial and the seed are choices of this design.
module prng #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic [7:0] rnd
);
  logic [15:0] lfsr;
  logic        fb;

  assign fb  = lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10];
  assign rnd = lfsr[7:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr <= (SEED == 16'h0) ? 16'h1 : SEED;
    else        lfsr <= {lfsr[14:0], fb};
  end
endmodule
