// training_ram: on-chip RAM holding the training samples.
//
// A simple dual-port synchronous RAM: one write port and one read port with a
// registered output, so `rdata` shows the word at `raddr` one clock after
// `re`. The width is one sample (x, y, target: 24 bits). The depth of 256
// samples is a choice of this design; the original names only an LPM RAM.
module training_ram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 24
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
