// weight_storage: the weight-holding half of one neuron.
//
// A comparator checks the address bus against the neuron's identifier ID and
// raises `hit` (the "equal" signal). With a hit, the command and select buses
// are decoded into one enable per weight for a write (command 01) and one
// q_enable per weight for a read (command 00), each driving a weight_unit.
// Enabled units load the input data bus on the clock edge; the outputs of
// the units are ORed onto `rdata`, so the q_enabled weight appears in the
// same cycle (zero when nothing is read). All weights go to
// the neuron's multiply-accumulate in parallel.
// Separate input and output data buses with a multiplexer replace the
// tristate bus of the first prototype, as the original design intended.
// Weights reset to zero, a choice of this design.
module weight_storage
  import nn_pkg::*;
#(
  parameter int unsigned ID  = 0,
  parameter int unsigned NW  = N_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  nn_bus_t           bus,
  output logic [DATA_W-1:0] rdata,
  output logic              hit,
  output weight_t           weights [NW]
);
  logic [NW-1:0]     enable, q_enable;
  logic [DATA_W-1:0] q [NW];

  assign hit = (bus.addr == ADDR_W'(ID));

  always_comb begin
    rdata = '0;
    for (int k = 0; k < NW; k++) begin
      enable[k]   = hit && (bus.cmd == CMD_WRITE) && (bus.sel == SEL_W'(k));
      q_enable[k] = hit && (bus.cmd == CMD_READ)  && (bus.sel == SEL_W'(k));
      rdata       = rdata | q[k];
    end
  end

  for (genvar k = 0; k < NW; k++) begin : g_unit
    weight_unit u_w (
      .clk, .rst_n, .enable(enable[k]), .q_enable(q_enable[k]), .d(bus.data), .q(q[k]), .w(weights[k])
    );
  end
endmodule
