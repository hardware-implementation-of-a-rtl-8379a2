// hold_weights: one complete neuron, built from its two halves.
//
// weight_storage holds the neuron's weights and answers read and write
// commands addressed to identifier ID on the network bus; hebbian_neuron
// multiplies the inputs by those weights, accumulates and outputs +1 or -1.
// Timing is that of the halves: reads answer in the same cycle, writes take
// effect at the next edge, and `done` rises on the NW+1 = 4th
// clock edge after the edge that takes `start`.
module hold_weights
  import nn_pkg::*;
#(
  parameter int unsigned ID    = 0,
  parameter int unsigned NW    = N_W,
  parameter int unsigned ACC_W = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  input  nn_bus_t           bus,
  input  logic              start,
  input  nin_t              inputs [NW],
  output logic [DATA_W-1:0] rdata,
  output logic              hit,
  output logic              busy,
  output logic              done,
  output logic signed [ACC_W-1:0] acc,
  output weight_t           y
);
  weight_t w [NW];

  weight_storage #(.ID(ID), .NW(NW)) u_store (
    .clk, .rst_n, .bus, .rdata, .hit, .weights(w)
  );

  hebbian_neuron #(.NW(NW), .ACC_W(ACC_W)) u_neuron (
    .clk, .rst_n, .start, .inputs, .weights(w), .busy, .done, .acc, .y
  );
endmodule
