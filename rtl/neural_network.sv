// neural_network: two hidden neurons and one output neuron, feed-forward.
//
// Neurons 0 and 1 form the hidden layer and take the inputs x and y (taken
// as unsigned 0..255) straight from the bus controller, with no input-layer
// neurons; neuron 2 is the output neuron and takes the two hidden outputs
// (+1/-1). Every neuron's third input is a constant +1 for its bias weight.
// All three share the command/address/select/data bus; the addressed neuron
// answers reads on `rdata`. A forward command (11) is a broadcast: it starts
// both hidden neurons, the output neuron starts when they are done, and
// `done` pulses with the result on `out`; it rises on the 2*(N_W+1)+1 = 9th
// clock edge after the edge that takes the command. The layer structure follows the original design; the bias input
// and the broadcast forward command are choices of this design.
module neural_network
  import nn_pkg::*;
#(
  parameter int unsigned ACC_W = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  input  nn_bus_t           bus,
  input  logic [DATA_W-1:0] x,
  input  logic [DATA_W-1:0] y,
  output logic [DATA_W-1:0] rdata,
  output logic              busy,
  output logic              done,
  output weight_t           out
);
  localparam int unsigned NN = N_NEURON;

  logic [DATA_W-1:0] rd   [NN];
  logic [NN-1:0]     hit, nbusy, ndone;
  weight_t           ny   [NN];
  logic signed [ACC_W-1:0] nacc [NN];
  nin_t              hid_in [N_W];
  nin_t              out_in [N_W];
  logic              fwd, start_out;

  assign fwd = (bus.cmd == CMD_FWD);

  assign hid_in[0] = nin_t'({1'b0, x});
  assign hid_in[1] = nin_t'({1'b0, y});
  assign hid_in[2] = nin_t'(1);
  assign out_in[0] = nin_t'(ny[0]);
  assign out_in[1] = nin_t'(ny[1]);
  assign out_in[2] = nin_t'(1);

  // both hidden neurons start together, so they finish together
  assign start_out = ndone[0] && ndone[1];

  for (genvar n = 0; n < 2; n++) begin : g_hidden
    hold_weights #(.ID(n), .NW(N_W), .ACC_W(ACC_W)) u_n (
      .clk, .rst_n, .bus, .start(fwd), .inputs(hid_in), .rdata(rd[n]), .hit(hit[n]),
      .busy(nbusy[n]), .done(ndone[n]), .acc(nacc[n]), .y(ny[n])
    );
  end

  hold_weights #(.ID(2), .NW(N_W), .ACC_W(ACC_W)) u_out (
    .clk, .rst_n, .bus, .start(start_out), .inputs(out_in), .rdata(rd[2]), .hit(hit[2]),
    .busy(nbusy[2]), .done(ndone[2]), .acc(nacc[2]), .y(ny[2])
  );

  always_comb begin
    rdata = '0;
    for (int n = 0; n < NN; n++) if (hit[n]) rdata = rd[n];
  end

  assign busy = |nbusy || start_out;
  assign done = ndone[2];
  assign out  = ny[2];
endmodule
