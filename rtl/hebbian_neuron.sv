// hebbian_neuron: the computing half of one neuron.
//
// On `start` the neuron forms acc = sum(inputs[k] * weights[k]) over its NW
// inputs (the last input is the bias input). As in the chosen neuron
// prototype, a multiplier with one pipeline register is used: one product
// enters the register per clock and the accumulator adds the registered
// product one clock later. `done` rises on the NW+1 = 4th clock edge after
// the edge that takes `start`; `acc` then holds the sum and `y` the output, +1 when acc >= 0 and -1 otherwise.
// `busy` is high from start to done. A start while busy is ignored.
// Inputs are 9-bit signed so that coordinates 0..255 stay positive; weights
// are 8-bit signed. The treatment of acc == 0 (+1) is a choice of this design.
module hebbian_neuron
  import nn_pkg::*;
#(
  parameter int unsigned NW    = N_W,
  parameter int unsigned ACC_W = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  nin_t              inputs  [NW],
  input  weight_t           weights [NW],
  output logic              busy,
  output logic              done,
  output logic signed [ACC_W-1:0] acc,
  output weight_t           y
);
  localparam int unsigned IW = $clog2(NW + 1);

  logic [IW-1:0]            idx;        // next product to form
  logic                     prod_vld;   // pipeline register holds a product
  logic                     last;       // the product in the register is the last
  logic signed [DATA_W*2:0] prod;       // 9x8 bit signed product

  assign y = acc[ACC_W-1] ? weight_t'(-1) : weight_t'(1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      idx      <= '0;
      prod_vld <= 1'b0;
      last     <= 1'b0;
      prod     <= '0;
      acc      <= '0;
    end else begin
      done <= 1'b0;
      // multiplier stage
      if (busy && idx != IW'(NW)) begin
        prod     <= inputs[idx] * weights[idx];
        prod_vld <= 1'b1;
        last     <= (idx == IW'(NW - 1));
        idx      <= idx + 1'b1;
      end else begin
        prod_vld <= 1'b0;
        last     <= 1'b0;
      end
      // accumulator stage
      if (prod_vld) begin
        acc <= acc + ACC_W'(prod);
        if (last) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
      if (start && !busy) begin
        busy <= 1'b1;
        idx  <= '0;
        acc  <= '0;
      end
    end
  end

  // done ends the operation
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy)
    else $error("hebbian_neuron: done while still busy");
endmodule
