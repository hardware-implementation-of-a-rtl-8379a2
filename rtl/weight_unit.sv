// weight_unit: the storage unit of one weight.
//
// An 8-bit register that loads `d` on the clock edge while `enable` is high
// (write the weight) and shows its value on `q` only while `q_enable` is high
// (read the weight); otherwise `q` is zero, so the outputs of several units
// can be ORed onto one read bus. The stored value is always available on `w`
// for the neuron's multiply-accumulate. The enable / q_enable pair follows the
// original design; AND-gating the read output instead of a tristate driver
// and the reset value 0 are choices of this design.
module weight_unit
  import nn_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic              q_enable,
  input  logic [DATA_W-1:0] d,
  output logic [DATA_W-1:0] q,
  output weight_t           w
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      w <= '0;
    else if (enable) w <= weight_t'(d);
  end

  assign q = {DATA_W{q_enable}} & w;
endmodule
