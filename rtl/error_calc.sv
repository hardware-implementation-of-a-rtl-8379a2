// error_calc: decides whether a trial weight is kept.
//
// The error of one evaluation is |target - y|. `load` stores the error of the
// current output as the best so far. `compare` measures the new output; one
// clock later `improved` tells whether it is strictly closer to the target
// than the best, and if so the best error is updated at the same time. A tie
// keeps the old weight. The keep-if-closer rule is the original design's;
// the absolute-difference error measure is a choice of this design.
module error_calc
  import nn_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  weight_t    target,
  input  weight_t    y,
  input  logic       load,
  input  logic       compare,
  output logic       improved,
  output logic [8:0] best_err
);
  logic signed [8:0] diff;
  logic        [8:0] err;

  assign diff = 9'(target) - 9'(y);
  assign err  = diff[8] ? 9'(-diff) : 9'(diff);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_err <= '1;
      improved <= 1'b0;
    end else begin
      improved <= 1'b0;
      if (load) begin
        best_err <= err;
      end else if (compare) begin
        if (err < best_err) begin
          best_err <= err;
          improved <= 1'b1;
        end
      end
    end
  end
endmodule
