// svm: linear support vector machine for two classes.
//
// Two multipliers and an adder form the decision value d = W1*v1 + W2*v2 from
// the two variance features; its sign bit is the class. On en the class
// register takes the sign bit (1 = d negative) and class_valid is high for
// one clock in the next cycle (one clock of latency). The adder and the
// single critical path of one multiplier and one adder follow the design. No
// bias term is built, as in the design's block diagram. The default weights
// (+1, -1 in Q2.14) are this implementation's choice: they decide which CSP
// output has the larger variance; trained weights replace them.
module svm
  import bci_pkg::*;
#(
  parameter coef_t W1 = coef_t'(16384),
  parameter coef_t W2 = coef_t'(-16384)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,           // features valid
  input  var_t v1,
  input  var_t v2,
  output logic class_o,      // sign bit of the decision value
  output logic class_valid
);

  localparam int PW = DATA_W + VAR_W;

  logic signed [PW-1:0] p1, p2;
  logic signed [PW:0]   d;
  logic                 class_q, valid_q;

  always_comb begin
    p1 = W1 * v1;
    p2 = W2 * v2;
    d  = (PW+1)'(p1) + (PW+1)'(p2);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      class_q <= 1'b0;
      valid_q <= 1'b0;
    end else begin
      valid_q <= en;
      if (en) class_q <= d[PW];
    end
  end

  assign class_o     = class_q;
  assign class_valid = valid_q;

endmodule
