// mac_unit: the Q1.14 multiply-accumulate datapath shared by every layer.
//
// Each accumulate cycle (acc_en) adds the full 32-bit product a*b (Q2.28) to
// a 48-bit accumulator, wide enough for the 1,152 products of an FC1 neuron
// without loss. clear empties the accumulator (clear wins over acc_en).
// result is combinational from the accumulator: the bias, aligned to the
// product scale, is added, the sum is cut back to Q1.14 by dropping 14
// fraction bits (rounding toward minus infinity) and keeping the low 16 bits
// of what remains, so a sum outside [-2, 2) wraps around exactly like the
// 16-bit hardware it models. With relu set a negative result becomes zero.
// Average pooling uses the same unit with b = 0.25 and bias 0.
//
// Q1.14 words and wrap-around overflow follow the design; the accumulator
// width, the rounding and the ReLU activation are this design's choices.
module mac_unit
  import lenet_pkg::*;
#(
  parameter int unsigned ACC_W = 48
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic acc_en,
  input  q_t   a,
  input  q_t   b,
  input  q_t   bias,
  input  logic relu,
  output q_t   result
);

  logic signed [ACC_W-1:0] acc, sum;
  logic signed [2*QW-1:0]  prod;

  assign prod = a * b;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      acc <= '0;
    else if (clear)  acc <= '0;
    else if (acc_en) acc <= acc + ACC_W'(prod);

  always_comb begin
    sum    = acc + (ACC_W'(bias) <<< FRAC);
    result = q_t'(sum[FRAC +: QW]);
    if (relu && result < 0) result = '0;
  end

endmodule
