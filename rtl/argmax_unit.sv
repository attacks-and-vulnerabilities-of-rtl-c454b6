// argmax_unit: turns the ten FC2 outputs into the predicted digit.
//
// The FC2 outputs arrive one at a time (in_valid, in_idx, in_data) as the
// accelerator writes them. The unit keeps every output in logits[] and
// tracks the largest so far; a later output replaces the leader only if it is
// strictly larger, so ties go to the lower digit. clear (at the start of an
// image) resets the leader. best_idx / best_val are valid from the clock
// after the last output. Output neuron n stands for digit n.
// Reading the prediction as the largest FC2 output follows the design; the
// streaming form and the tie rule are this design's choices.
module argmax_unit
  import lenet_pkg::*;
#(
  parameter int unsigned N = FC2_N
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 in_valid,
  input  logic [$clog2(N)-1:0] in_idx,
  input  q_t                   in_data,
  output logic [$clog2(N)-1:0] best_idx,
  output q_t                   best_val,
  output q_t                   logits [N]
);

  logic have;  // at least one output seen since clear

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      have     <= 1'b0;
      best_idx <= '0;
      best_val <= '0;
      for (int i = 0; i < int'(N); i++) logits[i] <= '0;
    end else if (clear) begin
      have <= 1'b0;
    end else if (in_valid) begin
      logits[in_idx] <= in_data;
      if (!have || in_data > best_val) begin
        best_idx <= in_idx;
        best_val <= in_data;
      end
      have <= 1'b1;
    end

endmodule
