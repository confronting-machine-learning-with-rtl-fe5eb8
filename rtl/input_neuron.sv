// input_neuron: the buffer in front of a layer of the time-multiplexed
// network.
//
// In the published architecture the input layer is a single buffer neuron
// that hands the image to all hidden neurons one pixel per cycle. This
// module is that buffer: each cycle the controller issues a synapse slot
// (c_valid with its synapse index and framing flags) and the value for it
// (d_in); the buffer registers both, so that every neuron of the layer sees
// the value, the index that selects its weight and the flags in the same
// cycle. In the bias slot (c_bias) it outputs the bias neuron's constant
// BIAS_VAL instead of d_in. The same buffer is used in front of the output
// layer, where d_in is the hidden neuron selected by the output counter.
//
// Interface: controller slot in (c_*), buffered slot out (q_*), W-bit data
// (Q3.7 for the MLP, a 1-bit spike for the SNN).
// Timing: one register stage, one slot per cycle, no back-pressure.
module input_neuron
  import nn_pkg::*;
#(
  parameter int           W        = DATA_W,
  parameter logic [W-1:0] BIAS_VAL = W'(1 << FRAC_W)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             c_valid,
  input  logic             c_first,
  input  logic             c_last,
  input  logic             c_clear,
  input  logic             c_bias,
  input  logic [IDX_W-1:0] c_idx,
  input  logic [W-1:0]     d_in,
  output logic             q_valid,
  output logic             q_first,
  output logic             q_last,
  output logic             q_clear,
  output logic [IDX_W-1:0] q_idx,
  output logic [W-1:0]     q_data
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q_valid <= 1'b0;
      q_first <= 1'b0;
      q_last  <= 1'b0;
      q_clear <= 1'b0;
      q_idx   <= '0;
      q_data  <= '0;
    end else begin
      q_valid <= c_valid;
      q_first <= c_valid && c_first;
      q_last  <= c_valid && c_last;
      q_clear <= c_valid && c_clear;
      q_idx   <= c_idx;
      q_data  <= c_bias ? BIAS_VAL : d_in;
    end
  end

endmodule
