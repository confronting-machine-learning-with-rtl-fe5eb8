// perceptron: one hardware perceptron of the input-time-multiplexed MLP.
//
// The neuron computes y = tanh( sum_i w_i * x_i ) over its N_SYN synapses,
// one synapse per clock cycle, as in the published neuron: a product stage,
// a sum stage and an activation stage. Each cycle with in_valid the Q3.7
// input in_x is multiplied by the weight of synapse in_idx read from the
// neuron's own weight memory; the product is rescaled to Q3.7 and added to
// a Q11.7 accumulator (in_first starts a new sum). With in_last the
// complete sum goes through the tanh LUT and the Q3.7 activation is stored
// in y, with a one-cycle y_valid pulse. y holds its value until the next
// sum completes, so the next layer may read it while this neuron already
// works on the next image. The bias neuron is the last synapse, fed with a
// constant 1.0 by the layer's input buffer.
//
// This design's choices: product and sum saturate instead of wrapping;
// the product is rescaled by an arithmetic shift (truncation).
//
// Timing: one synapse per cycle; y is updated on the clock edge that
// consumes the in_last synapse (y_valid high the cycle after).
module perceptron
  import nn_pkg::*;
#(
  parameter int    N_SYN    = 785,
  localparam int   AW       = (N_SYN > 1) ? $clog2(N_SYN) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // weight load
  input  logic             w_we,
  input  logic [AW-1:0]    w_addr,
  input  q3_7_t            w_data,
  // synapse stream
  input  logic             in_valid,
  input  logic             in_first,
  input  logic             in_last,
  input  logic [AW-1:0]    in_idx,
  input  q3_7_t            in_x,
  // activation
  output q3_7_t            y,
  output logic             y_valid
);

  q3_7_t  w;
  q3_7_t  prod;
  q11_7_t acc, sum_next;
  q3_7_t  act;

  weight_mem #(.DEPTH(N_SYN), .W(DATA_W)) u_wmem (
    .clk   (clk),
    .we    (w_we),
    .waddr (w_addr),
    .wdata (w_data),
    .raddr (in_idx),
    .rdata (w)
  );

  // product, then sum
  always_comb begin
    prod     = mul_q37(in_x, w);
    sum_next = sat_q117(32'(in_first ? q11_7_t'(0) : acc) + 32'(prod));
  end

  // activation
  tanh_lut u_act (
    .s (sum_next),
    .y (act)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc     <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= 1'b0;
      if (in_valid) begin
        acc <= sum_next;
        if (in_last) begin
          y       <= act;
          y_valid <= 1'b1;
        end
      end
    end
  end

  // A sum must start with in_first before it can end.
  logic open_sum;
  always_ff @(posedge clk)
    if (!rst_n) open_sum <= 1'b0;
    else if (in_valid) open_sum <= !in_last;
  a_first_after_last: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && !open_sum) |-> in_first);

endmodule
