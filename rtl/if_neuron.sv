// if_neuron: one hardware Integrate-and-Fire neuron of the
// input-time-multiplexed SNN.
//
// The neuron has one adder, a multiplexer and a comparator, as in the
// published IF neuron. Synapses arrive one per clock cycle (in_valid); the
// adder output is the previous potential plus the synapse's weight when the
// input spike is 1, and the previous potential alone when it is 0. The
// weight is read from the neuron's own weight memory. The comparison with
// the threshold is made only once the sum over all synapses of a time step
// is complete (in_last): if the potential is equal to or above THRESHOLD the
// neuron emits a spike and its potential restarts from 0, otherwise the
// potential is kept for the next time step (integrate, no leak).
// in_first marks the first synapse of a time step; in_clear together with
// in_first marks the first time step of a new image, whose sum starts from
// a potential of 0 instead of the stored one.
//
// This design's choices: the potential is Q11.7 like the MLP sum and
// saturates; the weights are Q3.7; "equal to or above" is used for the
// threshold test (the neuron equation of the model writes a strict ">").
//
// Timing: one synapse per cycle; spike is updated on the clock edge that
// consumes the in_last synapse, with a one-cycle spike_valid pulse, and is
// held until the next time step completes.
module if_neuron
  import nn_pkg::*;
#(
  parameter int     N_SYN     = 784,
  parameter q11_7_t THRESHOLD = q11_7_t'(128),
  localparam int    AW        = (N_SYN > 1) ? $clog2(N_SYN) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // weight load
  input  logic          w_we,
  input  logic [AW-1:0] w_addr,
  input  q3_7_t         w_data,
  // synapse stream
  input  logic          in_valid,
  input  logic          in_first,
  input  logic          in_last,
  input  logic          in_clear,
  input  logic [AW-1:0] in_idx,
  input  logic          in_spike,
  // outputs
  output logic          spike,
  output logic          spike_valid,
  output q11_7_t        potential
);

  q3_7_t  w;
  q11_7_t base, sum_next;

  weight_mem #(.DEPTH(N_SYN), .W(DATA_W)) u_wmem (
    .clk   (clk),
    .we    (w_we),
    .waddr (w_addr),
    .wdata (w_data),
    .raddr (in_idx),
    .rdata (w)
  );

  always_comb begin
    base     = (in_first && in_clear) ? q11_7_t'(0) : potential;
    sum_next = in_spike ? sat_q117(32'(base) + 32'(w)) : base;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      potential   <= '0;
      spike       <= 1'b0;
      spike_valid <= 1'b0;
    end else begin
      spike_valid <= 1'b0;
      if (in_valid) begin
        if (in_last) begin
          spike_valid <= 1'b1;
          if (sum_next >= THRESHOLD) begin
            spike     <= 1'b1;
            potential <= '0;
          end else begin
            spike     <= 1'b0;
            potential <= sum_next;
          end
        end else begin
          potential <= sum_next;
        end
      end
    end
  end

endmodule
