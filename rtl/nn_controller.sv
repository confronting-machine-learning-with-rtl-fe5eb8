// nn_controller: the hidden counter, output counter and time-step counter
// that sequence the input-time-multiplexed network.
//
// Both layers of the network have all their neurons in hardware, but each
// neuron takes its inputs one per cycle. The hidden counter walks the N_IN
// inputs of the image (plus the bias slot when BIAS = 1) while they are
// accepted from the input stream (in_valid/in_ready handshake); all hidden
// neurons integrate the same input in the same cycle. When the hidden
// neurons report their results (h_done), the output counter walks the
// N_HID hidden neurons (plus the bias slot) and feeds them to all output
// neurons, one per cycle, without needing any input. When the output
// neurons report (o_done) a pass is finished (step_done). For the SNN this
// is repeated for N_STEPS time steps per image; the first time step of an
// image is flagged with *_clear so that the neuron potentials restart from
// 0. The MLP uses N_STEPS = 1.
//
// The published design names a hidden counter and an output counter; the
// state machine around them, the stream handshake and the layer-by-layer
// sequencing (the output layer runs while the hidden layer waits) are this
// design's choices.
//
// Slot outputs (h_* and o_*) are combinational from the state and go to an
// input_neuron buffer. Cycles per pass with an uninterrupted input stream:
// N_IN + N_HID + 2*BIAS + 4.
module nn_controller
  import nn_pkg::*;
#(
  parameter int   N_IN    = 784,
  parameter int   N_HID   = 300,
  parameter bit   BIAS    = 1'b1,
  parameter int   N_STEPS = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // input stream
  input  logic             in_valid,
  output logic             in_ready,
  // hidden-layer slot
  output logic             h_valid,
  output logic             h_first,
  output logic             h_last,
  output logic             h_clear,
  output logic             h_bias,
  output logic [IDX_W-1:0] h_idx,
  input  logic             h_done,
  // output-layer slot
  output logic             o_valid,
  output logic             o_first,
  output logic             o_last,
  output logic             o_clear,
  output logic             o_bias,
  output logic [IDX_W-1:0] o_idx,
  input  logic             o_done,
  // status
  output logic             step_done,
  output logic             image_done,
  output logic [IDX_W-1:0] step,
  output logic             busy
);

  typedef enum logic [2:0] {S_IN, S_BIAS, S_HWAIT, S_OUT, S_OWAIT} state_t;

  state_t           state;
  logic [IDX_W-1:0] hcnt;   // hidden counter: input being read
  logic [IDX_W-1:0] ocnt;   // output counter: hidden neuron being read

  logic last_step;
  assign last_step = (32'(step) == N_STEPS - 1);

  always_comb begin
    in_ready = (state == S_IN);

    h_valid = 1'b0;
    h_first = 1'b0;
    h_last  = 1'b0;
    h_bias  = 1'b0;
    h_idx   = hcnt;
    h_clear = (step == '0);
    case (state)
      S_IN: begin
        h_valid = in_valid;
        h_first = (hcnt == '0);
        h_last  = !BIAS && (32'(hcnt) == N_IN - 1);
      end
      S_BIAS: begin
        h_valid = 1'b1;
        h_last  = 1'b1;
        h_bias  = 1'b1;
        h_idx   = IDX_W'(N_IN);
      end
      default: ;
    endcase

    o_valid = (state == S_OUT);
    o_first = (ocnt == '0);
    o_last  = (32'(ocnt) == N_HID - 1 + int'(BIAS));
    o_bias  = BIAS && (32'(ocnt) == N_HID);
    o_idx   = ocnt;
    o_clear = (step == '0);

    step_done  = (state == S_OWAIT) && o_done;
    image_done = step_done && last_step;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IN;
      hcnt  <= '0;
      ocnt  <= '0;
      step  <= '0;
      busy  <= 1'b0;
    end else begin
      case (state)
        S_IN:
          if (in_valid) begin
            busy <= 1'b1;
            if (32'(hcnt) == N_IN - 1) begin
              hcnt  <= '0;
              state <= BIAS ? S_BIAS : S_HWAIT;
            end else begin
              hcnt <= hcnt + 1'b1;
            end
          end
        S_BIAS:
          state <= S_HWAIT;
        S_HWAIT:
          if (h_done) begin
            ocnt  <= '0;
            state <= S_OUT;
          end
        S_OUT:
          if (o_last) begin
            ocnt  <= '0;
            state <= S_OWAIT;
          end else begin
            ocnt <= ocnt + 1'b1;
          end
        S_OWAIT:
          if (o_done) begin
            state <= S_IN;
            if (last_step) begin
              step <= '0;
              busy <= 1'b0;
            end else begin
              step <= step + 1'b1;
            end
          end
        default:
          state <= S_IN;
      endcase
    end
  end

  // The layers report completion only while the controller waits for them.
  a_h_done_when_waiting: assert property (@(posedge clk) disable iff (!rst_n)
    h_done |-> (state == S_HWAIT));
  a_o_done_when_waiting: assert property (@(posedge clk) disable iff (!rst_n)
    o_done |-> (state == S_OWAIT));

endmodule
