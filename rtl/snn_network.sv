// snn_network: the input-time-multiplexed spiking neural network
// (default 784-300-10, Integrate-and-Fire neurons, rate-coded inputs).
//
// It has the same organisation as mlp_network, with IF neurons in place of
// perceptrons and 1-bit spikes in place of Q3.7 values between layers. An
// image is presented as N_STEPS time steps; in each step the N_IN input
// spikes (1 = the pixel emitted a spike in that step) enter one per cycle
// through the input neuron, and all N_HID hidden IF neurons add their
// weight for every input spike. At the end of the step every hidden neuron
// compares its potential with THRESHOLD and spikes or not; the output
// counter then presents the N_HID hidden spikes one per cycle to the N_OUT
// output IF neurons, which spike in turn. Potentials carry over from step
// to step and restart from 0 with each image. There is no bias neuron and
// no multiplier. The class is the output neuron that spiked most often over
// the image; counting is left to the user of out_spikes.
//
// Interface:
//   spk_valid / spk_in / spk_ready : input spike stream with valid/ready
//       handshake, pixel-major inside a time step: spike of pixel i in step t
//       is accepted item t*N_IN + i of the image.
//   wload : weight loading (nn_pkg::wload_t), layer 0 = hidden
//       (synapses 0..N_IN-1), layer 1 = output (synapses 0..N_HID-1), Q3.7.
//   out_spikes / out_valid / out_last : output spikes of one time step,
//       valid for the cycle of the out_valid pulse and held after it;
//       out_last marks the last step of an image.
// Timing: with an uninterrupted stream a time step takes N_IN + N_HID + 4
// cycles, an image N_STEPS times that.
//
// The IF neuron, the 1-bit interconnect, the time-multiplexed organisation
// and the 100 time steps per image follow the published SNN; the loadable
// weights, the stream handshake and the threshold encoding are this design's.
module snn_network
  import nn_pkg::*;
#(
  parameter int     N_IN      = 784,
  parameter int     N_HID     = 300,
  parameter int     N_OUT     = 10,
  parameter int     N_STEPS   = 100,
  parameter q11_7_t THRESHOLD = q11_7_t'(128)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             spk_valid,
  input  logic             spk_in,
  output logic             spk_ready,
  input  wload_t           wload,
  output logic [N_OUT-1:0] out_spikes,
  output logic             out_valid,
  output logic             out_last,
  output logic             busy
);

  localparam int HAW = (N_IN  > 1) ? $clog2(N_IN)  : 1;
  localparam int OAW = (N_HID > 1) ? $clog2(N_HID) : 1;

  // controller
  logic             h_valid, h_first, h_last, h_clear, h_bias;
  logic             o_valid, o_first, o_last, o_clear, o_bias;
  logic [IDX_W-1:0] h_idx, o_idx, step;
  logic             h_done, o_done, step_done, image_done;

  nn_controller #(.N_IN(N_IN), .N_HID(N_HID), .BIAS(1'b0), .N_STEPS(N_STEPS)) u_ctrl (
    .clk, .rst_n,
    .in_valid (spk_valid), .in_ready (spk_ready),
    .h_valid, .h_first, .h_last, .h_clear, .h_bias, .h_idx, .h_done,
    .o_valid, .o_first, .o_last, .o_clear, .o_bias, .o_idx, .o_done,
    .step_done, .image_done, .step, .busy
  );

  // input neuron
  logic             hb_valid, hb_first, hb_last, hb_clear;
  logic [IDX_W-1:0] hb_idx;
  logic             hb_spk;

  input_neuron #(.W(1), .BIAS_VAL(1'b1)) u_in (
    .clk, .rst_n,
    .c_valid (h_valid), .c_first (h_first), .c_last (h_last), .c_clear (h_clear),
    .c_bias (h_bias), .c_idx (h_idx), .d_in (spk_in),
    .q_valid (hb_valid), .q_first (hb_first), .q_last (hb_last), .q_clear (hb_clear),
    .q_idx (hb_idx), .q_data (hb_spk)
  );

  // hidden layer
  logic [N_HID-1:0] hid_spk, hid_sv;

  for (genvar j = 0; j < N_HID; j++) begin : g_hid
    q11_7_t pot;
    if_neuron #(.N_SYN(N_IN), .THRESHOLD(THRESHOLD)) u_n (
      .clk, .rst_n,
      .w_we        (wload.we && !wload.layer && (32'(wload.neuron) == j)),
      .w_addr      (wload.syn[HAW-1:0]),
      .w_data      (wload.data),
      .in_valid    (hb_valid),
      .in_first    (hb_first),
      .in_last     (hb_last),
      .in_clear    (hb_clear),
      .in_idx      (hb_idx[HAW-1:0]),
      .in_spike    (hb_spk),
      .spike       (hid_spk[j]),
      .spike_valid (hid_sv[j]),
      .potential   (pot)
    );
  end
  assign h_done = hid_sv[0];

  // output counter selects the hidden spike read by the output layer
  logic hid_sel;
  assign hid_sel = (32'(o_idx) < N_HID) ? hid_spk[o_idx[OAW-1:0]] : 1'b0;

  logic             ob_valid, ob_first, ob_last, ob_clear;
  logic [IDX_W-1:0] ob_idx;
  logic             ob_spk;

  input_neuron #(.W(1), .BIAS_VAL(1'b1)) u_hbuf (
    .clk, .rst_n,
    .c_valid (o_valid), .c_first (o_first), .c_last (o_last), .c_clear (o_clear),
    .c_bias (o_bias), .c_idx (o_idx), .d_in (hid_sel),
    .q_valid (ob_valid), .q_first (ob_first), .q_last (ob_last), .q_clear (ob_clear),
    .q_idx (ob_idx), .q_data (ob_spk)
  );

  // output layer
  logic [N_OUT-1:0] out_sv;

  for (genvar k = 0; k < N_OUT; k++) begin : g_out
    q11_7_t pot;
    if_neuron #(.N_SYN(N_HID), .THRESHOLD(THRESHOLD)) u_n (
      .clk, .rst_n,
      .w_we        (wload.we && wload.layer && (32'(wload.neuron) == k)),
      .w_addr      (wload.syn[OAW-1:0]),
      .w_data      (wload.data),
      .in_valid    (ob_valid),
      .in_first    (ob_first),
      .in_last     (ob_last),
      .in_clear    (ob_clear),
      .in_idx      (ob_idx[OAW-1:0]),
      .in_spike    (ob_spk),
      .spike       (out_spikes[k]),
      .spike_valid (out_sv[k]),
      .potential   (pot)
    );
  end
  assign o_done    = out_sv[0];
  assign out_valid = out_sv[0];
  assign out_last  = image_done;

  // Weights may only be written while no image is in progress.
  a_load_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    wload.we |-> !busy);

endmodule
