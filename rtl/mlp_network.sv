// mlp_network: the input-time-multiplexed multilayer perceptron
// (default 784-300-10, tanh activation, bias neuron on the input and hidden
// layers).
//
// The network is spatially expanded, every hidden and output neuron being a
// perceptron of its own, but the inputs of each neuron are time-multiplexed:
// the image enters one pixel per cycle through a single input neuron, and
// all N_HID hidden perceptrons multiply-accumulate that pixel at once, each
// with its own weight. After the last pixel the bias slot (input 1.0) is
// added and the hidden activations are produced. The output counter then
// presents the hidden activations (and the bias 1.0) one per cycle to the
// N_OUT output perceptrons, which produce the network outputs. One multiplier
// per neuron, N_HID + N_OUT in total, is the point of this organisation.
//
// Interface:
//   pix_valid / pix_data / pix_ready : pixel stream, Q3.7, valid/ready
//       handshake; pixel k of an image is the k-th accepted pixel.
//   wload : weight loading, one Q3.7 weight per cycle (nn_pkg::wload_t);
//       layer 0 = hidden (synapses 0..N_IN-1, bias at N_IN), layer 1 = output
//       (synapses 0..N_HID-1, bias at N_HID). Load while the network is idle.
//   out_y / out_valid : the N_OUT activations (Q3.7), held until the next
//       image completes; out_valid pulses once per image.
// Timing: with an uninterrupted stream out_valid comes N_IN + N_HID + 5
// cycles after the first pixel of the image is accepted; pix_ready is low while
// the output layer works.
//
// The organisation, Q3.7 data, Q11.7 sums and tanh LUT follow the published
// MLP; the loadable weights and the stream handshake are this design's.
module mlp_network
  import nn_pkg::*;
#(
  parameter int    N_IN     = 784,
  parameter int    N_HID    = 300,
  parameter int    N_OUT    = 10
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   pix_valid,
  input  q3_7_t  pix_data,
  output logic   pix_ready,
  input  wload_t wload,
  output q3_7_t  out_y [N_OUT],
  output logic   out_valid,
  output logic   busy
);

  localparam int HAW = $clog2(N_IN + 1);   // hidden synapse index width
  localparam int OAW = $clog2(N_HID + 1);  // output synapse index width

  // controller
  logic             h_valid, h_first, h_last, h_clear, h_bias;
  logic             o_valid, o_first, o_last, o_clear, o_bias;
  logic [IDX_W-1:0] h_idx, o_idx, step;
  logic             h_done, o_done, step_done, image_done;

  nn_controller #(.N_IN(N_IN), .N_HID(N_HID), .BIAS(1'b1), .N_STEPS(1)) u_ctrl (
    .clk, .rst_n,
    .in_valid (pix_valid), .in_ready (pix_ready),
    .h_valid, .h_first, .h_last, .h_clear, .h_bias, .h_idx, .h_done,
    .o_valid, .o_first, .o_last, .o_clear, .o_bias, .o_idx, .o_done,
    .step_done, .image_done, .step, .busy
  );

  // input neuron
  logic             hb_valid, hb_first, hb_last, hb_clear;
  logic [IDX_W-1:0] hb_idx;
  logic [DATA_W-1:0] hb_data;

  input_neuron #(.W(DATA_W), .BIAS_VAL(Q37_ONE)) u_in (
    .clk, .rst_n,
    .c_valid (h_valid), .c_first (h_first), .c_last (h_last), .c_clear (h_clear),
    .c_bias (h_bias), .c_idx (h_idx), .d_in (pix_data),
    .q_valid (hb_valid), .q_first (hb_first), .q_last (hb_last), .q_clear (hb_clear),
    .q_idx (hb_idx), .q_data (hb_data)
  );

  // hidden layer
  q3_7_t hid_y  [N_HID];
  logic  hid_yv [N_HID];

  for (genvar j = 0; j < N_HID; j++) begin : g_hid
    perceptron #(.N_SYN(N_IN + 1)) u_n (
      .clk, .rst_n,
      .w_we     (wload.we && !wload.layer && (32'(wload.neuron) == j)),
      .w_addr   (wload.syn[HAW-1:0]),
      .w_data   (wload.data),
      .in_valid (hb_valid),
      .in_first (hb_first),
      .in_last  (hb_last),
      .in_idx   (hb_idx[HAW-1:0]),
      .in_x     (q3_7_t'(hb_data)),
      .y        (hid_y[j]),
      .y_valid  (hid_yv[j])
    );
  end
  assign h_done = hid_yv[0];

  // output counter selects the hidden neuron read by the output layer
  q3_7_t hid_sel;
  assign hid_sel = (32'(o_idx) < N_HID) ? hid_y[o_idx[OAW-1:0]] : Q37_ONE;

  logic             ob_valid, ob_first, ob_last, ob_clear;
  logic [IDX_W-1:0] ob_idx;
  logic [DATA_W-1:0] ob_data;

  input_neuron #(.W(DATA_W), .BIAS_VAL(Q37_ONE)) u_hbuf (
    .clk, .rst_n,
    .c_valid (o_valid), .c_first (o_first), .c_last (o_last), .c_clear (o_clear),
    .c_bias (o_bias), .c_idx (o_idx), .d_in (hid_sel),
    .q_valid (ob_valid), .q_first (ob_first), .q_last (ob_last), .q_clear (ob_clear),
    .q_idx (ob_idx), .q_data (ob_data)
  );

  // output layer
  logic out_yv [N_OUT];

  for (genvar k = 0; k < N_OUT; k++) begin : g_out
    perceptron #(.N_SYN(N_HID + 1)) u_n (
      .clk, .rst_n,
      .w_we     (wload.we && wload.layer && (32'(wload.neuron) == k)),
      .w_addr   (wload.syn[OAW-1:0]),
      .w_data   (wload.data),
      .in_valid (ob_valid),
      .in_first (ob_first),
      .in_last  (ob_last),
      .in_idx   (ob_idx[OAW-1:0]),
      .in_x     (q3_7_t'(ob_data)),
      .y        (out_y[k]),
      .y_valid  (out_yv[k])
    );
  end
  assign o_done    = out_yv[0];
  assign out_valid = out_yv[0];

  // Weights may only be written while no image is in progress.
  a_load_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    wload.we |-> !busy);

endmodule
