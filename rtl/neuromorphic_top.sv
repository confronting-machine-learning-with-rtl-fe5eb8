// neuromorphic_top: the two neuromorphic architectures side by side, an
// input-time-multiplexed MLP and an input-time-multiplexed IF spiking
// network of the same 784-300-10 topology, for comparing formal and
// spike-based coding on the same organisation.
//
// The two networks share only the clock and reset; each has its own input
// stream, weight-load bus and outputs (see mlp_network and snn_network).
// Per image the MLP needs about N_IN + N_HID cycles, the SNN N_STEPS times
// as many, as it processes one time step of spikes per pass.
module neuromorphic_top
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
  // MLP
  input  logic             mlp_pix_valid,
  input  q3_7_t            mlp_pix_data,
  output logic             mlp_pix_ready,
  input  wload_t           mlp_wload,
  output q3_7_t            mlp_out_y [N_OUT],
  output logic             mlp_out_valid,
  output logic             mlp_busy,
  // SNN
  input  logic             snn_spk_valid,
  input  logic             snn_spk_in,
  output logic             snn_spk_ready,
  input  wload_t           snn_wload,
  output logic [N_OUT-1:0] snn_out_spikes,
  output logic             snn_out_valid,
  output logic             snn_out_last,
  output logic             snn_busy
);

  mlp_network #(.N_IN(N_IN), .N_HID(N_HID), .N_OUT(N_OUT)) u_mlp (
    .clk, .rst_n,
    .pix_valid (mlp_pix_valid),
    .pix_data  (mlp_pix_data),
    .pix_ready (mlp_pix_ready),
    .wload     (mlp_wload),
    .out_y     (mlp_out_y),
    .out_valid (mlp_out_valid),
    .busy      (mlp_busy)
  );

  snn_network #(.N_IN(N_IN), .N_HID(N_HID), .N_OUT(N_OUT), .N_STEPS(N_STEPS),
                .THRESHOLD(THRESHOLD)) u_snn (
    .clk, .rst_n,
    .spk_valid  (snn_spk_valid),
    .spk_in     (snn_spk_in),
    .spk_ready  (snn_spk_ready),
    .wload      (snn_wload),
    .out_spikes (snn_out_spikes),
    .out_valid  (snn_out_valid),
    .out_last   (snn_out_last),
    .busy       (snn_busy)
  );

endmodule
