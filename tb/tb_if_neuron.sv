// tb_if_neuron: drives an IF neuron with random weights and random spike
// trains over several images of several time steps and compares, after
// every time step, its spike and potential with a reference model:
// potential += w for each input spike; at the end of the step spike when
// potential >= threshold, then restart from 0; each image starts from 0.
// Counts spikes and non-spikes to be sure both outcomes occur.
module tb_if_neuron;
  import nn_pkg::*;
  localparam int N_SYN = 19, AW = $clog2(N_SYN), TH = 128;

  logic clk = 0, rst_n = 0;
  logic w_we; logic [AW-1:0] w_addr; q3_7_t w_data;
  logic in_valid, in_first, in_last, in_clear; logic [AW-1:0] in_idx; logic in_spike;
  logic spike, spike_valid; q11_7_t potential;
  int checks = 0, failures = 0, n_spk = 0, n_nospk = 0;
  int wt [N_SYN];

  if_neuron #(.N_SYN(N_SYN), .THRESHOLD(q11_7_t'(TH))) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p, s;
    w_we = 0; w_addr = 0; w_data = 0;
    in_valid = 0; in_first = 0; in_last = 0; in_clear = 0; in_idx = 0; in_spike = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < N_SYN; i++) begin
      @(negedge clk);
      wt[i] = int'($urandom_range(120)) - 50;
      w_we = 1; w_addr = AW'(i); w_data = q3_7_t'(wt[i]);
    end
    @(negedge clk); w_we = 0;
    p = 12345;  // whatever the neuron held, the first image clears it
    for (int img = 0; img < 30; img++) begin
      for (int t = 0; t < 8; t++) begin
        if (t == 0) p = 0;
        for (int i = 0; i < N_SYN; i++) begin
          while ($urandom_range(4) == 0) begin @(negedge clk); in_valid = 0; end
          @(negedge clk);
          s = ($urandom_range(99) < 30 + img) ? 1 : 0;
          in_valid = 1; in_first = (i == 0); in_last = (i == N_SYN - 1);
          in_clear = (t == 0); in_idx = AW'(i); in_spike = s[0];
          if (s != 0) p += wt[i];
        end
        @(posedge clk); #1;
        in_valid = 0;
        checks++;
        if (p >= TH) begin
          n_spk++;
          if (!spike_valid || !spike || potential != 0) begin
            failures++; $display("FAIL spike img=%0d t=%0d p=%0d pot=%0d", img, t, p, potential);
          end
          p = 0;
        end else begin
          n_nospk++;
          if (!spike_valid || spike || int'(potential) != p) begin
            failures++; $display("FAIL nospike img=%0d t=%0d p=%0d pot=%0d s=%b", img, t, p, potential, spike);
          end
        end
      end
    end
    checks++;
    if (n_spk == 0 || n_nospk == 0) begin failures++; $display("FAIL coverage %0d %0d", n_spk, n_nospk); end
    $display("spikes=%0d silent=%0d", n_spk, n_nospk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
