// topology_run: testbench helper that runs one MNIST-sized image through a
// 784-N_HID-10 MLP and a 784-N_HID-10 SNN (100 time steps) with random
// weights and uninterrupted input streams, compares every output with a
// reference model computed here, and checks the image times:
// N_IN + N_HID + 5 cycles for the MLP and N_STEPS * (N_IN + N_HID + 4) - 1
// for the SNN (the SNN's cost in time, about N_STEPS times the MLP's).
// Reports its counts through ports; used by tb_topologies.
module topology_run
  import nn_pkg::*;
#(
  parameter int N_HID = 10
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int N_IN = 784, N_OUT = 10, N_STEPS = 100, TH = 128;

  logic mlp_pix_valid, mlp_pix_ready, mlp_out_valid, mlp_busy;
  q3_7_t mlp_pix_data;
  wload_t mlp_wload, snn_wload;
  q3_7_t mlp_out_y [N_OUT];
  logic snn_spk_valid, snn_spk_in, snn_spk_ready, snn_out_valid, snn_out_last, snn_busy;
  logic [N_OUT-1:0] snn_out_spikes;

  mlp_network #(.N_IN(N_IN), .N_HID(N_HID), .N_OUT(N_OUT)) u_mlp (
    .clk, .rst_n, .pix_valid (mlp_pix_valid), .pix_data (mlp_pix_data),
    .pix_ready (mlp_pix_ready), .wload (mlp_wload), .out_y (mlp_out_y),
    .out_valid (mlp_out_valid), .busy (mlp_busy));

  snn_network #(.N_IN(N_IN), .N_HID(N_HID), .N_OUT(N_OUT), .N_STEPS(N_STEPS)) u_snn (
    .clk, .rst_n, .spk_valid (snn_spk_valid), .spk_in (snn_spk_in),
    .spk_ready (snn_spk_ready), .wload (snn_wload), .out_spikes (snn_out_spikes),
    .out_valid (snn_out_valid), .out_last (snn_out_last), .busy (snn_busy));

  shortint mwh [N_HID][N_IN+1];
  shortint mwo [N_OUT][N_HID+1];
  shortint swh [N_HID][N_IN];
  shortint swo [N_OUT][N_HID];
  int      mimg [N_IN];
  bit      strain [N_STEPS][N_IN];
  logic [N_OUT-1:0] snn_exp [N_STEPS];
  int      mlp_exp [N_OUT];
  int      n_ospk = 0;

  function automatic int sat(input int v, input int lo, input int hi);
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction
  function automatic int fl_div128(input int p);
    return (p >= 0) ? p / 128 : -((-p + 127) / 128);
  endfunction
  function automatic int ref_tanh(input int s);
    int c = sat(s, -512, 511);
    return $rtoi($floor(128.0 * $tanh(real'(c) / 128.0) + 0.5));
  endfunction

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL N_HID=%0d %s", N_HID, what); end
  endtask

  // monitors
  int cyc = 0, ostep = 0, t_mlp0 = -1, t_mlp1 = -1, t_snn0 = -1, t_snn1 = -1;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (mlp_pix_valid && mlp_pix_ready && t_mlp0 < 0) t_mlp0 = cyc;
    if (snn_spk_valid && snn_spk_ready && t_snn0 < 0) t_snn0 = cyc;
    if (mlp_out_valid) begin
      t_mlp1 = cyc;
      for (int k = 0; k < N_OUT; k++)
        chk(int'(mlp_out_y[k]) == mlp_exp[k], $sformatf("MLP out %0d", k));
    end
    if (snn_out_valid) begin
      chk(snn_out_spikes == snn_exp[ostep], $sformatf("SNN step %0d", ostep));
      if (snn_out_last) t_snn1 = cyc;
      ostep++;
    end
  end

  task automatic load_weights();
    int nm = N_HID * (N_IN + 1) + N_OUT * (N_HID + 1);
    int ns = N_HID * N_IN + N_OUT * N_HID;
    for (int j = 0; j < N_HID; j++) for (int i = 0; i <= N_IN; i++) mwh[j][i] = shortint'(int'($urandom_range(80)) - 40);
    for (int k = 0; k < N_OUT; k++) for (int j = 0; j <= N_HID; j++) mwo[k][j] = shortint'(int'($urandom_range(160)) - 80);
    for (int j = 0; j < N_HID; j++) for (int i = 0; i < N_IN; i++) swh[j][i] = shortint'(int'($urandom_range(44)) - 22);
    for (int k = 0; k < N_OUT; k++) for (int j = 0; j < N_HID; j++) swo[k][j] = shortint'(int'($urandom_range(100)) - 40);
    for (int n = 0; n < ((nm > ns) ? nm : ns); n++) begin
      @(negedge clk);
      mlp_wload = '0; snn_wload = '0;
      if (n < nm) begin
        mlp_wload.we = 1;
        if (n < N_HID * (N_IN + 1)) begin
          mlp_wload.neuron = IDX_W'(n / (N_IN + 1)); mlp_wload.syn = IDX_W'(n % (N_IN + 1));
          mlp_wload.data = q3_7_t'(mwh[n / (N_IN + 1)][n % (N_IN + 1)]);
        end else begin
          int m = n - N_HID * (N_IN + 1);
          mlp_wload.layer = 1; mlp_wload.neuron = IDX_W'(m / (N_HID + 1)); mlp_wload.syn = IDX_W'(m % (N_HID + 1));
          mlp_wload.data = q3_7_t'(mwo[m / (N_HID + 1)][m % (N_HID + 1)]);
        end
      end
      if (n < ns) begin
        snn_wload.we = 1;
        if (n < N_HID * N_IN) begin
          snn_wload.neuron = IDX_W'(n / N_IN); snn_wload.syn = IDX_W'(n % N_IN);
          snn_wload.data = q3_7_t'(swh[n / N_IN][n % N_IN]);
        end else begin
          int m = n - N_HID * N_IN;
          snn_wload.layer = 1; snn_wload.neuron = IDX_W'(m / N_HID); snn_wload.syn = IDX_W'(m % N_HID);
          snn_wload.data = q3_7_t'(swo[m / N_HID][m % N_HID]);
        end
      end
    end
    @(negedge clk);
    mlp_wload = '0; snn_wload = '0;
  endtask

  task automatic references();
    int yh [N_HID+1];
    int ph [N_HID], po [N_OUT];
    bit sh [N_HID];
    int acc, x, pix;
    for (int i = 0; i < N_IN; i++) mimg[i] = int'($urandom_range(255)) - 128;
    for (int j = 0; j < N_HID; j++) begin
      acc = 0;
      for (int i = 0; i <= N_IN; i++) begin
        x = (i == N_IN) ? 128 : mimg[i];
        acc = sat(acc + sat(fl_div128(x * int'(mwh[j][i])), -512, 511), -131072, 131071);
      end
      yh[j] = ref_tanh(acc);
    end
    yh[N_HID] = 128;
    for (int k = 0; k < N_OUT; k++) begin
      acc = 0;
      for (int j = 0; j <= N_HID; j++)
        acc = sat(acc + sat(fl_div128(yh[j] * int'(mwo[k][j])), -512, 511), -131072, 131071);
      mlp_exp[k] = ref_tanh(acc);
    end
    // SNN: rate-coded spike trains from the same image (brightness = pixel + 128)
    for (int t = 0; t < N_STEPS; t++)
      for (int i = 0; i < N_IN; i++) strain[t][i] = ($urandom_range(254) < mimg[i] + 128);
    for (int j = 0; j < N_HID; j++) ph[j] = 0;
    for (int k = 0; k < N_OUT; k++) po[k] = 0;
    for (int t = 0; t < N_STEPS; t++) begin
      for (int j = 0; j < N_HID; j++) begin
        for (int i = 0; i < N_IN; i++) if (strain[t][i]) ph[j] += int'(swh[j][i]);
        sh[j] = (ph[j] >= TH);
        if (sh[j]) ph[j] = 0;
      end
      for (int k = 0; k < N_OUT; k++) begin
        for (int j = 0; j < N_HID; j++) if (sh[j]) po[k] += int'(swo[k][j]);
        snn_exp[t][k] = (po[k] >= TH);
        if (snn_exp[t][k]) begin po[k] = 0; n_ospk++; end
      end
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 0;
    mlp_pix_valid = 0; mlp_pix_data = '0; snn_spk_valid = 0; snn_spk_in = 0;
    mlp_wload = '0; snn_wload = '0;
    @(posedge rst_n);
    load_weights();
    references();
    fork
      begin
        for (int i = 0; i < N_IN; i++) begin
          @(negedge clk);
          mlp_pix_valid = 1; mlp_pix_data = q3_7_t'(mimg[i]);
          while (!mlp_pix_ready) @(negedge clk);
          @(posedge clk);
        end
        @(negedge clk); mlp_pix_valid = 0;
      end
      begin
        for (int t = 0; t < N_STEPS; t++)
          for (int i = 0; i < N_IN; i++) begin
            @(negedge clk);
            snn_spk_valid = 1; snn_spk_in = strain[t][i];
            while (!snn_spk_ready) @(negedge clk);
            @(posedge clk);
          end
        @(negedge clk); snn_spk_valid = 0;
      end
    join
    wait (t_snn1 >= 0 && t_mlp1 >= 0);
    @(posedge clk);
    chk(ostep == N_STEPS, "SNN step count");
    chk(t_mlp1 - t_mlp0 == N_IN + N_HID + 5, $sformatf("MLP image time %0d", t_mlp1 - t_mlp0));
    chk(t_snn1 - t_snn0 == N_STEPS * (N_IN + N_HID + 4) - 1, $sformatf("SNN image time %0d", t_snn1 - t_snn0));
    chk(n_ospk > 0, "SNN output spikes");
    $display("784-%0d-10: MLP %0d cycles, SNN %0d cycles (ratio %0.1f), SNN output spikes %0d",
             N_HID, t_mlp1 - t_mlp0, t_snn1 - t_snn0, real'(t_snn1 - t_snn0) / real'(t_mlp1 - t_mlp0), n_ospk);
    done = 1;
  end
endmodule
