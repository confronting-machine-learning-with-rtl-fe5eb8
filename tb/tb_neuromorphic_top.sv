// tb_neuromorphic_top: end-to-end test of both networks at their full
// 784-300-10 size (the SNN with 100 time steps per image), top-level
// parameters left at their defaults.
//
// Random weights are loaded into both networks through their weight buses
// at the same time. Then one image is classified by the MLP and two images
// by the SNN, all generated here: pixel values for the MLP in Q3.7, and for
// the SNN rate-coded spike trains where each pixel spikes in a time step
// with probability proportional to its brightness. Both input streams have
// random gaps, and are offered while the network is busy so that it has to
// hold them back. Outputs are compared with reference models computed here
// (see tb_mlp_network and tb_snn_network for the arithmetic). The test
// counts how often each mechanism of the design occurred and fails if one
// never did: stream gaps, back-pressure, the bias slots, saturated and
// unsaturated tanh outputs, hidden and output spikes, potentials carried
// over to the next time step, and potentials cleared at a new image.
module tb_neuromorphic_top;
  import nn_pkg::*;
  localparam int N_IN = 784, N_HID = 300, N_OUT = 10, N_STEPS = 100, TH = 128;
  localparam int SNN_IMAGES = 2;

  logic clk = 0, rst_n = 0;
  logic mlp_pix_valid, mlp_pix_ready, mlp_out_valid, mlp_busy;
  q3_7_t mlp_pix_data;
  wload_t mlp_wload, snn_wload;
  q3_7_t mlp_out_y [N_OUT];
  logic snn_spk_valid, snn_spk_in, snn_spk_ready, snn_out_valid, snn_out_last, snn_busy;
  logic [N_OUT-1:0] snn_out_spikes;

  neuromorphic_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_mlp_gap = 0, n_mlp_bp = 0, n_bias = 0, n_tanh_sat = 0, n_tanh_lin = 0;
  int n_snn_gap = 0, n_snn_bp = 0, n_hspk = 0, n_ospk = 0, n_carry = 0, n_clear = 0;
  int n_mlp_img = 0, n_snn_steps = 0;

  // weights and images (byte-sized values kept in shortint arrays)
  shortint mwh [N_HID][N_IN+1];
  shortint mwo [N_OUT][N_HID+1];
  shortint swh [N_HID][N_IN];
  shortint swo [N_OUT][N_HID];
  int      mimg [N_IN];
  int      spix [N_IN];
  bit      strain [N_STEPS][N_IN];
  logic [N_OUT-1:0] snn_exp [N_STEPS];
  int      mlp_exp [N_OUT];

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
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---------------- reference models ----------------
  task automatic mlp_reference();
    int yh [N_HID+1];
    int acc, x;
    for (int j = 0; j < N_HID; j++) begin
      acc = 0;
      for (int i = 0; i <= N_IN; i++) begin
        x = (i == N_IN) ? 128 : mimg[i];
        acc = sat(acc + sat(fl_div128(x * int'(mwh[j][i])), -512, 511), -131072, 131071);
      end
      yh[j] = ref_tanh(acc);
    end
    yh[N_HID] = 128;
    n_bias += 2;
    for (int k = 0; k < N_OUT; k++) begin
      acc = 0;
      for (int j = 0; j <= N_HID; j++)
        acc = sat(acc + sat(fl_div128(yh[j] * int'(mwo[k][j])), -512, 511), -131072, 131071);
      mlp_exp[k] = ref_tanh(acc);
    end
    for (int j = 0; j < N_HID; j++)
      if (yh[j] == 128 || yh[j] == -128) n_tanh_sat++; else n_tanh_lin++;
  endtask

  task automatic snn_reference();
    int ph [N_HID], po [N_OUT];
    bit sh [N_HID];
    for (int j = 0; j < N_HID; j++) ph[j] = 0;
    for (int k = 0; k < N_OUT; k++) po[k] = 0;
    n_clear++;
    for (int t = 0; t < N_STEPS; t++) begin
      for (int j = 0; j < N_HID; j++) begin
        for (int i = 0; i < N_IN; i++) if (strain[t][i]) ph[j] = sat(ph[j] + int'(swh[j][i]), -131072, 131071);
        sh[j] = (ph[j] >= TH);
        if (sh[j]) begin ph[j] = 0; n_hspk++; end
        else if (ph[j] != 0) n_carry++;
      end
      for (int k = 0; k < N_OUT; k++) begin
        for (int j = 0; j < N_HID; j++) if (sh[j]) po[k] = sat(po[k] + int'(swo[k][j]), -131072, 131071);
        snn_exp[t][k] = (po[k] >= TH);
        if (snn_exp[t][k]) begin po[k] = 0; n_ospk++; end
      end
    end
  endtask

  // ---------------- monitors ----------------
  int ostep = 0;
  always @(posedge clk) if (rst_n) begin
    if (!mlp_pix_ready && mlp_pix_valid) n_mlp_bp++;
    if (!snn_spk_ready && snn_spk_valid) n_snn_bp++;
    if (mlp_out_valid) begin
      n_mlp_img++;
      for (int k = 0; k < N_OUT; k++)
        chk(int'(mlp_out_y[k]) == mlp_exp[k], $sformatf("MLP out %0d: %0d exp %0d", k, mlp_out_y[k], mlp_exp[k]));
    end
    if (snn_out_valid) begin
      n_snn_steps++;
      chk(snn_out_spikes == snn_exp[ostep], $sformatf("SNN step %0d: %b exp %b", ostep, snn_out_spikes, snn_exp[ostep]));
      chk(snn_out_last == (ostep == N_STEPS - 1), "SNN out_last");
      ostep = (ostep == N_STEPS - 1) ? 0 : ostep + 1;
    end
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  task automatic load_weights();
    int nm = N_HID * (N_IN + 1) + N_OUT * (N_HID + 1);
    int ns = N_HID * N_IN + N_OUT * N_HID;
    for (int j = 0; j < N_HID; j++) for (int i = 0; i <= N_IN; i++) mwh[j][i] = shortint'(int'($urandom_range(80)) - 40);
    for (int k = 0; k < N_OUT; k++) for (int j = 0; j <= N_HID; j++) mwo[k][j] = shortint'(int'($urandom_range(80)) - 40);
    for (int j = 0; j < N_HID; j++) for (int i = 0; i < N_IN; i++) swh[j][i] = shortint'(int'($urandom_range(44)) - 22);
    for (int k = 0; k < N_OUT; k++) for (int j = 0; j < N_HID; j++) swo[k][j] = shortint'(int'($urandom_range(140)) - 60);
    for (int n = 0; n < ((nm > ns) ? nm : ns); n++) begin
      @(negedge clk);
      mlp_wload = '0; snn_wload = '0;
      if (n < nm) begin
        mlp_wload.we = 1;
        if (n < N_HID * (N_IN + 1)) begin
          mlp_wload.layer = 0; mlp_wload.neuron = IDX_W'(n / (N_IN + 1)); mlp_wload.syn = IDX_W'(n % (N_IN + 1));
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
          snn_wload.layer = 0; snn_wload.neuron = IDX_W'(n / N_IN); snn_wload.syn = IDX_W'(n % N_IN);
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

  task automatic run_mlp();
    for (int i = 0; i < N_IN; i++) mimg[i] = ($urandom_range(3) == 0) ? 0 : int'($urandom_range(255)) - 128;
    mlp_reference();
    for (int i = 0; i < N_IN; i++) begin
      @(negedge clk);
      while ($urandom_range(5) == 0) begin mlp_pix_valid = 0; n_mlp_gap++; @(negedge clk); end
      mlp_pix_valid = 1; mlp_pix_data = q3_7_t'(mimg[i]);
      while (!mlp_pix_ready) @(negedge clk);
      @(posedge clk);
    end
    // offer the first pixel of a next image while the output layer works:
    // it must be held back until the network is ready again
    @(negedge clk);
    mlp_pix_valid = 1; mlp_pix_data = '0;
    repeat (5) @(negedge clk);
    mlp_pix_valid = 0;
    wait (n_mlp_img == 1);
  endtask

  task automatic run_snn(input int img);
    for (int i = 0; i < N_IN; i++) spix[i] = ($urandom_range(2) == 0) ? 0 : $urandom_range(255);
    for (int t = 0; t < N_STEPS; t++)
      for (int i = 0; i < N_IN; i++) strain[t][i] = ($urandom_range(254) < spix[i]);
    snn_reference();
    for (int t = 0; t < N_STEPS; t++)
      for (int i = 0; i < N_IN; i++) begin
        @(negedge clk);
        while ($urandom_range(15) == 0) begin snn_spk_valid = 0; n_snn_gap++; @(negedge clk); end
        snn_spk_valid = 1; snn_spk_in = strain[t][i];
        while (!snn_spk_ready) @(negedge clk);
        @(posedge clk);
      end
    @(negedge clk); snn_spk_valid = 0;
    wait (n_snn_steps == (img + 1) * N_STEPS);
    @(posedge clk);
  endtask

  initial begin
    mlp_pix_valid = 0; mlp_pix_data = '0; snn_spk_valid = 0; snn_spk_in = 0;
    mlp_wload = '0; snn_wload = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    load_weights();
    $display("weights loaded at cycle %0t", $time / 10);
    fork
      run_mlp();
      for (int img = 0; img < SNN_IMAGES; img++) run_snn(img);
    join
    repeat (5) @(posedge clk);
    chk(!snn_busy, "SNN idle at the end");
    $display("MLP: images=%0d gaps=%0d backpressure=%0d bias_slots=%0d tanh_sat=%0d tanh_lin=%0d",
             n_mlp_img, n_mlp_gap, n_mlp_bp, n_bias, n_tanh_sat, n_tanh_lin);
    $display("SNN: steps=%0d gaps=%0d backpressure=%0d hidden_spikes=%0d output_spikes=%0d carried=%0d image_clears=%0d",
             n_snn_steps, n_snn_gap, n_snn_bp, n_hspk, n_ospk, n_carry, n_clear);
    chk(n_mlp_img == 1, "one MLP image");
    chk(n_snn_steps == SNN_IMAGES * N_STEPS, "SNN step count");
    chk(n_mlp_gap > 0, "MLP stream gap");
    chk(n_mlp_bp > 0, "MLP back-pressure");
    chk(n_bias > 0, "bias slots");
    chk(n_tanh_sat > 0, "saturated tanh");
    chk(n_tanh_lin > 0, "unsaturated tanh");
    chk(n_snn_gap > 0, "SNN stream gap");
    chk(n_snn_bp > 0, "SNN back-pressure");
    chk(n_hspk > 0, "hidden spikes");
    chk(n_ospk > 0, "output spikes");
    chk(n_carry > 0, "potential carried over");
    chk(n_clear > 1, "potential cleared at a new image");
    $display("finished at cycle %0t", $time / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
