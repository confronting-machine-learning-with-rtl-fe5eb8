// tb_snn_network: loads random weights into a reduced IF network (24-8-4,
// 10 time steps), streams rate-coded random images through it (each pixel
// spikes in a time step with probability proportional to its brightness),
// and compares the output spikes of every time step with a reference model
// of the network: integrate weights of the input spikes, compare with the
// threshold at the end of the step, spike and reset or keep the potential,
// start every image from potential 0. Checks the out_last flag and the image
// time N_STEPS*(N_IN+N_HID+4) - 1 cycles with an uninterrupted stream, and
// counts hidden and output spikes so that both layers are seen to fire.
module tb_snn_network;
  import nn_pkg::*;
  localparam int N_IN = 24, N_HID = 8, N_OUT = 4, N_STEPS = 10, TH = 128;
  localparam int IMG_CYC = N_STEPS * (N_IN + N_HID + 4) - 1;

  logic clk = 0, rst_n = 0;
  logic spk_valid, spk_in, spk_ready, out_valid, out_last, busy;
  wload_t wload;
  logic [N_OUT-1:0] out_spikes;
  int checks = 0, failures = 0, n_hspk = 0, n_ospk = 0, n_lat = 0;

  int wh [N_HID][N_IN];
  int wo [N_OUT][N_HID];
  int ph [N_HID], po [N_OUT];
  bit sin [N_IN], sh [N_HID];
  int pix [N_IN];
  logic [N_OUT-1:0] exp_out [N_STEPS];

  snn_network #(.N_IN(N_IN), .N_HID(N_HID), .N_OUT(N_OUT), .N_STEPS(N_STEPS),
                .THRESHOLD(q11_7_t'(TH))) dut (.*);
  always #5 clk = ~clk;

  task automatic wr(input bit layer, input int n, input int s, input int v);
    @(negedge clk);
    wload.we = 1; wload.layer = layer; wload.neuron = IDX_W'(n); wload.syn = IDX_W'(s);
    wload.data = q3_7_t'(v);
  endtask

  int cyc = 0, t_first, t_last, pcnt = 0, ostep = 0, cur_img = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && spk_valid && spk_ready) begin
      if (pcnt == 0) t_first = cyc;
      pcnt = (pcnt == N_IN * N_STEPS - 1) ? 0 : pcnt + 1;
    end
    if (rst_n && out_valid) begin
      checks++;
      if (out_spikes != exp_out[ostep] || out_last != (ostep == N_STEPS - 1)) begin
        failures++;
        $display("FAIL img=%0d step=%0d out=%b exp=%b last=%b", cur_img, ostep, out_spikes, exp_out[ostep], out_last);
      end
      if (out_last) t_last = cyc;
      ostep = (ostep == N_STEPS - 1) ? 0 : ostep + 1;
    end
  end

  initial begin
    repeat (300000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit gaps;
    int s;
    wload = '0; spk_valid = 0; spk_in = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int j = 0; j < N_HID; j++)
      for (int i = 0; i < N_IN; i++) begin wh[j][i] = int'($urandom_range(120)) - 40; wr(0, j, i, wh[j][i]); end
    for (int k = 0; k < N_OUT; k++)
      for (int j = 0; j < N_HID; j++) begin wo[k][j] = int'($urandom_range(160)) - 50; wr(1, k, j, wo[k][j]); end
    @(negedge clk); wload = '0;
    for (int n = 0; n < 8; n++) begin
      cur_img = n;
      gaps = (n % 2 == 0);
      for (int i = 0; i < N_IN; i++) pix[i] = $urandom_range(255);
      for (int j = 0; j < N_HID; j++) ph[j] = 0;
      for (int k = 0; k < N_OUT; k++) po[k] = 0;
      for (int t = 0; t < N_STEPS; t++) begin
        // reference for this step
        for (int i = 0; i < N_IN; i++) sin[i] = ($urandom_range(254) < pix[i]);
        for (int j = 0; j < N_HID; j++) begin
          for (int i = 0; i < N_IN; i++) if (sin[i]) ph[j] += wh[j][i];
          sh[j] = (ph[j] >= TH);
          if (sh[j]) begin ph[j] = 0; n_hspk++; end
        end
        for (int k = 0; k < N_OUT; k++) begin
          for (int j = 0; j < N_HID; j++) if (sh[j]) po[k] += wo[k][j];
          exp_out[t][k] = (po[k] >= TH);
          if (exp_out[t][k]) begin po[k] = 0; n_ospk++; end
        end
        // stream the step
        for (int i = 0; i < N_IN; i++) begin
          @(negedge clk);
          while (gaps && $urandom_range(2) == 0) begin spk_valid = 0; @(negedge clk); end
          spk_valid = 1; spk_in = sin[i];
          while (!spk_ready) @(negedge clk);   // ready is registered: stable here
          @(posedge clk);                  // accepted on this edge
        end
      end
      @(negedge clk); spk_valid = 0;
      wait (out_valid && out_last); @(posedge clk); @(negedge clk);
      if (!gaps) begin
        checks++; n_lat++;
        if (t_last - t_first != IMG_CYC) begin failures++; $display("FAIL image time %0d", t_last - t_first); end
      end
    end
    checks++;
    if (n_hspk == 0 || n_ospk == 0 || n_lat == 0) begin failures++; $display("FAIL coverage"); end
    $display("hidden spikes=%0d output spikes=%0d", n_hspk, n_ospk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
