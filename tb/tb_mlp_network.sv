// tb_mlp_network: loads random weights into a reduced MLP (20-6-3), streams
// random images through it (some with gaps in the pixel stream, some
// uninterrupted) and compares the outputs with a reference forward pass
// computed here: Q3.7 products rescaled by floor(x*w/128) and saturated,
// saturating Q11.7 sums, bias input 1.0 on the last synapse of each layer,
// tanh in floating point, rounded to Q3.7. Checks the image latency
// N_IN + N_HID + 5 cycles for uninterrupted streams.
module tb_mlp_network;
  import nn_pkg::*;
  localparam int N_IN = 20, N_HID = 6, N_OUT = 3;
  localparam int LAT = N_IN + N_HID + 5;

  logic clk = 0, rst_n = 0;
  logic pix_valid, pix_ready, out_valid, busy;
  q3_7_t pix_data;
  wload_t wload;
  q3_7_t out_y [N_OUT];
  int checks = 0, failures = 0, n_lat = 0;

  int wh [N_HID][N_IN+1];
  int wo [N_OUT][N_HID+1];
  int img [N_IN];

  mlp_network #(.N_IN(N_IN), .N_HID(N_HID), .N_OUT(N_OUT)) dut (.*);
  always #5 clk = ~clk;

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
  function automatic int neuron(input int n, input int x [], input int w []);
    int acc = 0;
    for (int i = 0; i < n; i++)
      acc = sat(acc + sat(fl_div128(x[i] * w[i]), -512, 511), -131072, 131071);
    return ref_tanh(acc);
  endfunction

  task automatic wr(input bit layer, input int n, input int s, input int v);
    @(negedge clk);
    wload.we = 1; wload.layer = layer; wload.neuron = IDX_W'(n); wload.syn = IDX_W'(s);
    wload.data = q3_7_t'(v);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t_first, t_out, cyc = 0, pcnt = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && pix_valid && pix_ready) begin
      if (pcnt == 0) t_first = cyc;
      pcnt = (pcnt == N_IN - 1) ? 0 : pcnt + 1;
    end
    if (rst_n && out_valid) t_out = cyc;
  end

  initial begin
    int xh [], xo [], wv [], yh [N_HID], exp_y;
    bit gaps;
    wload = '0; pix_valid = 0; pix_data = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int j = 0; j < N_HID; j++)
      for (int i = 0; i <= N_IN; i++) begin wh[j][i] = int'($urandom_range(200)) - 100; wr(0, j, i, wh[j][i]); end
    for (int k = 0; k < N_OUT; k++)
      for (int j = 0; j <= N_HID; j++) begin wo[k][j] = int'($urandom_range(400)) - 200; wr(1, k, j, wo[k][j]); end
    @(negedge clk); wload = '0;
    for (int n = 0; n < 12; n++) begin
      gaps = (n % 2 == 0);
      for (int i = 0; i < N_IN; i++) img[i] = int'($urandom_range(256)) - 128;
      // reference
      xh = new[N_IN+1]; wv = new[N_IN+1];
      for (int i = 0; i < N_IN; i++) xh[i] = img[i];
      xh[N_IN] = 128;
      for (int j = 0; j < N_HID; j++) begin
        for (int i = 0; i <= N_IN; i++) wv[i] = wh[j][i];
        yh[j] = neuron(N_IN + 1, xh, wv);
      end
      xo = new[N_HID+1]; wv = new[N_HID+1];
      for (int j = 0; j < N_HID; j++) xo[j] = yh[j];
      xo[N_HID] = 128;
      // stream the image
      for (int i = 0; i < N_IN; i++) begin
        @(negedge clk);
        while (gaps && $urandom_range(2) == 0) begin pix_valid = 0; @(negedge clk); end
        pix_valid = 1; pix_data = q3_7_t'(img[i]);
        while (!pix_ready) @(negedge clk);   // ready is registered: stable here
        @(posedge clk);                  // accepted on this edge
      end
      @(negedge clk); pix_valid = 0;
      wait (out_valid); @(posedge clk); @(negedge clk);
      for (int k = 0; k < N_OUT; k++) begin
        for (int j = 0; j <= N_HID; j++) wv[j] = wo[k][j];
        exp_y = neuron(N_HID + 1, xo, wv);
        checks++;
        if (int'(out_y[k]) != exp_y) begin
          failures++; $display("FAIL img=%0d k=%0d y=%0d exp=%0d", n, k, out_y[k], exp_y);
        end
      end
      if (!gaps) begin
        checks++; n_lat++;
        if (t_out - t_first != LAT) begin
          failures++; $display("FAIL latency %0d", t_out - t_first);
        end
      end
    end
    checks++;
    if (n_lat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
