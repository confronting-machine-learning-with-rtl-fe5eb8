// tb_nn_controller: runs the sequencer with a model of the two neuron
// layers (each reports done two cycles after its last slot, as the real
// neurons do behind their input buffer) and an input stream with random
// gaps. It checks the order, indices and flags of every hidden and output
// slot, the bias slots, the clear flag on the first time step only, the
// step and image completion pulses, that no input is accepted while the
// output layer works (back-pressure seen at least once), and the pass
// length N_IN + N_HID + 2*BIAS + 4 cycles with an uninterrupted stream.
module tb_nn_controller;
  import nn_pkg::*;
  localparam int N_IN = 7, N_HID = 4, N_STEPS = 3;
  localparam bit BIAS = 1'b1;
  localparam int PASS = N_IN + N_HID + 2*int'(BIAS) + 4;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready;
  logic h_valid, h_first, h_last, h_clear, h_bias; logic [IDX_W-1:0] h_idx; logic h_done;
  logic o_valid, o_first, o_last, o_clear, o_bias; logic [IDX_W-1:0] o_idx; logic o_done;
  logic step_done, image_done, busy; logic [IDX_W-1:0] step;
  int checks = 0, failures = 0;
  int hexp = 0, oexp = 0, stp = 0, n_step = 0, n_img = 0, n_bp = 0, n_gap = 0;
  logic [1:0] hd_pipe = 0, od_pipe = 0;
  logic gaps = 1;
  int first_acc_cyc = -1, cyc = 0, n_period = 0;

  nn_controller #(.N_IN(N_IN), .N_HID(N_HID), .BIAS(BIAS), .N_STEPS(N_STEPS)) dut (.*);
  always #5 clk = ~clk;

  // layer model: done two cycles after the last slot
  always_ff @(posedge clk) begin
    hd_pipe <= {hd_pipe[0], h_valid && h_last};
    od_pipe <= {od_pipe[0], o_valid && o_last};
  end
  assign h_done = hd_pipe[1];
  assign o_done = od_pipe[1];

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (in_valid && !in_ready) n_bp++;
    if (h_valid) begin
      chk(h_idx == IDX_W'(hexp), "h_idx");
      chk(h_first == (hexp == 0), "h_first");
      chk(h_last == (hexp == N_IN - 1 + int'(BIAS)), "h_last");
      chk(h_bias == (BIAS && hexp == N_IN), "h_bias");
      chk(h_clear == (stp == 0), "h_clear");
      chk(h_bias || (in_valid && in_ready), "h slot without input");
      if (hexp == 0) begin
        if (first_acc_cyc >= 0 && !gaps) begin
          chk(cyc - first_acc_cyc == PASS, "pass length"); n_period++;
        end
        first_acc_cyc = cyc;
      end
      hexp = h_last ? 0 : hexp + 1;
    end
    if (o_valid) begin
      chk(!in_ready, "input accepted during output phase");
      chk(o_idx == IDX_W'(oexp), "o_idx");
      chk(o_first == (oexp == 0), "o_first");
      chk(o_last == (oexp == N_HID - 1 + int'(BIAS)), "o_last");
      chk(o_bias == (BIAS && oexp == N_HID), "o_bias");
      chk(o_clear == (stp == 0), "o_clear");
      oexp = o_last ? 0 : oexp + 1;
    end
    if (step_done) begin
      n_step++;
      chk(image_done == (stp == N_STEPS - 1), "image_done");
      chk(step == IDX_W'(stp), "step");
      if (image_done) n_img++;
      stp = (stp == N_STEPS - 1) ? 0 : stp + 1;
    end else chk(!image_done, "image_done without step_done");
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    // images with a bursty input stream
    while (n_img < 4) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      if (!in_valid) n_gap++;
    end
    // then an uninterrupted stream
    @(negedge clk); in_valid = 0;
    repeat (PASS * 2) @(negedge clk);
    gaps = 0; first_acc_cyc = -1;
    in_valid = 1;
    while (n_img < 8) @(negedge clk);
    in_valid = 0;
    repeat (5) @(negedge clk);
    chk(!busy, "busy after last image");
    chk(n_period >= 8, "uninterrupted passes measured");
    chk(n_bp > 0, "back-pressure exercised");
    chk(n_step == 8 * N_STEPS, "step count");
    $display("steps=%0d images=%0d backpressure=%0d periods=%0d", n_step, n_img, n_bp, n_period);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
