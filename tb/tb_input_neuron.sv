// tb_input_neuron: applies random controller slots and data to the layer
// input buffer and checks that one cycle later it presents the same slot,
// with the framing flags qualified by valid and the bias constant in place
// of the data in bias slots.
module tb_input_neuron;
  import nn_pkg::*;
  localparam int W = 10;
  localparam logic [W-1:0] BV = 10'd128;

  logic clk = 0, rst_n = 0;
  logic c_valid, c_first, c_last, c_clear, c_bias;
  logic [IDX_W-1:0] c_idx; logic [W-1:0] d_in;
  logic q_valid, q_first, q_last, q_clear; logic [IDX_W-1:0] q_idx; logic [W-1:0] q_data;
  int checks = 0, failures = 0, n_bias = 0;

  input_neuron #(.W(W), .BIAS_VAL(BV)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ev, ef, el, ec, eb; logic [IDX_W-1:0] ei; logic [W-1:0] ed;
    {c_valid, c_first, c_last, c_clear, c_bias, c_idx, d_in} = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      ev = 1'($urandom); ef = 1'($urandom); el = 1'($urandom); ec = 1'($urandom);
      eb = ($urandom_range(7) == 0); ei = IDX_W'($urandom); ed = W'($urandom);
      c_valid = ev; c_first = ef; c_last = el; c_clear = ec; c_bias = eb; c_idx = ei; d_in = ed;
      @(posedge clk); #1;
      checks++;
      if (q_valid != ev || q_first != (ev & ef) || q_last != (ev & el) || q_clear != (ev & ec)
          || q_idx != ei || q_data != (eb ? BV : ed)) begin
        failures++; $display("FAIL n=%0d", n);
      end
      if (eb) n_bias++;
    end
    checks++;
    if (n_bias == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
