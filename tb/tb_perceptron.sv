// tb_perceptron: drives a perceptron with random weights and random input
// sequences (with idle gaps) and compares its activation with a reference
// computed here: Q3.7 products rescaled by floor(x*w/128) and saturated,
// a saturating Q11.7 sum, and tanh evaluated in floating point. Also checks
// that y_valid comes exactly one cycle after the last synapse, and that
// large weights and inputs drive the product into saturation at least once.
module tb_perceptron;
  import nn_pkg::*;
  localparam int N_SYN = 23, AW = $clog2(N_SYN);

  logic clk = 0, rst_n = 0;
  logic w_we; logic [AW-1:0] w_addr; q3_7_t w_data;
  logic in_valid, in_first, in_last; logic [AW-1:0] in_idx; q3_7_t in_x;
  q3_7_t y; logic y_valid;
  int checks = 0, failures = 0, sat_seen = 0;
  int wt [N_SYN];

  perceptron #(.N_SYN(N_SYN)) dut (.*);
  always #5 clk = ~clk;

  function automatic int sat(input int v, input int lo, input int hi);
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction
  function automatic int fl_div128(input int p);   // floor(p / 128)
    return (p >= 0) ? p / 128 : -((-p + 127) / 128);
  endfunction
  function automatic int ref_tanh(input int s);
    int c = sat(s, -512, 511);
    return $rtoi($floor(128.0 * $tanh(real'(c) / 128.0) + 0.5));
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_weights(input int big);
    for (int i = 0; i < N_SYN; i++) begin
      @(negedge clk);
      wt[i] = big ? $urandom_range(511, 300) : int'($urandom_range(160)) - 80;
      w_we = 1; w_addr = AW'(i); w_data = q3_7_t'(wt[i]);
    end
    @(negedge clk); w_we = 0;
  endtask

  task automatic run_sum(input int big);
    int acc = 0, exp_y, xv;
    for (int i = 0; i < N_SYN; i++) begin
      while ($urandom_range(3) == 0) begin @(negedge clk); in_valid = 0; end
      @(negedge clk);
      xv = big ? $urandom_range(511, 300) : int'($urandom_range(256)) - 128;
      in_valid = 1; in_first = (i == 0); in_last = (i == N_SYN - 1);
      in_idx = AW'(i); in_x = q3_7_t'(xv);
      if (fl_div128(xv * wt[i]) > 511 || fl_div128(xv * wt[i]) < -512) sat_seen++;
      acc = sat(acc + sat(fl_div128(xv * wt[i]), -512, 511), -131072, 131071);
    end
    exp_y = ref_tanh(acc);
    @(posedge clk); #1;
    in_valid = 0; in_first = 0; in_last = 0;
    checks++;
    if (!y_valid || int'(y) != exp_y) begin
      failures++; $display("FAIL sum=%0d y=%0d exp=%0d v=%b", acc, y, exp_y, y_valid);
    end
    @(posedge clk); #1;
    checks++;
    if (y_valid || int'(y) != exp_y) begin failures++; $display("FAIL hold"); end
  endtask

  initial begin
    w_we = 0; w_addr = 0; w_data = 0;
    in_valid = 0; in_first = 0; in_last = 0; in_idx = 0; in_x = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    load_weights(0);
    for (int n = 0; n < 200; n++) run_sum(0);
    load_weights(1);
    for (int n = 0; n < 5; n++) run_sum(1);
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL: no saturation exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
