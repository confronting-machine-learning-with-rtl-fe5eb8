// tb_topologies: the smaller topologies evaluated alongside the reference
// 784-300-10 network, 784-10-10, 784-50-10 and 784-100-10, each run as an
// MLP and as an SNN with 100 time steps on one MNIST-sized image (see
// topology_run). The full 784-300-10 case is run by tb_neuromorphic_top.
module tb_topologies;
  logic clk = 0, rst_n = 0;
  int   c [3], f [3];
  logic d [3];
  int   checks, failures;

  always #5 clk = ~clk;

  topology_run #(.N_HID(10))  u_h10  (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .done(d[0]));
  topology_run #(.N_HID(50))  u_h50  (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .done(d[1]));
  topology_run #(.N_HID(100)) u_h100 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .done(d[2]));

  initial begin
    repeat (1_000_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (d[0] && d[1] && d[2]);
    checks   = c[0] + c[1] + c[2];
    failures = f[0] + f[1] + f[2];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
