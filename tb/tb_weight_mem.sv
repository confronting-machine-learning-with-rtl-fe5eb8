// tb_weight_mem: writes a pseudo-random word to every address of a weight
// memory, reads all of them back through the asynchronous read port, then
// overwrites a few addresses and checks that only those changed.
module tb_weight_mem;
  localparam int DEPTH = 785, W = 10, AW = $clog2(DEPTH);

  logic clk = 0;
  logic we;
  logic [AW-1:0] waddr, raddr;
  logic [W-1:0]  wdata, rdata;
  logic [W-1:0]  model [DEPTH];
  int checks = 0, failures = 0;

  weight_mem #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = W'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      raddr = AW'(a); #1;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL a=%0d %h %h", a, rdata, model[a]); end
    end
    // rewrite a few addresses
    for (int n = 0; n < 20; n++) begin
      int a;
      a = $urandom_range(DEPTH-1);
      @(negedge clk); we = 1; waddr = AW'(a); wdata = W'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      raddr = AW'(a); #1;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL2 a=%0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
