// tb_tanh_lut: exhaustive check of the activation LUT against tanh computed
// in floating point. Every Q3.7 input is applied (plus saturating Q11.7
// inputs beyond +-4.0) and the output must equal round(128*tanh(s/128)).
module tb_tanh_lut;
  import nn_pkg::*;

  q11_7_t s;
  q3_7_t  y;
  int checks = 0, failures = 0;

  tanh_lut dut (.s(s), .y(y));

  function automatic int ref_tanh(input int v);
    real x;
    int  c;
    c = (v > 511) ? 511 : (v < -512) ? -512 : v;
    x = $tanh(real'(c) / 128.0);
    return $rtoi($floor(128.0 * x + 0.5));
  endfunction

  task automatic check(input int v);
    s = q11_7_t'(v);
    #1;
    checks++;
    if (int'(y) != ref_tanh(v)) begin
      failures++;
      if (failures < 10) $display("FAIL s=%0d y=%0d exp=%0d", v, y, ref_tanh(v));
    end
  endtask

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -512; v < 512; v++) check(v);
    check(131071); check(-131072); check(600); check(-700); check(1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
