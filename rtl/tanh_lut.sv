// tanh_lut: activation function of the perceptron, f(s) = tanh(s), as a
// look-up table.
//
// The Q11.7 neuron sum is first saturated to the Q3.7 range [-4.0, 4.0)
// (tanh(4) = 0.9993 already rounds to 1.0 in Q3.7, so nothing is lost) and
// the 10-bit result addresses a 1024-entry ROM holding
//     LUT[a] = round(128 * tanh(x / 128)),  x = a read as 10-bit two's complement
// in Q3.7, i.e. values from -128 (-1.0) to +128 (+1.0). The table is
// nn_pkg::TANH_TAB, computed at elaboration from that formula, so synthesis
// sees a constant ROM. A LUT-based tanh follows the published neuron; the
// table size, the saturation and round-to-nearest are this design's choices.
//
// Interface: s (Q11.7) in, y (Q3.7) out. Purely combinational, no latency.
module tanh_lut
  import nn_pkg::*;
(
  input  q11_7_t s,
  output q3_7_t  y
);

  q3_7_t addr;
  always_comb begin
    addr = sat_q37(32'(s));
    y    = q3_7_t'(TANH_TAB[$unsigned(addr)]);
  end

endmodule
