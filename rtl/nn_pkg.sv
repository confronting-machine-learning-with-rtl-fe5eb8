// nn_pkg: types, constants and helpers shared by the MLP and SNN datapaths.
//
// Data between neurons and the synaptic weights are signed fixed point Q3.7:
// 10 bits, two's complement, 7 fractional bits, so 1.0 = 128 and the range is
// [-4.0, 4.0). Neuron sums are Q11.7: 18 bits, same fractional position,
// range [-1024.0, 1024.0). Both formats follow the published architecture;
// the reading "sign bit counted among the integer bits" is this design's
// (it matches the 113 pins reported for the MLP: 10 + 10x10 + 3).
//
// wload_t is the weight-load bus of a network: one weight per cycle, addressed
// by layer (0 = hidden, 1 = output), neuron and synapse. It is this design's
// own addition; the published design fixes the weights at synthesis time.
package nn_pkg;

  localparam int DATA_W = 10;   // Q3.7
  localparam int FRAC_W = 7;
  localparam int SUM_W  = 18;   // Q11.7
  localparam int IDX_W  = 16;   // width of neuron / synapse index fields

  typedef logic signed [DATA_W-1:0] q3_7_t;
  typedef logic signed [SUM_W-1:0]  q11_7_t;

  localparam q3_7_t  Q37_ONE = q3_7_t'(1 << FRAC_W);
  localparam q3_7_t  Q37_MAX = q3_7_t'((1 << (DATA_W-1)) - 1);
  localparam q3_7_t  Q37_MIN = q3_7_t'(-(1 << (DATA_W-1)));
  localparam q11_7_t Q117_MAX = q11_7_t'((1 << (SUM_W-1)) - 1);
  localparam q11_7_t Q117_MIN = q11_7_t'(-(1 << (SUM_W-1)));

  typedef struct packed {
    logic              we;      // write strobe
    logic              layer;   // 0: hidden layer, 1: output layer
    logic [IDX_W-1:0]  neuron;  // neuron index inside the layer
    logic [IDX_W-1:0]  syn;     // synapse index (the bias synapse is the last)
    q3_7_t             data;    // weight, Q3.7
  } wload_t;

  // Saturate a wide signed value into Q3.7.
  function automatic q3_7_t sat_q37(input logic signed [31:0] v);
    if (v > 32'(Q37_MAX))      return Q37_MAX;
    else if (v < 32'(Q37_MIN)) return Q37_MIN;
    else                       return q3_7_t'(v);
  endfunction

  // Saturate a wide signed value into Q11.7.
  function automatic q11_7_t sat_q117(input logic signed [31:0] v);
    if (v > 32'(Q117_MAX))      return Q117_MAX;
    else if (v < 32'(Q117_MIN)) return Q117_MIN;
    else                        return q11_7_t'(v);
  endfunction

  // Q3.7 x Q3.7 product, rescaled to Q3.7 (arithmetic shift, i.e. rounding
  // toward minus infinity) and saturated.
  function automatic q3_7_t mul_q37(input q3_7_t a, input q3_7_t b);
    logic signed [2*DATA_W-1:0] p;
    p = a * b;
    return sat_q37(32'(p >>> FRAC_W));
  endfunction

  // ---------------------------------------------------------------------
  // tanh activation table, computed at elaboration:
  //   TANH_TAB[a] = round(128 * tanh(x)),  x = (a read as 10-bit two's
  //   complement) / 128, i.e. the Q3.7 value of a.
  // tanh(x) = 1 - 2 / (exp(2x) + 1); exp is evaluated as (exp(v/1024))^1024,
  // a 10-term Taylor series followed by ten squarings, accurate to far
  // below the half-LSB that decides the rounding.
  typedef logic [(1 << DATA_W)-1:0][DATA_W-1:0] tanh_tab_t;

  function automatic real exp_r(input real v);
    real e, term;
    e    = 1.0;
    term = 1.0;
    v    = v / 1024.0;
    for (int n = 1; n < 10; n++) begin
      term = term * v / n;
      e    = e + term;
    end
    for (int n = 0; n < 10; n++) e = e * e;
    return e;
  endfunction

  function automatic tanh_tab_t make_tanh_tab();
    tanh_tab_t tab;
    real       x, th;
    for (int k = 0; k < (1 << DATA_W); k++) begin
      x      = real'((k >= (1 << (DATA_W-1))) ? k - (1 << DATA_W) : k) / real'(1 << FRAC_W);
      th     = 1.0 - 2.0 / (exp_r(2.0 * x) + 1.0);
      tab[k] = DATA_W'($rtoi($floor(real'(1 << FRAC_W) * th + 0.5)));
    end
    return tab;
  endfunction

  localparam tanh_tab_t TANH_TAB = make_tanh_tab();

endpackage
