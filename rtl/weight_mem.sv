// weight_mem: local synaptic weight memory of one neuron.
//
// Each neuron of the time-multiplexed architecture owns its weights, one
// word per synapse, and reads the weight of the synapse being processed in
// the same cycle as the input value arrives. The published design fixes the
// weights at synthesis; here they are written through a simple write port so
// that any trained network can be loaded (this design's choice). The read is
// asynchronous (distributed memory / logic ROM style), so a weight is
// available in the cycle its address is presented.
//
// Interface: write port (we, waddr, wdata) sampled on the rising clock edge;
// read port (raddr -> rdata) combinational. No reset: contents are undefined
// until written.
module weight_mem #(
  parameter int DEPTH = 785,
  parameter int W     = 10,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;

  assign rdata = (32'(raddr) < DEPTH) ? mem[raddr] : '0;

endmodule
