// hidden_ram: small RAM for the outputs of the hidden-layer neurons.
//
// While the hidden layer is computed, each neuron's activation (u1.F, W bits)
// is written at the neuron's index; while the output layer is computed the
// same words are read back in index order.  One synchronous write port and
// one asynchronous read port.  DEPTH is the largest hidden layer of any
// monitored circuit.  No reset: every word is written before it is read in
// each test.
module hidden_ram #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 43
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];
endmodule
