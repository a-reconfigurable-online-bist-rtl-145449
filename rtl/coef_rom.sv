// coef_rom: coefficient ROM of the reconfigurable tester.
//
// Holds the biases and weights of every monitored circuit's network in one
// array.  Each network occupies a contiguous region, ordered neuron by neuron:
// first every hidden neuron (its bias, then one weight per input bit, input
// bit 0 first), then every output neuron (its bias, then one weight per
// hidden neuron, hidden neuron 0 first).  The controller therefore only ever
// increments the address.  Words are W-bit two's-complement fixed point.
//
// Read is asynchronous (the word at 'addr' is on 'data' in the same cycle).
// The contents come from INIT_FILE (hex, one word per line) when one is
// given and are all zero otherwise; they are the result of training and
// quantising each circuit's network offline.  The default file holds the
// trained networks of the five monitored circuits.  A synthesis front end
// that ignores $readmemh sees an all-zero ROM and removes it as a constant;
// synthesise with a tool that honours $readmemh, or that maps the ROM to a
// macro loaded from the same file.
module coef_rom #(
  parameter int unsigned W      = 13,
  parameter int unsigned DEPTH  = 1024,
  parameter string       INIT_FILE = "rtl/nn_coef.hex"
) (
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [W-1:0]             data
);
  logic [W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign data = mem[addr];
endmodule
