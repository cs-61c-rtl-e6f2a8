// magic_memory: idealized word memory with one address, Data In and Data Out.
//
// Read: the word selected by addr appears on dout combinationally, one access
// time after the address is valid. Write: when we is 1, the word selected by
// addr takes din on the rising clock edge; the clock matters only for writes.
// This is the idealized memory of the datapath, used once for instructions
// and once for data. addr is a byte address: bits 1:0 are ignored (word
// access only) and address bits above the memory's size wrap around. The
// default size of 1024 words (4 KiB) is this design's choice; the contents
// are not reset.
module magic_memory #(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [31:0]      addr,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] mem [WORDS];
  logic [AW-1:0]    word;

  assign word = addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (we) mem[word] <= din;
  end

  assign dout = mem[word];

  logic unused_addr;
  assign unused_addr = ^{addr[31:AW+2], addr[1:0]};

endmodule
