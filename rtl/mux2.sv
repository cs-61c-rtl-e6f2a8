// mux2: two-input multiplexer, W bits wide.
//
// y = sel ? b : a. Purely combinational. Input 0 (a) and input 1 (b) match
// the 0/1 labels of the RegDst, ALUSrc, MemtoReg and nPC_sel multiplexers
// of the single-cycle datapath; the default width of 32 is the datapath's.
module mux2 #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sel,
  output logic [W-1:0] y
);

  always_comb y = sel ? b : a;

endmodule
