// regfile: 32 x 32-bit register file with two read ports and one write port.
//
// ra selects the register driven on busA and rb the one driven on busB;
// both reads are combinational (valid one access time after the address).
// When we is 1, the register selected by rw takes busW on the rising clock
// edge; the clock matters only for writes. These ports and this behaviour
// follow the register file of the datapath. Two choices are this design's:
// register 0 always reads as zero and ignores writes (the MIPS convention for
// $zero), and an active-low asynchronous reset clears all registers.
module regfile
  import mips_pkg::*;
#(
  parameter int unsigned NUM_REGS = NREG,
  parameter int unsigned WIDTH    = XLEN,
  localparam int unsigned AW      = $clog2(NUM_REGS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [AW-1:0]    rw,
  input  logic [AW-1:0]    ra,
  input  logic [AW-1:0]    rb,
  input  logic [WIDTH-1:0] bus_w,
  output logic [WIDTH-1:0] bus_a,
  output logic [WIDTH-1:0] bus_b
);

  logic [WIDTH-1:0] regs [NUM_REGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_REGS; i++) regs[i] <= '0;
    end else if (we && rw != '0) begin
      regs[rw] <= bus_w;
    end
  end

  assign bus_a = (ra == '0) ? '0 : regs[ra];
  assign bus_b = (rb == '0) ? '0 : regs[rb];

endmodule
