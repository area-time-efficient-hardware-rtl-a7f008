// mem_unit: main memory unit of the Ed448 core (distributed register file).
//
// Holds the field elements of the point-multiplication program: inputs,
// constants, ladder coordinates and temporaries. One synchronous write port
// and two asynchronous read ports (operand A and operand B of the field
// multiplier and adder), which maps onto FPGA distributed RAM, so no block
// RAM is used. The published design states that the memory is distributed and that
// the multiplier reads its operands from and writes its results to it; the
// depth, the full-width words and the port count are this design's choice.
// No reset: the program writes every word before it reads it.
module mem_unit
  import ed448_pkg::*;
#(
  parameter int unsigned DEPTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  fe_t           wdata,
  input  logic [AW-1:0] raddr_a,
  output fe_t           rdata_a,
  input  logic [AW-1:0] raddr_b,
  output fe_t           rdata_b
);

  fe_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata_a = mem[raddr_a];
  assign rdata_b = mem[raddr_b];

endmodule
