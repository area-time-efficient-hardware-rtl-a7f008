// mult_int_ram: internal RAM dedicated to the field multiplier.
//
// Holds the 256-bit digit products {m1,m0} of the pipelined schoolbook
// multiplier until the middle-level Karatsuba recombination reads them.
// One synchronous write port and two asynchronous read ports, the shape of
// an FPGA distributed (LUT) RAM; no reset, every entry is written before it
// is read. The published design names this RAM and its inputs (m0, m1); its depth,
// word width and port count are this design's choice.
module mult_int_ram #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr_a,
  output logic [WIDTH-1:0] rdata_a,
  input  logic [AW-1:0]    raddr_b,
  output logic [WIDTH-1:0] rdata_b
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata_a = mem[raddr_a];
  assign rdata_b = mem[raddr_b];

endmodule
