// dist_ram: distributed (LUT) RAM with one synchronous write port and
// NRD asynchronous read ports.
//
// The core keeps its whole state in such memories instead of flip-flops: the
// KEY memory and the STATE memory are 32 x 8 bit each (one RAM32M-style
// slice), and the shuffling permutation is a 16 x 4 bit memory. A write takes
// effect at the rising clock edge when we is high; reads are combinational,
// so a read of the address being written returns the old word until the edge.
// The memory has no reset, as LUT RAM on an FPGA has none; the sequencer
// initialises every word before it reads it. Depth, width and the number of
// read ports are parameters; the defaults are the 32 x 8 memory of the
// architecture, the number of read ports is this implementation's choice.
module dist_ram #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WIDTH = 8,
  parameter int unsigned NRD   = 2,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                       clk,
  input  logic                       we,
  input  logic [AW-1:0]              waddr,
  input  logic [WIDTH-1:0]           wdata,
  input  logic [NRD-1:0][AW-1:0]     raddr,
  output logic [NRD-1:0][WIDTH-1:0]  rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_comb begin
    for (int i = 0; i < int'(NRD); i++) rdata[i] = mem[raddr[i]];
  end

endmodule
