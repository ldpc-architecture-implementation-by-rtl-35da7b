// channel_ram: the Channel RAM of the layered decoder. It holds the soft
// posterior reliability (Lambda) of every variable node. Before decoding it
// is filled with the intrinsic LLRs; during decoding every layer reads the
// values of its columns and writes back the ones the next layer does not
// use (the others travel through the bypass path instead).
//
// One asynchronous read port and one synchronous write port, as in a
// distributed FPGA RAM. A write and a read of the same word in one cycle
// return the old word. The port widths are parameters; the defaults are
// the 7 columns of the design's matrix and 8-bit soft values (the width
// is this design's choice).
module channel_ram #(
  parameter int DEPTH = ldpc_pkg::N,
  parameter int WIDTH = ldpc_pkg::LLR_W,
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
