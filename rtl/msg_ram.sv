// msg_ram: the message RAM of the layered decoder. It keeps the
// check-to-variable message R of every non-null entry of the parity-check
// matrix from one iteration to the next, so that a layer can remove its old
// contribution from the posterior value (Gamma = Lambda - R_old) before it
// adds the new one.
//
// One asynchronous read port and one synchronous write port. The RAM is
// not cleared: the decoder reads zero in place of R_old during the first
// iteration. Defaults: 12 entries (the non-null entries of the 3x7 matrix)
// of 6-bit messages; the width is this design's choice.
module msg_ram #(
  parameter int DEPTH = ldpc_pkg::E,
  parameter int WIDTH = ldpc_pkg::R_W,
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
