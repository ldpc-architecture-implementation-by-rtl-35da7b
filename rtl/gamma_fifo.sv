// gamma_fifo: the FIFO between the read and the write side of the decoder.
// While a layer's columns are read, each intermediate value
// Gamma = Lambda - R_old is pushed here and also fed to the check node
// unit; once the check node has seen the whole row, the values are popped
// in the same order to compute the new messages and the updated
// posteriors. Because the next layer is read while the current one is
// written, the FIFO holds the tail of one row and the head of the next.
//
// Synchronous FIFO, first-word-fall-through: dout shows the oldest word
// whenever empty is low, and pop removes it at the clock edge. Push and pop
// in the same cycle are allowed. Pushing when full and popping when empty
// are errors and are checked by assertions. Default depth: one row of the
// matrix (4 entries); default width: 8 bits.
module gamma_fifo #(
  parameter int DEPTH = ldpc_pkg::DC,
  parameter int WIDTH = ldpc_pkg::LLR_W,
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic [AW:0]      count;

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign dout  = mem[rptr];

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (push) wptr <= incr(wptr);
      if (pop)  rptr <= incr(rptr);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);

endmodule
