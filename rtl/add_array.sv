// add_array: the adder stage of the layered update. On its input side it
// removes the layer's old check message from the posterior value,
//   Gamma = Lambda[k-1] - R_old,
// and on its output side it adds the freshly computed message back,
//   Lambda[k] = Gamma + R_new.
// Both results saturate to the soft-value range instead of wrapping.
// Purely combinational. The decoder's read engine uses the subtract half
// and its write engine, one layer behind, the add half, both every cycle.
module add_array
  import ldpc_pkg::*;
(
  input  llr_t lam_in,      // Lambda read for the current layer
  input  msg_t r_old,       // this edge's message from the previous iteration
  output llr_t gamma_out,   // Lambda - R_old
  input  llr_t gamma_in,    // Gamma popped from the FIFO
  input  msg_t r_new,       // new message from the check node unit
  output llr_t lam_out      // Gamma + R_new
);

  localparam int XW = LLR_W + 1;
  localparam logic signed [XW-1:0] HI = XW'((1 <<< (LLR_W - 1)) - 1);
  localparam logic signed [XW-1:0] LO = -XW'(1 <<< (LLR_W - 1));

  function automatic llr_t sat(logic signed [XW-1:0] v);
    if (v > HI) return llr_t'(HI);
    if (v < LO) return llr_t'(LO);
    return llr_t'(v);
  endfunction

  logic signed [XW-1:0] diff, sum;

  always_comb begin
    diff      = XW'(lam_in) - XW'(r_old);
    sum       = XW'(gamma_in) + XW'(r_new);
    gamma_out = sat(diff);
    lam_out   = sat(sum);
  end

endmodule
